// tb_noc_router8: end-to-end test of the 8-port PrMC router at its default
// sizes (64-bit data, 8-entry input buffers, 2-entry output buffers).
// The router sits at (5,5) with its processing element on the north port.
// Eight link partners inject flits; every flit carries a unique tag in data
// bits [15:0] and a destination that makes the previous hop legal. Output
// links are drained with random back-pressure. A scoreboard checks that each
// flit leaves exactly once, with corrected data, a valid PrMC code word, the
// previous-hop field set to the port it left by, and on the port the
// reference routing picks (exactly, while the fault mask is stable; within
// the three productive candidates when faults change under it). Phases:
//   1 directed single flit, link-to-link latency must be 2 cycles;
//   2 clean random traffic, local delivery to the PE port included;
//   3 traffic with injected errors: single bits and odd adjacent bursts
//     (corrected), even bursts in one row (flagged, passed on), wrong
//     previous-hop fields (routing errors);
//   4 static faults on E and SE: detours through other ports;
//   5 E, NE and SE all faulty: east-bound flits are blocked, then released;
//   6 SW output held busy, then SW fails: its queued flits loop back and are
//     re-routed;
//   7 drain; the error journal must match the counts of injected errors.
// Each mechanism must occur at least once. Watchdog of 200000 cycles.
module tb_noc_router8;
  import noc_pkg::*;
  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0;
  logic [COORD_W-1:0] my_x = 5, my_y = 5;
  dir_e pe_port = DIR_N;
  logic ecc_en = 1;
  logic [NPORTS-1:0] port_fault = '0;
  logic  in_valid [NPORTS];
  flit_t in_flit  [NPORTS];
  logic  in_ready [NPORTS];
  logic  out_valid[NPORTS];
  flit_t out_flit [NPORTS];
  logic  out_ready[NPORTS];
  port_state_e port_state [NPORTS];
  logic [NPORTS-1:0] port_blocked;
  logic journal_clear = 0;
  logic [15:0] cnt_corr [NPORTS], cnt_unc [NPORTS], cnt_rte [NPORTS];
  dir_e last_err_port;
  logic [2:0] last_err_kind;
  logic any_err;

  noc_router8 dut (.*);
  always #5 clk = ~clk;

  // ---------------------------------------------------------------- reference
  int sxv[8] = '{0, 1, 1, 1, 0, -1, -1, -1};
  int syv[8] = '{1, 1, 0, -1, -1, -1, 0, 1};

  function automatic int dir_with(int sx, int sy);
    for (int d = 0; d < 8; d++) if (sxv[d] == sx && syv[d] == sy) return d;
    return -1;
  endfunction
  function automatic int sgn(int a);
    return a > 0 ? 1 : a < 0 ? -1 : 0;
  endfunction

  // three productive candidates in preference order (or the PE port, local)
  function automatic void cands(input int dx, input int dy, output int c[3]);
    int ex, ey;
    ex = sgn(dx); ey = sgn(dy);
    if (ex == 0 && ey == 0)      c = '{int'(pe_port), -1, -1};
    else if (ex != 0 && ey != 0) c = '{dir_with(ex, ey), dir_with(ex, 0), dir_with(0, ey)};
    else if (ey == 0)            c = '{dir_with(ex, 0), dir_with(ex, 1), dir_with(ex, -1)};
    else                         c = '{dir_with(0, ey), dir_with(1, ey), dir_with(-1, ey)};
  endfunction

  function automatic int ref_route(input int dx, input int dy, input logic [7:0] bad);
    int c[3];
    cands(dx, dy, c);
    if (dx == 0 && dy == 0) return bad[pe_port] ? -1 : int'(pe_port);
    for (int k = 0; k < 3; k++) if (!bad[c[k]] && c[k] != int'(pe_port)) return c[k];
    return -1;
  endfunction

  function automatic prmc_cw_t encode(input logic [DATA_W-1:0] d);
    prmc_cw_t c;
    c.data = d; c.h = '0; c.v = '0;
    for (int i = 0; i < V_W; i++) begin
      c.h[0] ^= d[i]; c.h[1] ^= d[i+V_W]; c.v[i] = d[i] ^ d[i+V_W];
    end
    return c;
  endfunction

  // ---------------------------------------------------------------- scoreboard
  typedef struct {
    logic [DATA_W-1:0] data;    // data expected on exit
    int  dx, dy;
    int  exp_port;              // -1: candidate check only
    int  src;
  } exp_t;
  exp_t sb [int];
  int   next_tag = 1;

  int n_sent = 0, n_recv = 0;
  int n_corr_inj [NPORTS], n_unc_inj [NPORTS], n_rte_inj [NPORTS];
  int m_corr = 0, m_unc = 0, m_rte = 0, m_local = 0, m_detour = 0, m_blocked = 0;
  int m_loop = 0, m_backpress = 0, m_contend = 0, m_drain = 0, m_disabled = 0, m_burst = 0;

  task automatic chk(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0d exp %0d (t=%0t)", what, got, exp, $time); end
  endtask

  // traffic control
  int  inj_rate = 0;          // percent chance per cycle per port
  int  err_mode = 0;          // 1: inject errors
  int  exact_ok = 1;          // fault mask stable: check exact port
  int  east_only = 0;         // generate only east-bound flits (phase 5)
  int  sw_rate = 100;         // percent ready on SW output
  int  err_cls [NPORTS];

  function automatic logic legal_hop(int p, int dx, int dy);
    // neighbour in direction p moved the flit by the opposite step
    int mx, my;
    mx = -sxv[p]; my = -syv[p];
    return (mx == 1 && dx >= 0) || (mx == -1 && dx <= 0) || (my == 1 && dy >= 0) || (my == -1 && dy <= 0);
  endfunction

  task automatic make_flit(input int p, output flit_t f);
    int dx, dy, tag, cls, b;
    exp_t e;
    logic [DATA_W-1:0] d;
    do begin
      dx = $urandom_range(10) - 5; dy = $urandom_range(10) - 5;
      if (east_only) begin dx = $urandom_range(4) + 1; dy = $urandom_range(6) - 3; end
    end while (p != int'(pe_port) && !legal_hop(p, dx, dy));
    tag = next_tag++;
    d = {$urandom, $urandom};
    d[15:0] = 16'(tag);
    f.hdr.dst_x = COORD_W'(5 + dx);
    f.hdr.dst_y = COORD_W'(5 + dy);
    f.hdr.prev  = (p == int'(pe_port)) ? DIR_N : opposite(dir_e'(p));
    f.cw = encode(d);
    e.data = d; e.dx = dx; e.dy = dy; e.src = p;
    e.exp_port = exact_ok ? ref_route(dx, dy, port_fault) : -1;
    cls = err_mode ? $urandom_range(5) : 0;
    case (cls)
      1: begin b = $urandom_range(DATA_W-1); f.cw.data[b] = ~f.cw.data[b]; end
      2: begin b = $urandom_range(V_W-3) + ($urandom_range(1) ? V_W : 0);
               f.cw.data[b +: 3] = ~f.cw.data[b +: 3]; end                     // odd burst
      3: begin f.cw.data[40 +: 4] = ~f.cw.data[40 +: 4]; e.data = f.cw.data; end // even burst
      4: if (p != int'(pe_port)) f.hdr.prev = dir_e'(3'(f.hdr.prev + 3'd1));
         else cls = 0;
      5: begin b = $urandom_range(V_W-1); f.cw.v[b] = ~f.cw.v[b]; end            // check-bit hit
      default: ;
    endcase
    err_cls[p] = cls;
    sb[tag] = e;
  endtask

  // ---------------------------------------------------------------- drivers
  logic accepted [NPORTS];

  initial begin
    for (int p = 0; p < NPORTS; p++) begin
      in_valid[p] = 0; in_flit[p] = '0; out_ready[p] = 1; accepted[p] = 1;
      n_corr_inj[p] = 0; n_unc_inj[p] = 0; n_rte_inj[p] = 0; err_cls[p] = 0;
    end
  end

  // one process drives all link partners, 1 time unit after each edge
  always @(posedge clk) begin
    #1;
    for (int p = 0; p < NPORTS; p++) begin
      if (in_valid[p] && in_ready_q[p]) in_valid[p] = 0;
      if (!in_valid[p] && rst_n && !port_fault[p] && ($urandom_range(99) < inj_rate) &&
          !(east_only && p != int'(DIR_W))) begin
        flit_t f;
        make_flit(p, f);
        in_flit[p] = f; in_valid[p] = 1;
      end
      out_ready[p] = (p == int'(DIR_SW)) ? ($urandom_range(99) < sw_rate) : ($urandom_range(3) != 0);
    end
  end

  logic in_ready_q [NPORTS];
  // switch requests, observed to count output contention
  logic mon_req_valid [NPORTS];
  dir_e mon_req_dir   [NPORTS];
  logic mon_looped    [NPORTS];   // a flit re-enters through the self-loop
  for (genvar g = 0; g < NPORTS; g++) begin : g_mon
    assign mon_looped[g]    = dut.g_port[g].u_port.ip_valid && dut.g_port[g].u_port.ip_looped &&
                              dut.g_port[g].u_port.ip_ready;
    assign mon_req_valid[g] = dut.g_port[g].u_port.req_valid;
    assign mon_req_dir[g]   = dut.g_port[g].u_port.req_dir;
  end
  // monitor: sample just before each edge
  always @(negedge clk) begin
    int nreq [NPORTS];
    for (int p = 0; p < NPORTS; p++) nreq[p] = 0;
    for (int p = 0; p < NPORTS; p++) begin
      in_ready_q[p] = in_valid[p] && in_ready[p];   // transfer on the coming edge
      if (in_valid[p] && !in_ready[p]) m_backpress++;
      if (port_blocked[p]) m_blocked++;
      if (mon_looped[p]) m_loop++;
      if (port_state[p] == PS_DRAIN) m_drain++;
      if (port_state[p] == PS_DISABLED) m_disabled++;
      if (mon_req_valid[p]) nreq[mon_req_dir[p]]++;
      if (in_valid[p] && in_ready[p]) begin
        n_sent++;
        case (err_cls[p])
          1, 2, 5: begin n_corr_inj[p]++; m_corr++; if (err_cls[p] == 2) m_burst++; end
          3: begin n_unc_inj[p]++; m_unc++; end
          4: begin n_rte_inj[p]++; m_rte++; end
          default: ;
        endcase
      end
      if (out_valid[p] && out_ready[p]) begin
        int tag, c[3], ok;
        exp_t e;
        tag = int'(out_flit[p].cw.data[15:0]);
        n_recv++;
        if (!sb.exists(tag)) begin
          failures++; checks++;
          $display("FAIL unknown or duplicate flit tag %0d on port %0d", tag, p);
        end else begin
          e = sb[tag];
          sb.delete(tag);
          checks++;
          if (out_flit[p].cw.data !== e.data) begin
            failures++; $display("FAIL data of tag %0d: %h vs %h", tag, out_flit[p].cw.data, e.data);
          end
          chk("code word valid", out_flit[p].cw == encode(out_flit[p].cw.data), 1);
          chk("prev stamped", out_flit[p].hdr.prev, p);
          chk("dst kept x", out_flit[p].hdr.dst_x, 5 + e.dx);
          if (e.exp_port >= 0) chk("exact port", p, e.exp_port);
          cands(e.dx, e.dy, c);
          ok = 0;
          for (int k = 0; k < 3; k++) if (c[k] == p && (k == 0 || p != int'(pe_port))) ok = 1;
          chk("productive port", ok, 1);
          if (e.dx == 0 && e.dy == 0) m_local++;
          else if (p != c[0]) m_detour++;
        end
      end
    end
    for (int o = 0; o < NPORTS; o++) if (nreq[o] > 1) m_contend++;
  end

  // ---------------------------------------------------------------- watchdog
  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic drain();
    int w;
    inj_rate = 0;
    w = 0;
    while (sb.size() > 0 && w < 5000) begin @(posedge clk); w++; end
    repeat (5) @(posedge clk);
    chk("drained", sb.size(), 0);
  endtask

  // ---------------------------------------------------------------- sequence
  initial begin
    int t0, lat;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    repeat (2) @(posedge clk);

    // phase 1: one flit W -> E, latency from acceptance to out_valid
    $display("phase 1 at %0t", $time);
    begin
      flit_t f;
      exp_t e;
      #1;
      f.hdr.dst_x = 9; f.hdr.dst_y = 5; f.hdr.prev = DIR_E;
      f.cw = encode(64'h0123_4567_89AB_0000 | 64'(next_tag));
      e.data = f.cw.data; e.dx = 4; e.dy = 0; e.exp_port = int'(DIR_E); e.src = int'(DIR_W);
      sb[next_tag++] = e;
      in_flit[DIR_W] = f; in_valid[DIR_W] = 1;
      @(posedge clk);           // accepted on this edge
      // lat counts edges after acceptance until the flit is offered on the
      // E link; it leaves on the next edge, lat + 1 edges after the one
      // that accepted it
      lat = 0;
      #1;
      while (!out_valid[DIR_E] && lat < 20) begin @(posedge clk); #1; lat++; end
      chk("link-to-link latency (cycles)", lat + 1, 2);
      @(posedge clk);
    end

    // phase 2: clean random traffic
    $display("phase 2 at %0t", $time);
    inj_rate = 30; err_mode = 0;
    repeat (1500) @(posedge clk);
    drain();

    // phase 3: errors
    $display("phase 3 at %0t", $time);
    inj_rate = 30; err_mode = 1;
    repeat (2000) @(posedge clk);
    drain();
    err_mode = 0;

    // phase 4: static faults on E and SE
    $display("phase 4 at %0t", $time);
    port_fault[DIR_E] = 1; port_fault[DIR_SE] = 1;
    repeat (10) @(posedge clk);
    chk("E disabled", port_state[DIR_E], PS_DISABLED);
    inj_rate = 25;
    repeat (1500) @(posedge clk);
    drain();

    // phase 5: E, NE, SE faulty; east-bound flits from W are blocked
    $display("phase 5 at %0t", $time);
    exact_ok = 0; east_only = 1;
    port_fault[DIR_NE] = 1;
    repeat (10) @(posedge clk);
    inj_rate = 50;
    repeat (40) @(posedge clk);
    inj_rate = 0;
    repeat (40) @(posedge clk);
    chk("W blocked", port_blocked[DIR_W], 1);
    port_fault = '0;
    drain();
    east_only = 0; exact_ok = 1;

    // phase 6: SW output busy, then SW fails with flits queued
    $display("phase 6 at %0t", $time);
    sw_rate = 0; inj_rate = 30; exact_ok = 0;
    repeat (300) @(posedge clk);
    port_fault[DIR_SW] = 1;
    repeat (300) @(posedge clk);
    inj_rate = 0;
    repeat (50) @(posedge clk);
    port_fault = '0; sw_rate = 100;
    drain();
    exact_ok = 1;

    // phase 7: journal against injected counts
    $display("phase 7 at %0t", $time);
    repeat (5) @(posedge clk);
    for (int p = 0; p < NPORTS; p++) begin
      chk($sformatf("journal corr p%0d", p), cnt_corr[p], n_corr_inj[p]);
      chk($sformatf("journal unc p%0d", p),  cnt_unc[p],  n_unc_inj[p]);
      chk($sformatf("journal rte p%0d", p),  cnt_rte[p],  n_rte_inj[p]);
    end
    chk("any_err", any_err, 1);
    chk("all received", n_recv, n_sent);

    $display("sent %0d received %0d", n_sent, n_recv);
    $display("mechanisms: corrected %0d (bursts %0d) uncorrectable %0d routing-errors %0d local %0d detour %0d",
             m_corr, m_burst, m_unc, m_rte, m_local, m_detour);
    $display("            blocked-cycles %0d looped-back %0d backpressure %0d contention %0d drain %0d disabled %0d",
             m_blocked, m_loop, m_backpress, m_contend, m_drain, m_disabled);
    chk("mech corrected", m_corr > 0, 1);
    chk("mech odd burst corrected", m_burst > 0, 1);
    chk("mech uncorrectable", m_unc > 0, 1);
    chk("mech routing error", m_rte > 0, 1);
    chk("mech local delivery", m_local > 0, 1);
    chk("mech detour", m_detour > 0, 1);
    chk("mech blocked", m_blocked > 0, 1);
    chk("mech loopback", m_loop > 0, 1);
    chk("mech backpressure", m_backpress > 0, 1);
    chk("mech contention", m_contend > 0, 1);
    chk("mech drain", m_drain > 0, 1);
    chk("mech disabled", m_disabled > 0, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
