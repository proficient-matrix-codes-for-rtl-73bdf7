// tb_noc_mesh: four 8-port routers in a 2 x 2 mesh with diagonal links.
// Router r sits at (r % 2, r / 2); each has three neighbours (straight x,
// straight y, diagonal), its processing element on an outward-facing
// diagonal port, and its four remaining ports tied out of service. The
// testbench plays the four processing elements, which send flits with
// unique tags to random routers (including their own), and corrupts the
// payload on the inter-router links: single bit flips and odd adjacent
// bursts of three bits in one row. Phase 1 uses all links; in phase 2 both
// diagonal links are taken out of service at both ends, so traffic between
// opposite corners takes two hops and may be corrupted on each hop. Checks:
// every flit arrives once at the processing element of its destination with
// its original data and a valid code word; the journals' corrected-error
// counters add up to the number of corrupted link transfers; no routing or
// uncorrectable error is recorded; two-hop deliveries happen. Watchdog.
module tb_noc_mesh;
  import noc_pkg::*;
  localparam int NR = 4;
  int checks = 0, failures = 0;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic  in_valid  [NR][NPORTS];
  flit_t in_flit   [NR][NPORTS];
  logic  in_ready  [NR][NPORTS];
  logic  out_valid [NR][NPORTS];
  flit_t out_flit  [NR][NPORTS];
  logic  out_ready [NR][NPORTS];
  port_state_e port_state [NR][NPORTS];
  logic [NPORTS-1:0] port_blocked [NR];
  logic [NPORTS-1:0] port_fault   [NR];
  logic [15:0] cnt_corr [NR][NPORTS], cnt_unc [NR][NPORTS], cnt_rte [NR][NPORTS];
  dir_e last_err_port [NR];
  logic [2:0] last_err_kind [NR];
  logic any_err [NR];

  // processing elements and link corruption, driven by the testbench
  logic     pe_valid [NR];
  flit_t    pe_flit  [NR];
  logic     pe_ready [NR];
  prmc_cw_t lerr     [NR][NPORTS];
  dir_e     pe_dir   [NR];

  int sxv[8] = '{0, 1, 1, 1, 0, -1, -1, -1};
  int syv[8] = '{1, 1, 0, -1, -1, -1, 0, 1};

  function automatic int nb(int r, int p);
    int x, y;
    x = r % 2 + sxv[p]; y = r / 2 + syv[p];
    if (x < 0 || x > 1 || y < 0 || y > 1) return -1;
    return y * 2 + x;
  endfunction

  for (genvar r = 0; r < NR; r++) begin : g_r
    noc_router8 u_r (
      .clk, .rst_n,
      .my_x (COORD_W'(r % 2)), .my_y (COORD_W'(r / 2)),
      .pe_port (pe_dir[r]), .ecc_en (1'b1), .port_fault (port_fault[r]),
      .in_valid (in_valid[r]), .in_flit (in_flit[r]), .in_ready (in_ready[r]),
      .out_valid (out_valid[r]), .out_flit (out_flit[r]), .out_ready (out_ready[r]),
      .port_state (port_state[r]), .port_blocked (port_blocked[r]),
      .journal_clear (1'b0),
      .cnt_corr (cnt_corr[r]), .cnt_unc (cnt_unc[r]), .cnt_rte (cnt_rte[r]),
      .last_err_port (last_err_port[r]), .last_err_kind (last_err_kind[r]), .any_err (any_err[r]));
  end

  // link wiring
  always_comb begin
    for (int r = 0; r < NR; r++)
      for (int p = 0; p < NPORTS; p++) begin
        int n;
        n = nb(r, p);
        if (p == int'(pe_dir[r])) begin
          in_valid[r][p]  = pe_valid[r];
          in_flit[r][p]   = pe_flit[r];
          out_ready[r][p] = pe_ready[r];
        end else if (n >= 0) begin
          in_valid[r][p]  = out_valid[n][(p + 4) % 8];
          in_flit[r][p]   = out_flit[n][(p + 4) % 8];
          in_flit[r][p].cw = out_flit[n][(p + 4) % 8].cw ^ lerr[n][(p + 4) % 8];
          out_ready[r][p] = in_ready[n][(p + 4) % 8];
        end else begin
          in_valid[r][p]  = 1'b0;
          in_flit[r][p]   = '0;
          out_ready[r][p] = 1'b0;
        end
      end
  end

  function automatic prmc_cw_t encode(input logic [DATA_W-1:0] d);
    prmc_cw_t c;
    c.data = d; c.h = '0; c.v = '0;
    for (int i = 0; i < V_W; i++) begin
      c.h[0] ^= d[i]; c.h[1] ^= d[i+V_W]; c.v[i] = d[i] ^ d[i+V_W];
    end
    return c;
  endfunction

  typedef struct { logic [DATA_W-1:0] data; int dst; int src; } exp_t;
  exp_t sb [int];
  int next_tag = 1, inj_rate = 0, err_rate = 0;
  int n_sent = 0, n_recv = 0, n_corrupt = 0, n_two_hop = 0;
  logic xfer_q [NR];

  task automatic chk(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0d exp %0d (t=%0t)", what, got, exp, $time); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // drivers, one time unit after each edge
  always @(posedge clk) begin
    #1;
    for (int r = 0; r < NR; r++) begin
      if (pe_valid[r] && xfer_q[r]) pe_valid[r] = 0;
      if (!pe_valid[r] && rst_n && $urandom_range(99) < inj_rate) begin
        flit_t f;
        exp_t e;
        logic [DATA_W-1:0] d;
        e.dst = $urandom_range(NR-1); e.src = r;
        d = {$urandom, $urandom};
        d[15:0] = 16'(next_tag);
        e.data = d;
        sb[next_tag++] = e;
        f.hdr.dst_x = COORD_W'(e.dst % 2); f.hdr.dst_y = COORD_W'(e.dst / 2);
        f.hdr.prev = pe_dir[r];
        f.cw = encode(d);
        pe_flit[r] = f; pe_valid[r] = 1;
      end
      pe_ready[r] = ($urandom_range(3) != 0);
      for (int p = 0; p < NPORTS; p++) begin
        lerr[r][p] = '0;
        if ($urandom_range(99) < err_rate) begin
          int b;
          if ($urandom_range(1)) begin
            b = $urandom_range(DATA_W-1); lerr[r][p].data[b] = 1'b1;
          end else begin
            b = $urandom_range(V_W-3) + ($urandom_range(1) ? V_W : 0);
            lerr[r][p].data[b +: 3] = 3'b111;
          end
        end
      end
    end
  end

  // monitor, just before each edge
  always @(negedge clk) begin
    for (int r = 0; r < NR; r++) begin
      xfer_q[r] = pe_valid[r] && in_ready[r][pe_dir[r]];
      if (xfer_q[r]) n_sent++;
      for (int p = 0; p < NPORTS; p++) begin
        int n;
        n = nb(r, p);
        if (p != int'(pe_dir[r]) && n >= 0 && out_valid[r][p] && out_ready[r][p] && lerr[r][p] != '0)
          n_corrupt++;
      end
      if (out_valid[r][pe_dir[r]] && pe_ready[r]) begin
        int tag;
        flit_t f;
        f = out_flit[r][pe_dir[r]];
        tag = int'(f.cw.data[15:0]);
        n_recv++;
        if (!sb.exists(tag)) begin
          checks++; failures++; $display("FAIL unknown or duplicate tag %0d", tag);
        end else begin
          chk("delivered at destination", r, sb[tag].dst);
          chk("data intact", f.cw.data == sb[tag].data, 1);
          chk("code word valid", f.cw == encode(f.cw.data), 1);
          if ((sb[tag].src ^ sb[tag].dst) == 3 && port_fault[0][DIR_NE]) n_two_hop++;
          sb.delete(tag);
        end
      end
    end
  end

  task automatic drain();
    int w;
    inj_rate = 0; w = 0;
    while (sb.size() > 0 && w < 5000) begin @(posedge clk); w++; end
    repeat (5) @(posedge clk);
    chk("drained", sb.size(), 0);
  endtask

  initial begin
    int tot_corr, tot_unc, tot_rte;
    pe_dir = '{DIR_SW, DIR_SE, DIR_NW, DIR_NE};
    for (int r = 0; r < NR; r++) begin
      pe_valid[r] = 0; pe_flit[r] = '0; pe_ready[r] = 1; xfer_q[r] = 0;
      for (int p = 0; p < NPORTS; p++) lerr[r][p] = '0;
      // ports with no neighbour are out of service, except the PE port
      for (int p = 0; p < NPORTS; p++)
        port_fault[r][p] = (nb(r, p) < 0) && (p != int'(pe_dir[r]));
    end
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    repeat (10) @(posedge clk);

    // phase 1: all links, errors on links
    inj_rate = 40; err_rate = 15;
    repeat (3000) @(posedge clk);
    drain();

    // phase 2: diagonal links out of service at both ends
    port_fault[0][DIR_NE] = 1; port_fault[3][DIR_SW] = 1;
    port_fault[1][DIR_NW] = 1; port_fault[2][DIR_SE] = 1;
    repeat (10) @(posedge clk);
    inj_rate = 40;
    repeat (3000) @(posedge clk);
    drain();
    err_rate = 0;
    repeat (5) @(posedge clk);

    tot_corr = 0; tot_unc = 0; tot_rte = 0;
    for (int r = 0; r < NR; r++)
      for (int p = 0; p < NPORTS; p++) begin
        tot_corr += cnt_corr[r][p]; tot_unc += cnt_unc[r][p]; tot_rte += cnt_rte[r][p];
      end
    chk("corrected errors = corrupted link transfers", tot_corr, n_corrupt);
    chk("no uncorrectable errors", tot_unc, 0);
    chk("no routing errors", tot_rte, 0);
    chk("all delivered", n_recv, n_sent);
    chk("saw two-hop deliveries", n_two_hop > 0, 1);
    chk("saw corrupted transfers", n_corrupt > 0, 1);
    $display("sent %0d received %0d corrupted link transfers %0d two-hop %0d",
             n_sent, n_recv, n_corrupt, n_two_hop);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
