// tb_router_port: self-checking test of one router port (the east port of a
// router at (5,5), processing element on the north port).
// The testbench plays the link partners and the switch. Flits arrive on the
// link with injected faults of known class (none, one data bit flipped, an
// even burst in one row, a wrong previous-hop direction); the testbench
// checks the event pulses, then checks each flit as the switch pops it from
// the input buffer: corrected data, freshly computed check bits and a
// request on the very next cycle after acceptance (store and forward, one
// cycle through the input buffer). On the output side it pushes flits into
// the output buffer and checks them on the link, in order, with the
// previous-hop field set to EAST. Mid-run the port's fault input is raised
// while flits wait in the output buffer: they must come back through the
// loopback into the input buffer, the link must be cut, the FSM must pass
// DRAIN and DISABLED and return to ACTIVE when the fault clears.
// Watchdog of 40000 cycles.
module tb_router_port;
  import noc_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic [COORD_W-1:0] my_x = 5, my_y = 5;
  dir_e pe_port = DIR_N;
  logic ecc_en = 1, fault = 0;
  logic in_valid, in_ready, out_valid, out_ready;
  flit_t in_flit, out_flit, head_flit, xb_flit;
  logic [NPORTS-1:0] port_ok_all;
  logic port_ok, req_valid, grant, xb_push, ob_full, ev_corr, ev_unc, ev_rte, blocked;
  port_state_e state;
  dir_e req_dir;
  flit_t exp_in[$], exp_out[$];
  int n_corr = 0, n_unc = 0, n_rte = 0, n_loop = 0, n_out = 0, n_in = 0, n_full = 0;
  int saw_drain = 0, saw_dis = 0;

  router_port #(.MY_DIR(DIR_E), .IN_DEPTH(8), .OUT_DEPTH(2)) dut (.*);
  always #5 clk = ~clk;

  assign port_ok_all = {6'h3F, port_ok, 2'b11};   // only this (east) port can go out of service

  function automatic prmc_cw_t encode(input logic [DATA_W-1:0] d);
    prmc_cw_t c;
    c.data = d; c.h = '0; c.v = '0;
    for (int i = 0; i < V_W; i++) begin
      c.h[0] ^= d[i]; c.h[1] ^= d[i+V_W]; c.v[i] = d[i] ^ d[i+V_W];
    end
    return c;
  endfunction

  function automatic flit_t rnd_flit(input dir_e prev);
    flit_t f;
    f.hdr.dst_x = COORD_W'($urandom_range(5));
    f.hdr.dst_y = COORD_W'($urandom_range(15));
    if (f.hdr.dst_x == 5 && f.hdr.dst_y == 5) f.hdr.dst_x = 4;
    f.hdr.prev = prev;
    f.cw = encode({$urandom, $urandom});
    return f;
  endfunction

  task automatic chk(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0d exp %0d (t=%0t)", what, got, exp, $time); end
  endtask

  initial begin
    repeat (40000) @(posedge clk);
    failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  flit_t clean, sent;
  int    cls, bitpos;

  initial begin
    in_valid = 0; out_ready = 0; grant = 0; xb_push = 0; xb_flit = '0; in_flit = '0;
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int cyc = 0; cyc < 6000; cyc++) begin
      // ---- drive inputs (1 time unit after the edge)
      fault = (cyc >= 3000 && cyc < 3100);
      if (!in_valid || in_ready_q) begin
        cls = $urandom_range(3);
        clean = rnd_flit(DIR_W);
        sent = clean;
        case (cls)
          1: begin bitpos = $urandom_range(DATA_W-1); sent.cw.data[bitpos] = ~sent.cw.data[bitpos]; end
          2: sent.cw.data[V_W + 4 +: 2] ^= 2'b11;
          3: sent.hdr.prev = DIR_S;
          default: ;
        endcase
        in_flit = sent;
      end
      in_valid  = ($urandom_range(3) != 0);
      out_ready = (cyc > 2900 && cyc < 3000) ? 1'b0 : ($urandom_range(3) != 0);
      grant     = req_valid && ($urandom_range(2) == 0) && !(cyc > 2800 && cyc < 2950);
      xb_push   = !ob_full && ($urandom_range(2) == 0) && (state == PS_ACTIVE);
      xb_flit   = rnd_flit(DIR_N);
      #1;
      // ---- checks before the edge
      chk("in_ready", in_ready, (state == PS_ACTIVE) && exp_in.size() < 8);
      chk("req_valid", req_valid, exp_in.size() > 0);
      chk("out_valid", out_valid, (state == PS_ACTIVE) && exp_out.size() > 0);
      if (exp_in.size() == 8) n_full++;
      if (in_valid && in_ready) begin
        n_in++;
        chk("ev_corr", ev_corr, cls == 1);
        chk("ev_unc", ev_unc, cls == 2);
        chk("ev_rte", ev_rte, cls == 3);
        n_corr += ev_corr; n_unc += ev_unc; n_rte += ev_rte;
      end
      if (grant) begin
        flit_t e;
        e = exp_in.pop_front();
        chk("head data", head_flit.cw.data == e.cw.data, 1);
        chk("head code", head_flit.cw == encode(head_flit.cw.data), 1);
        chk("head hdr", head_flit.hdr == e.hdr, 1);
        chk("route not own faulty port", (state != PS_ACTIVE && req_dir == DIR_E), 0);
      end
      if (out_valid && out_ready) begin
        flit_t e;
        e = exp_out.pop_front();
        e.hdr.prev = DIR_E;
        chk("out flit", out_flit == e, 1);
        n_out++;
      end
      // loopback transfer: output buffer head returns to the input buffer
      if (state != PS_ACTIVE && exp_out.size() > 0 && (exp_in.size() < 8 || grant)) begin
        flit_t e;
        e = exp_out.pop_front();
        e.hdr.prev = DIR_E;
        exp_in.push_back(e);
        n_loop++;
      end
      if (in_valid && in_ready) begin
        if (cls == 2) exp_in.push_back(sent);   // uncorrectable: passed on as received
        else begin
          flit_t e;
          e = clean;
          e.hdr.prev = sent.hdr.prev;
          exp_in.push_back(e);
        end
      end
      if (xb_push) exp_out.push_back(xb_flit);
      if (state == PS_DRAIN) saw_drain++;
      if (state == PS_DISABLED) saw_dis++;
      in_ready_q = in_valid && in_ready;
      @(posedge clk);
      #1;
    end
    chk("saw corrected", n_corr > 0, 1);
    chk("saw uncorrectable", n_unc > 0, 1);
    chk("saw routing error", n_rte > 0, 1);
    chk("saw loopback", n_loop > 0, 1);
    chk("saw drain", saw_drain > 0, 1);
    chk("saw disabled", saw_dis > 0, 1);
    chk("saw input full", n_full > 0, 1);
    chk("back to active", state == PS_ACTIVE, 1);
    $display("in %0d out %0d loop %0d corr %0d unc %0d rte %0d", n_in, n_out, n_loop, n_corr, n_unc, n_rte);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  logic in_ready_q = 1'b1;
endmodule
