// tb_switch_control: self-checking test of the central switch control.
// Random requests (each input asks for one output) and random full outputs
// are applied for many cycles. Each cycle the testbench checks that every
// granted input had a request to a non-full output, that each output moves
// the flit of exactly one of its granted inputs, that an output with a
// requester and room is never left idle, and that round-robin is fair: while
// an input keeps requesting a free output it is served within 8 cycles.
// Watchdog of 20000 cycles.
module tb_switch_control;
  import noc_pkg::*;
  int checks = 0, failures = 0;
  logic  clk = 0, rst_n = 0;
  logic  req_valid [NPORTS];
  dir_e  req_dir   [NPORTS];
  flit_t in_flit   [NPORTS];
  logic  ob_full   [NPORTS];
  logic  grant     [NPORTS];
  logic  xb_push   [NPORTS];
  flit_t xb_flit   [NPORTS];
  int    wait_cnt  [NPORTS];
  logic  served    [NPORTS];
  int    n_contend = 0;

  switch_control dut (.*);
  always #5 clk = ~clk;

  task automatic chk(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0d exp %0d", what, got, exp); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < NPORTS; i++) begin
      req_valid[i] = 0; req_dir[i] = DIR_N; in_flit[i] = '0; ob_full[i] = 0; wait_cnt[i] = 0; served[i] = 0;
    end
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    for (int cyc = 0; cyc < 5000; cyc++) begin
      for (int i = 0; i < NPORTS; i++) begin
        // keep pending requests stable until served (as an input buffer head does)
        if (!req_valid[i] || served[i] || wait_cnt[i] == 0) begin
          req_valid[i] = ($urandom_range(3) != 0);
          req_dir[i]   = dir_e'((cyc < 2500) ? $urandom_range(1) : $urandom_range(7));
          in_flit[i]   = flit_t'({$urandom, $urandom, $urandom, $urandom, $urandom});
        end
        ob_full[i] = ($urandom_range(7) == 0);
      end
      #1;
      for (int o = 0; o < NPORTS; o++) begin
        int ngr, nreq, src;
        ngr = 0; nreq = 0; src = -1;
        for (int i = 0; i < NPORTS; i++) begin
          if (req_valid[i] && int'(req_dir[i]) == o) nreq++;
          if (grant[i] && int'(req_dir[i]) == o) begin ngr++; src = i; end
        end
        if (nreq > 1) n_contend++;
        chk("push iff request and room", xb_push[o], (nreq > 0 && !ob_full[o]) ? 1 : 0);
        chk("one winner", ngr, (nreq > 0 && !ob_full[o]) ? 1 : 0);
        if (src >= 0) begin
          checks++;
          if (xb_flit[o] !== in_flit[src]) begin failures++; $display("FAIL flit o=%0d", o); end
        end
      end
      for (int i = 0; i < NPORTS; i++) begin
        if (grant[i]) chk("grant has request", req_valid[i], 1);
        if (req_valid[i] && !grant[i] && !ob_full[req_dir[i]]) wait_cnt[i]++;
        else if (grant[i]) wait_cnt[i] = 0;
        if (wait_cnt[i] > NPORTS) begin failures++; $display("FAIL starvation of %0d", i); wait_cnt[i] = 0; end
        served[i] = grant[i];
      end
      @(posedge clk); #1;
    end
    chk("saw contention", n_contend > 0, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
