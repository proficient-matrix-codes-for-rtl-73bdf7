// tb_error_journal: self-checking test of the centralized error journal.
// Random per-port event pulses are applied; a reference keeps its own
// counters, last port / kind and sticky flag and is compared with the
// registered outputs every cycle. A small counter width (4 bits) is used so
// saturation is reached; clear is exercised. Watchdog of 20000 cycles.
module tb_error_journal;
  import noc_pkg::*;
  localparam int CW = 4;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, clear;
  logic ev_corr [NPORTS], ev_unc [NPORTS], ev_rte [NPORTS];
  logic [CW-1:0] cnt_corr [NPORTS], cnt_unc [NPORTS], cnt_rte [NPORTS];
  dir_e last_port;
  logic [2:0] last_kind;
  logic any_err;
  int rc [NPORTS], ru [NPORTS], rr [NPORTS], rlp, rlk, rany, n_sat = 0;

  error_journal #(.CNT_W(CW)) dut (.*);
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
    clear = 0;
    for (int p = 0; p < NPORTS; p++) begin ev_corr[p] = 0; ev_unc[p] = 0; ev_rte[p] = 0; end
    repeat (2) @(posedge clk);
    #1 rst_n = 1;
    rc = '{default: 0}; ru = '{default: 0}; rr = '{default: 0}; rlp = 0; rlk = 0; rany = 0;
    for (int cyc = 0; cyc < 4000; cyc++) begin
      clear = (cyc % 1000 == 999);
      for (int p = 0; p < NPORTS; p++) begin
        ev_corr[p] = ($urandom_range(9) == 0);
        ev_unc[p]  = ($urandom_range(19) == 0);
        ev_rte[p]  = ($urandom_range(19) == 0);
      end
      @(posedge clk);
      if (clear) begin
        rc = '{default: 0}; ru = '{default: 0}; rr = '{default: 0}; rlp = 0; rlk = 0; rany = 0;
      end else begin
        for (int p = 0; p < NPORTS; p++) begin
          if (ev_corr[p]) rc[p] = (rc[p] == 15) ? 15 : rc[p] + 1;
          if (ev_unc[p])  ru[p] = (ru[p] == 15) ? 15 : ru[p] + 1;
          if (ev_rte[p])  rr[p] = (rr[p] == 15) ? 15 : rr[p] + 1;
          if (ev_corr[p] || ev_unc[p] || ev_rte[p]) begin
            rlp = p; rlk = 4 * ev_rte[p] + 2 * ev_unc[p] + ev_corr[p]; rany = 1;
          end
        end
      end
      #1;
      for (int p = 0; p < NPORTS; p++) begin
        chk("corr", cnt_corr[p], rc[p]);
        chk("unc", cnt_unc[p], ru[p]);
        chk("rte", cnt_rte[p], rr[p]);
        if (rc[p] == 15) n_sat++;
      end
      chk("last port", last_port, rlp);
      chk("last kind", last_kind, rlk);
      chk("any", any_err, rany);
    end
    chk("saw saturation", n_sat > 0, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
