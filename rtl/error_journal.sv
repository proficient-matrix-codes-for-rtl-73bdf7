// error_journal: centralized journal of packet errors.
//
// Each router port reports, for every packet it accepts, whether the PrMC
// decoder corrected an error, found an uncorrectable one, or the routing
// error detector flagged the hop. The journal keeps a saturating CNT_W-bit
// counter of each kind per port, remembers the port and kinds of the most
// recent event, and holds a sticky any_err flag. clear (or reset) zeroes
// everything. The document shows a centralized journal of data packet
// errors beside the control logic but gives no contents; what is recorded
// here is this design's choice. Registered outputs, updated one cycle after
// the events.
module error_journal
  import noc_pkg::*;
#(
  parameter int CNT_W = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clear,
  input  logic             ev_corr  [NPORTS],
  input  logic             ev_unc   [NPORTS],
  input  logic             ev_rte   [NPORTS],
  output logic [CNT_W-1:0] cnt_corr [NPORTS],
  output logic [CNT_W-1:0] cnt_unc  [NPORTS],
  output logic [CNT_W-1:0] cnt_rte  [NPORTS],
  output dir_e             last_port,
  output logic [2:0]       last_kind,   // {routing, uncorrectable, corrected}
  output logic             any_err
);
  function automatic logic [CNT_W-1:0] sat_inc(input logic [CNT_W-1:0] c);
    return (&c) ? c : c + CNT_W'(1);
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n || clear) begin
      for (int p = 0; p < NPORTS; p++) begin
        cnt_corr[p] <= '0;
        cnt_unc[p]  <= '0;
        cnt_rte[p]  <= '0;
      end
      last_port <= DIR_N;
      last_kind <= '0;
      any_err   <= 1'b0;
    end else begin
      for (int p = 0; p < NPORTS; p++) begin
        if (ev_corr[p]) cnt_corr[p] <= sat_inc(cnt_corr[p]);
        if (ev_unc[p])  cnt_unc[p]  <= sat_inc(cnt_unc[p]);
        if (ev_rte[p])  cnt_rte[p]  <= sat_inc(cnt_rte[p]);
        if (ev_corr[p] || ev_unc[p] || ev_rte[p]) begin
          last_port <= dir_e'(p);   // highest-numbered reporting port wins
          last_kind <= {ev_rte[p], ev_unc[p], ev_corr[p]};
          any_err   <= 1'b1;
        end
      end
    end
  end
endmodule
