// rr_arbiter: round-robin arbiter with a one-hot grant.
//
// Among the raised req bits the first one at or after the priority pointer
// (wrapping round) is granted in the same cycle. When a grant is issued and
// advance is high, the pointer moves to the position after the winner, so
// every requester is served within N grants. Synchronous active-low reset
// sets the pointer to 0. Helper of the router's switch control.
module rr_arbiter #(
  parameter int N = 8
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] req,
  input  logic         advance,
  output logic [N-1:0] gnt
);
  localparam int PW = $clog2(N);
  logic [PW-1:0] ptr;
  logic [PW-1:0] win;
  logic          found;
  logic [PW:0]   idx;

  always_comb begin
    gnt   = '0;
    win   = ptr;
    idx   = '0;
    found = 1'b0;
    for (int k = 0; k < N; k++) begin
      idx = {1'b0, ptr} + (PW+1)'(k);
      if (idx >= (PW+1)'(N)) idx = idx - (PW+1)'(N);
      if (!found && req[idx[PW-1:0]]) begin
        found             = 1'b1;
        win               = idx[PW-1:0];
        gnt[idx[PW-1:0]]  = 1'b1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n)               ptr <= '0;
    else if (found && advance) ptr <= (int'(win) == N-1) ? '0 : win + PW'(1);
  end
endmodule
