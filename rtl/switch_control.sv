// switch_control: central control logic of the router, arbiters plus crossbar.
//
// Every input port presents the flit at the head of its input buffer with
// the output direction chosen by its routing logic. For each output port a
// round-robin arbiter picks one of the inputs that request it, provided that
// output's buffer has room. The winner's flit is written into the output
// buffer on the next clock edge and the input buffer pops it on the same
// edge (grant). Since each input requests a single output, an input gets at
// most one grant per cycle and up to eight transfers happen in parallel. The
// document names the control logic and an arbiter; round-robin allocation
// and the one-flit-per-port-per-cycle crossbar are this design's choices.
// Combinational except for the arbiters' priority pointers.
module switch_control
  import noc_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  req_valid [NPORTS],
  input  dir_e  req_dir   [NPORTS],
  input  flit_t in_flit   [NPORTS],
  input  logic  ob_full   [NPORTS],
  output logic  grant     [NPORTS],
  output logic  xb_push   [NPORTS],
  output flit_t xb_flit   [NPORTS]
);
  logic [NPORTS-1:0] req_m [NPORTS];  // req_m[o][i]: input i wants output o
  logic [NPORTS-1:0] gnt_m [NPORTS];

  always_comb begin
    for (int o = 0; o < NPORTS; o++)
      for (int i = 0; i < NPORTS; i++)
        req_m[o][i] = req_valid[i] && (int'(req_dir[i]) == o) && !ob_full[o];
  end

  for (genvar o = 0; o < NPORTS; o++) begin : g_out
    rr_arbiter #(.N(NPORTS)) u_arb (
      .clk     (clk),
      .rst_n   (rst_n),
      .req     (req_m[o]),
      .advance (1'b1),
      .gnt     (gnt_m[o])
    );
  end

  always_comb begin
    for (int i = 0; i < NPORTS; i++) grant[i] = 1'b0;
    for (int o = 0; o < NPORTS; o++) begin
      xb_push[o] = |gnt_m[o];
      xb_flit[o] = in_flit[0];
      for (int i = 0; i < NPORTS; i++) begin
        if (gnt_m[o][i]) begin
          xb_flit[o] = in_flit[i];
          grant[i]   = 1'b1;
        end
      end
    end
  end

  // An input may be granted by one output only.
  for (genvar i = 0; i < NPORTS; i++) begin : g_chk
    logic [NPORTS-1:0] col;
    always_comb for (int o = 0; o < NPORTS; o++) col[o] = gnt_m[o][i];
    a_one_grant: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(col));
  end
endmodule
