// loopback_module: per-port link / self-loop switch.
//
// In normal operation (loop_en low) the port's link input feeds the port's
// input path and the head of the port's output buffer drives the link
// output. When the port's link or neighbour is unavailable the port FSM
// raises loop_en: the link is then ignored in both directions (in_ready and
// out_valid held low, the faulty neighbour is disconnected) and packets still
// waiting in the output buffer are handed back into the port's own input
// path, where they are checked, buffered and routed again through another
// port, so no packet is lost. The self-loopback idea and the module's place
// between link, output buffers and input path follow the document; the
// valid/ready handshake is this design's choice. Combinational; looped marks
// a flit that came through the self-loop. lnk_out_flit is the output
// buffer head in both modes; only lnk_out_valid gates it.
module loopback_module
  import noc_pkg::*;
(
  input  logic  loop_en,
  // external link, incoming
  input  logic  lnk_in_valid,
  input  flit_t lnk_in_flit,
  output logic  lnk_in_ready,
  // external link, outgoing
  output logic  lnk_out_valid,
  output flit_t lnk_out_flit,
  input  logic  lnk_out_ready,
  // head of this port's output buffer
  input  logic  ob_valid,
  input  flit_t ob_flit,
  output logic  ob_pop,
  // this port's input path
  output logic  ip_valid,
  output flit_t ip_flit,
  output logic  ip_looped,
  input  logic  ip_ready
);
  always_comb begin
    lnk_out_flit = ob_flit;
    if (loop_en) begin
      ip_valid      = ob_valid;
      ip_flit       = ob_flit;
      ip_looped     = 1'b1;
      ob_pop        = ob_valid && ip_ready;
      lnk_in_ready  = 1'b0;
      lnk_out_valid = 1'b0;
    end else begin
      ip_valid      = lnk_in_valid;
      ip_flit       = lnk_in_flit;
      ip_looped     = 1'b0;
      lnk_in_ready  = ip_ready;
      lnk_out_valid = ob_valid;
      ob_pop        = ob_valid && lnk_out_ready;
    end
  end
endmodule
