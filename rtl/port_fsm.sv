// port_fsm: operating mode of one router port.
//
// States: ACTIVE (link in use), DRAIN (the link has been reported
// unavailable; the port no longer accepts new packets for output and the
// loopback returns those still in its output buffer to the router) and
// DISABLED (unavailable and empty). ACTIVE goes to DRAIN when fault rises;
// DRAIN goes to DISABLED once the output buffer is empty; DISABLED returns
// to ACTIVE when fault falls. The document gives each port a finite state
// machine driven by control signals and says only the buffers need emptying
// when a router is reconfigured; the states and transitions are this
// design's. Synchronous active-low reset to ACTIVE.
module port_fsm
  import noc_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        fault,
  input  logic        ob_empty,
  output port_state_e state,
  output logic        port_ok,
  output logic        loop_en
);
  port_state_e nxt;

  always_comb begin
    nxt = state;
    case (state)
      PS_ACTIVE:   if (fault)    nxt = PS_DRAIN;
      PS_DRAIN:    if (ob_empty) nxt = PS_DISABLED;
      PS_DISABLED: if (!fault)   nxt = PS_ACTIVE;
      default:                   nxt = PS_ACTIVE;
    endcase
  end

  always_ff @(posedge clk) begin
    if (!rst_n) state <= PS_ACTIVE;
    else        state <= nxt;
  end

  assign port_ok = (state == PS_ACTIVE);
  assign loop_en = (state != PS_ACTIVE);
endmodule
