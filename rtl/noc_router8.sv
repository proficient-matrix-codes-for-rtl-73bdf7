// noc_router8: 8-port network-on-chip router protected by the proficient
// matrix code (PrMC).
//
// The router sits in a 2-D mesh with diagonal links and has one port per
// direction N, NE, E, SE, S, SW, W, NW (index = dir_e value). A processing
// element can be attached to any one of them (pe_port); packets addressed to
// (my_x, my_y) leave through that port and packets entering through it are
// the element's own. Each port (router_port) checks and corrects the PrMC
// code word of every arriving flit, checks the route it took, buffers it,
// routes it adaptively around ports that are out of service and, when its
// own link fails, loops its pending output back into the router. A central
// switch control allocates output ports round-robin and moves up to eight
// flits per cycle through the crossbar; an error journal counts corrected,
// uncorrectable and routing errors per port.
// Links use a valid/ready handshake: a flit moves on an edge where valid and
// ready are both high. port_fault[d] reports that the link or neighbour in
// direction d is unavailable (tie it high on mesh edges). All state is reset
// by a synchronous active-low rst_n. Eight ports, 64-bit PrMC-protected data,
// store-and-forward switching, loopback, routing error detection, FSMs and
// the journal follow the document; handshake, header, buffer depths and
// arbitration are this design's choices. The prev field of out_flit[d] is
// always d (each port stamps its own direction), so those bits are constant
// by design.
module noc_router8
  import noc_pkg::*;
#(
  parameter int IN_DEPTH  = 8,
  parameter int OUT_DEPTH = 2,
  parameter int CNT_W     = 16
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [COORD_W-1:0] my_x,
  input  logic [COORD_W-1:0] my_y,
  input  dir_e               pe_port,
  input  logic               ecc_en,
  input  logic [NPORTS-1:0]  port_fault,
  // links, one per direction
  input  logic               in_valid  [NPORTS],
  input  flit_t              in_flit   [NPORTS],
  output logic               in_ready  [NPORTS],
  output logic               out_valid [NPORTS],
  output flit_t              out_flit  [NPORTS],
  input  logic               out_ready [NPORTS],
  // status
  output port_state_e        port_state [NPORTS],
  output logic [NPORTS-1:0]  port_blocked,
  // error journal
  input  logic               journal_clear,
  output logic [CNT_W-1:0]   cnt_corr  [NPORTS],
  output logic [CNT_W-1:0]   cnt_unc   [NPORTS],
  output logic [CNT_W-1:0]   cnt_rte   [NPORTS],
  output dir_e               last_err_port,
  output logic [2:0]         last_err_kind,
  output logic               any_err
);
  logic [NPORTS-1:0] port_ok;
  logic  req_valid [NPORTS];
  dir_e  req_dir   [NPORTS];
  flit_t head_flit [NPORTS];
  logic  grant     [NPORTS];
  logic  xb_push   [NPORTS];
  flit_t xb_flit   [NPORTS];
  logic  ob_full   [NPORTS];
  logic  ev_corr   [NPORTS];
  logic  ev_unc    [NPORTS];
  logic  ev_rte    [NPORTS];

  for (genvar p = 0; p < NPORTS; p++) begin : g_port
    router_port #(
      .MY_DIR    (dir_e'(p)),
      .IN_DEPTH  (IN_DEPTH),
      .OUT_DEPTH (OUT_DEPTH)
    ) u_port (
      .clk         (clk),
      .rst_n       (rst_n),
      .my_x        (my_x),
      .my_y        (my_y),
      .pe_port     (pe_port),
      .ecc_en      (ecc_en),
      .fault       (port_fault[p]),
      .in_valid    (in_valid[p]),
      .in_flit     (in_flit[p]),
      .in_ready    (in_ready[p]),
      .out_valid   (out_valid[p]),
      .out_flit    (out_flit[p]),
      .out_ready   (out_ready[p]),
      .port_ok_all (port_ok),
      .port_ok     (port_ok[p]),
      .state       (port_state[p]),
      .req_valid   (req_valid[p]),
      .req_dir     (req_dir[p]),
      .head_flit   (head_flit[p]),
      .grant       (grant[p]),
      .xb_push     (xb_push[p]),
      .xb_flit     (xb_flit[p]),
      .ob_full     (ob_full[p]),
      .ev_corr     (ev_corr[p]),
      .ev_unc      (ev_unc[p]),
      .ev_rte      (ev_rte[p]),
      .blocked     (port_blocked[p])
    );
  end

  switch_control u_ctrl (
    .clk       (clk),
    .rst_n     (rst_n),
    .req_valid (req_valid),
    .req_dir   (req_dir),
    .in_flit   (head_flit),
    .ob_full   (ob_full),
    .grant     (grant),
    .xb_push   (xb_push),
    .xb_flit   (xb_flit)
  );

  error_journal #(.CNT_W(CNT_W)) u_journal (
    .clk       (clk),
    .rst_n     (rst_n),
    .clear     (journal_clear),
    .ev_corr   (ev_corr),
    .ev_unc    (ev_unc),
    .ev_rte    (ev_rte),
    .cnt_corr  (cnt_corr),
    .cnt_unc   (cnt_unc),
    .cnt_rte   (cnt_rte),
    .last_port (last_err_port),
    .last_kind (last_err_kind),
    .any_err   (any_err)
  );
endmodule
