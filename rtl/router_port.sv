// router_port: one of the eight ports of the PrMC router.
//
// Input side, in the order of the document's port diagram: the loopback
// module picks the link or the self-loop; the PrMC decoder checks and
// corrects the 64-bit payload of the arriving flit; the corrected data is
// re-encoded so that the input buffer holds a fresh code word (errors that
// strike while the flit sits in a buffer or crosses the next link are then
// corrected by the next decoder on its path); the routing error detector
// checks the header; the flit is written into the input buffer. The
// routing logic works on the flit at the head of the buffer and presents a
// request to the switch control; a grant pops it (store and forward: a flit
// is routed only once it is wholly in the buffer).
// Output side: the switch writes flits into the output buffer; its head,
// with hdr.prev set to this port's direction, goes to the link (or round the
// self-loop when the port FSM has taken the port out of service).
// Timing: a flit accepted on the link at edge t is in the input buffer after
// t, can be switched at t+1 and is offered on the output link from t+1 on,
// i.e. two cycles from link to link when there is no contention.
// ev_* pulse once per accepted flit.
module router_port
  import noc_pkg::*;
#(
  parameter dir_e MY_DIR    = DIR_N,
  parameter int   IN_DEPTH  = 8,
  parameter int   OUT_DEPTH = 2
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [COORD_W-1:0] my_x,
  input  logic [COORD_W-1:0] my_y,
  input  dir_e               pe_port,
  input  logic               ecc_en,
  input  logic               fault,
  // link
  input  logic               in_valid,
  input  flit_t              in_flit,
  output logic               in_ready,
  output logic               out_valid,
  output flit_t              out_flit,
  input  logic               out_ready,
  // router state
  input  logic [NPORTS-1:0]  port_ok_all,
  output logic               port_ok,
  output port_state_e        state,
  // switch control
  output logic               req_valid,
  output dir_e               req_dir,
  output flit_t              head_flit,
  input  logic               grant,
  input  logic               xb_push,
  input  flit_t              xb_flit,
  output logic               ob_full,
  // events
  output logic               ev_corr,
  output logic               ev_unc,
  output logic               ev_rte,
  output logic               blocked
);
  localparam int FW = $bits(flit_t);

  logic  loop_en;
  logic  ob_empty, ob_pop, ib_empty, ib_full;
  flit_t ob_head, ob_stamped;
  logic  ip_valid, ip_looped, ip_ready, ip_push;
  flit_t ip_flit, ib_wdata, ib_head;

  // ---- port FSM and loopback ---------------------------------------------
  port_fsm u_fsm (
    .clk      (clk),
    .rst_n    (rst_n),
    .fault    (fault),
    .ob_empty (ob_empty),
    .state    (state),
    .port_ok  (port_ok),
    .loop_en  (loop_en)
  );

  always_comb begin
    ob_stamped          = ob_head;
    ob_stamped.hdr.prev = MY_DIR;
  end

  loopback_module u_loop (
    .loop_en       (loop_en),
    .lnk_in_valid  (in_valid),
    .lnk_in_flit   (in_flit),
    .lnk_in_ready  (in_ready),
    .lnk_out_valid (out_valid),
    .lnk_out_flit  (out_flit),
    .lnk_out_ready (out_ready),
    .ob_valid      (!ob_empty),
    .ob_flit       (ob_stamped),
    .ob_pop        (ob_pop),
    .ip_valid      (ip_valid),
    .ip_flit       (ip_flit),
    .ip_looped     (ip_looped),
    .ip_ready      (ip_ready)
  );

  // ---- PrMC check, correction and re-encoding ------------------------------
  logic [DATA_W-1:0] d_fix;
  logic [H_W-1:0]    h_new, dh_unused;
  logic [V_W-1:0]    v_new, s_unused;
  logic              e_det, e_cor, e_unc, r_err;

  prmc_decoder #(.DATA_W(DATA_W)) u_dec (
    .en                (ecc_en),
    .d_in              (ip_flit.cw.data),
    .h_in              (ip_flit.cw.h),
    .v_in              (ip_flit.cw.v),
    .d_out             (d_fix),
    .dh                (dh_unused),
    .s                 (s_unused),
    .err_detected      (e_det),
    .err_corrected     (e_cor),
    .err_uncorrectable (e_unc)
  );

  prmc_encoder #(.DATA_W(DATA_W)) u_reenc (
    .d (d_fix),
    .h (h_new),
    .v (v_new)
  );

  routing_error_detect #(.MY_DIR(MY_DIR)) u_rte (
    .valid     (ip_valid),
    .looped    (ip_looped),
    .from_pe   (pe_port == MY_DIR),
    .my_x      (my_x),
    .my_y      (my_y),
    .hdr       (ip_flit.hdr),
    .route_err (r_err)
  );

  always_comb begin
    ib_wdata         = ip_flit;
    ib_wdata.cw.data = d_fix;
    if (ecc_en) begin
      ib_wdata.cw.h = h_new;
      ib_wdata.cw.v = v_new;
    end
  end

  assign ip_ready = !ib_full;
  assign ip_push  = ip_valid && ip_ready;
  assign ev_corr  = ip_push && e_det && e_cor;
  assign ev_unc   = ip_push && e_unc;
  assign ev_rte   = ip_push && r_err;

  // ---- input buffer and routing --------------------------------------------
  flit_fifo #(.WIDTH(FW), .DEPTH(IN_DEPTH)) u_ibuf (
    .clk     (clk),
    .rst_n   (rst_n),
    .push    (ip_push),
    .wr_data (ib_wdata),
    .pop     (grant),
    .rd_data (ib_head),
    .empty   (ib_empty),
    .full    (ib_full),
    .count   ()
  );

  logic route_ok, is_local_unused;
  dir_e route_dir;

  routing_logic u_route (
    .my_x        (my_x),
    .my_y        (my_y),
    .dst_x       (ib_head.hdr.dst_x),
    .dst_y       (ib_head.hdr.dst_y),
    .port_ok     (port_ok_all),
    .pe_port     (pe_port),
    .route_valid (route_ok),
    .route_dir   (route_dir),
    .is_local    (is_local_unused)
  );

  assign req_valid = !ib_empty && route_ok;
  assign req_dir   = route_dir;
  assign head_flit = ib_head;
  assign blocked   = !ib_empty && !route_ok;

  // ---- output buffer --------------------------------------------------------
  logic ob_full_w;
  flit_fifo #(.WIDTH(FW), .DEPTH(OUT_DEPTH)) u_obuf (
    .clk     (clk),
    .rst_n   (rst_n),
    .push    (xb_push),
    .wr_data (xb_flit),
    .pop     (ob_pop),
    .rd_data (ob_head),
    .empty   (ob_empty),
    .full    (ob_full_w),
    .count   ()
  );
  assign ob_full = ob_full_w;

  a_no_push_when_full: assert property (@(posedge clk) disable iff (!rst_n) xb_push |-> !ob_full_w);
  a_grant_needs_head:  assert property (@(posedge clk) disable iff (!rst_n) grant |-> !ib_empty);
endmodule
