// noc_pkg: types and constants shared by the 8-port PrMC router.
//
// The router has eight ports, one per compass direction of a 2-D mesh with
// diagonal links. Directions are numbered clockwise from north so that the
// opposite of direction d is (d + 4) mod 8. A flit carries a small routing
// header and a 64-bit payload protected by the proficient matrix code (PrMC):
// the payload is viewed as two rows of DATA_W/2 bits, with one horizontal
// parity bit per row (H) and one vertical parity bit per column (V), i.e.
// DATA_W/2 + 2 check bits. The 64-bit width and the check-bit count follow
// the document; the header layout (destination coordinates and the direction
// of the previous hop) and the 4-bit coordinates are this design's choice.
package noc_pkg;

  localparam int NPORTS  = 8;
  localparam int DATA_W  = 64;          // PrMC payload width
  localparam int V_W     = DATA_W / 2;  // vertical check bits (one per column)
  localparam int H_W     = 2;           // horizontal check bits (one per row)
  localparam int COORD_W = 4;           // mesh coordinate width (up to 16 x 16)

  typedef enum logic [2:0] {
    DIR_N  = 3'd0,
    DIR_NE = 3'd1,
    DIR_E  = 3'd2,
    DIR_SE = 3'd3,
    DIR_S  = 3'd4,
    DIR_SW = 3'd5,
    DIR_W  = 3'd6,
    DIR_NW = 3'd7
  } dir_e;

  // PrMC code word as stored in buffers and sent over links.
  typedef struct packed {
    logic [DATA_W-1:0] data;
    logic [H_W-1:0]    h;
    logic [V_W-1:0]    v;
  } prmc_cw_t;

  typedef struct packed {
    logic [COORD_W-1:0] dst_x;
    logic [COORD_W-1:0] dst_y;
    dir_e               prev;   // output direction taken at the previous router
  } hdr_t;

  typedef struct packed {
    hdr_t     hdr;
    prmc_cw_t cw;
  } flit_t;

  // Per-port operating mode, driven by the port FSM.
  typedef enum logic [1:0] {
    PS_ACTIVE   = 2'd0,  // link in use
    PS_DRAIN    = 2'd1,  // link unavailable, pending output packets looped back
    PS_DISABLED = 2'd2   // link unavailable and output buffer empty
  } port_state_e;

  function automatic dir_e opposite(input dir_e d);
    return dir_e'(3'(d + 3'd4));
  endfunction

  // Unit step of a direction: x grows to the east, y grows to the north.
  function automatic logic signed [1:0] step_x(input dir_e d);
    case (d)
      DIR_NE, DIR_E, DIR_SE: return 2'sd1;
      DIR_NW, DIR_W, DIR_SW: return -2'sd1;
      default:               return 2'sd0;
    endcase
  endfunction

  function automatic logic signed [1:0] step_y(input dir_e d);
    case (d)
      DIR_NW, DIR_N, DIR_NE: return 2'sd1;
      DIR_SW, DIR_S, DIR_SE: return -2'sd1;
      default:               return 2'sd0;
    endcase
  endfunction

endpackage
