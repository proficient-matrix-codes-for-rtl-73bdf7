// routing_logic: adaptive XY routing over eight directions.
//
// From the signs of dx = dst_x - my_x and dy = dst_y - my_y the block picks a
// preferred output and two productive alternatives:
//   dx != 0, dy != 0 : diagonal (e.g. NE), then the x direction, then y;
//   dy == 0          : straight x (e.g. E), then the two diagonals on that side;
//   dx == 0          : straight y (e.g. N), then the two diagonals on that side;
//   dx == 0, dy == 0 : the port the local processing element is attached to.
// The first candidate whose port is available (port_ok) and that is not the
// processing-element port is taken. If none is available route_valid stays
// low and the packet waits in its input buffer. Use of XY routing, diagonal
// directions, avoidance of unavailable ports and a processing element
// attachable to any side follow the document; the candidate order is this
// design's choice. Combinational.
module routing_logic
  import noc_pkg::*;
(
  input  logic [COORD_W-1:0] my_x,
  input  logic [COORD_W-1:0] my_y,
  input  logic [COORD_W-1:0] dst_x,
  input  logic [COORD_W-1:0] dst_y,
  input  logic [NPORTS-1:0]  port_ok,
  input  dir_e               pe_port,
  output logic               route_valid,
  output dir_e               route_dir,
  output logic               is_local
);
  function automatic dir_e dir_of(input logic signed [1:0] sx, input logic signed [1:0] sy);
    case ({sx, sy})
      {2'sd0,  2'sd1}: return DIR_N;
      {2'sd1,  2'sd1}: return DIR_NE;
      {2'sd1,  2'sd0}: return DIR_E;
      {2'sd1, -2'sd1}: return DIR_SE;
      {2'sd0, -2'sd1}: return DIR_S;
      {-2'sd1,-2'sd1}: return DIR_SW;
      {-2'sd1, 2'sd0}: return DIR_W;
      default:         return DIR_NW;
    endcase
  endfunction

  logic signed [1:0] ex, ey;
  dir_e              cand [3];

  always_comb begin
    ex = (dst_x > my_x) ? 2'sd1 : (dst_x < my_x) ? -2'sd1 : 2'sd0;
    ey = (dst_y > my_y) ? 2'sd1 : (dst_y < my_y) ? -2'sd1 : 2'sd0;
    is_local = (ex == 2'sd0) && (ey == 2'sd0);

    if (ex != 2'sd0 && ey != 2'sd0) begin
      cand[0] = dir_of(ex, ey);
      cand[1] = dir_of(ex, 2'sd0);
      cand[2] = dir_of(2'sd0, ey);
    end else if (ey == 2'sd0) begin
      cand[0] = dir_of(ex, 2'sd0);
      cand[1] = dir_of(ex, 2'sd1);
      cand[2] = dir_of(ex, -2'sd1);
    end else begin
      cand[0] = dir_of(2'sd0, ey);
      cand[1] = dir_of(2'sd1, ey);
      cand[2] = dir_of(-2'sd1, ey);
    end

    route_valid = 1'b0;
    route_dir   = pe_port;
    if (is_local) begin
      route_valid = port_ok[pe_port];
    end else begin
      for (int i = 2; i >= 0; i--) begin
        if (port_ok[cand[i]] && cand[i] != pe_port) begin
          route_valid = 1'b1;
          route_dir   = cand[i];
        end
      end
    end
  end
endmodule
