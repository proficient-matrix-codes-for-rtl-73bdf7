// routing_error_detect: checks that a packet reached this port by a legal hop.
//
// Every router writes, into the header of each packet it sends, the
// direction of the output port it used (hdr.prev). When the packet arrives,
// this block confirms the route taken through the previously crossed switch:
//   * a packet arriving on the port facing direction MY_DIR must have been
//     sent in the opposite direction (a looped-back packet must carry
//     MY_DIR itself);
//   * the hop must have brought the packet closer to its destination in at
//     least one coordinate (x grows eastwards, y northwards).
// A packet entering from the local processing element, or through the
// self-loop, is exempt from the second rule, and one from the local element
// from both. The principle (the previous switch's decision carried in the
// header and checked per port) follows the document; the exact rules are
// this design's. Combinational; route_err is qualified by valid.
module routing_error_detect
  import noc_pkg::*;
#(
  parameter dir_e MY_DIR = DIR_N
) (
  input  logic               valid,
  input  logic               looped,
  input  logic               from_pe,
  input  logic [COORD_W-1:0] my_x,
  input  logic [COORD_W-1:0] my_y,
  input  hdr_t               hdr,
  output logic               route_err
);
  dir_e             expected;
  logic signed [1:0] sx, sy;
  logic             toward;

  always_comb begin
    expected = looped ? MY_DIR : opposite(MY_DIR);
    sx = step_x(hdr.prev);
    sy = step_y(hdr.prev);
    toward = (sx ==  2'sd1 && hdr.dst_x >= my_x) ||
             (sx == -2'sd1 && hdr.dst_x <= my_x) ||
             (sy ==  2'sd1 && hdr.dst_y >= my_y) ||
             (sy == -2'sd1 && hdr.dst_y <= my_y);
    route_err = 1'b0;
    if (valid && !(from_pe && !looped)) begin
      if (hdr.prev != expected)  route_err = 1'b1;
      else if (!looped && !toward) route_err = 1'b1;
    end
  end
endmodule
