// prmc_encoder: proficient matrix code (PrMC) encoder.
//
// The DATA_W-bit word is laid out as a 2 x (DATA_W/2) bit matrix: row 0 holds
// bits [DATA_W/2-1:0] and row 1 holds bits [DATA_W-1:DATA_W/2], so column i
// contains d[i] and d[i+DATA_W/2].
//   h[r] = XOR of all bits of row r           (horizontal check bits)
//   v[i] = d[i] XOR d[i+DATA_W/2]             (vertical check bits)
// That gives DATA_W/2 + 2 check bits: 6, 10, 18 and 34 for 8, 16, 32 and 64
// data bits, the redundancy the document reports for the code. The XOR-tree
// row parity (h0 from d0..d3, h1 from d4..d7 for an 8-bit word) follows the
// document's drawing of the horizontal bits; the vertical bits as
// column-wise XOR of the two rows follow its matrix layout. Purely
// combinational, no clock. The same module is reused inside the decoder as
// its partial encoder.
module prmc_encoder #(
  parameter int DATA_W = 64
) (
  input  logic [DATA_W-1:0]   d,
  output logic [1:0]          h,
  output logic [DATA_W/2-1:0] v
);
  localparam int ROW_W = DATA_W / 2;

  always_comb begin
    h[0] = ^d[ROW_W-1:0];
    h[1] = ^d[DATA_W-1:ROW_W];
    v    = d[ROW_W-1:0] ^ d[DATA_W-1:ROW_W];
  end

  initial begin
    assert (DATA_W % 2 == 0 && DATA_W >= 4)
      else $error("prmc_encoder: DATA_W must be even and at least 4");
  end
endmodule
