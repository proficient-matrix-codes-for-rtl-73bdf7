// prmc_decoder: proficient matrix code (PrMC) decoder and corrector.
//
// Structure follows the document's decoder drawing: a partial encoder
// (prmc_encoder) recomputes H' and V' from the received data, XOR gates form
// the horizontal syndrome dH = H' ^ H and the vertical syndrome S = V' ^ V,
// an error detection and location stage decides what happened, and an error
// correction stage flips the bits.
//   * dH names the row that holds an odd number of errors; S names the
//     columns. With exactly one bit of dH set and S non-zero, every bit of
//     that row whose column is set in S is inverted, so any number of errors
//     confined to one row (an adjacent burst of up to DATA_W/2 bits, for
//     instance) is corrected when their count is odd.
//   * S zero and dH non-zero: only check bits were hit; the data is kept.
//   * dH zero and exactly one bit of S set: a single vertical check bit was
//     hit; the data is kept.
//   * Anything else with a non-zero syndrome (an even number of errors in
//     one row, errors in both rows) is flagged as detected but uncorrectable
//     and the data is passed on unchanged.
// The handling of the last three cases is this design's choice; the document
// only says the horizontal syndrome locates the error and the vertical one
// resolves it. When en is low the data passes through untouched and no flag
// is raised (the document's decoder has an En input). Purely combinational.
module prmc_decoder #(
  parameter int DATA_W = 64
) (
  input  logic                en,
  input  logic [DATA_W-1:0]   d_in,
  input  logic [1:0]          h_in,
  input  logic [DATA_W/2-1:0] v_in,
  output logic [DATA_W-1:0]   d_out,
  output logic [1:0]          dh,          // horizontal syndrome
  output logic [DATA_W/2-1:0] s,           // vertical syndrome
  output logic                err_detected,
  output logic                err_corrected,
  output logic                err_uncorrectable
);
  localparam int ROW_W = DATA_W / 2;

  logic [1:0]       h_re;
  logic [ROW_W-1:0] v_re;

  prmc_encoder #(.DATA_W(DATA_W)) u_partial_enc (
    .d (d_in),
    .h (h_re),
    .v (v_re)
  );

  logic s_nz, s_one;

  always_comb begin
    dh   = h_re ^ h_in;
    s    = v_re ^ v_in;
    s_nz = |s;
    s_one = s_nz && ((s & (s - ROW_W'(1))) == '0);

    d_out             = d_in;
    err_detected      = 1'b0;
    err_corrected     = 1'b0;
    err_uncorrectable = 1'b0;

    if (en && (s_nz || dh != 2'b00)) begin
      err_detected = 1'b1;
      if (s_nz && dh == 2'b01) begin
        d_out[ROW_W-1:0] = d_in[ROW_W-1:0] ^ s;
        err_corrected    = 1'b1;
      end else if (s_nz && dh == 2'b10) begin
        d_out[DATA_W-1:ROW_W] = d_in[DATA_W-1:ROW_W] ^ s;
        err_corrected         = 1'b1;
      end else if (!s_nz || (dh == 2'b00 && s_one)) begin
        err_corrected = 1'b1;   // check bits only, data intact
      end else begin
        err_uncorrectable = 1'b1;
      end
    end
  end
endmodule
