// tb_prmc_decoder: self-checking test of the PrMC decoder (64 and 8 bits).
// Code words are built by a reference model inside the testbench, then hit
// by error patterns of known class: none, one data bit, an odd adjacent
// burst inside one row (up to the full 32-bit row), scattered odd errors in
// one row, one H bit, one V bit, an even burst in one row, errors in both
// rows. Corrected data and the detected / corrected / uncorrectable flags
// are compared with what each class must produce; en = 0 must pass the
// word through unflagged. Combinational DUT; a watchdog ends the run.
module tb_prmc_decoder;
  localparam int W = 64, R = W/2;
  int checks = 0, failures = 0;

  logic          en;
  logic [W-1:0]  d_in, d_out;
  logic [1:0]    h_in, dh;
  logic [R-1:0]  v_in, s;
  logic          det, cor, unc;

  prmc_decoder #(.DATA_W(W)) dut (
    .en(en), .d_in(d_in), .h_in(h_in), .v_in(v_in), .d_out(d_out), .dh(dh), .s(s),
    .err_detected(det), .err_corrected(cor), .err_uncorrectable(unc));

  // small instance: 8-bit word, rows d[3:0] and d[7:4]
  logic [7:0] d8_in, d8_out; logic [1:0] h8_in, dh8; logic [3:0] v8_in, s8;
  logic det8, cor8, unc8;
  prmc_decoder #(.DATA_W(8)) dut8 (
    .en(1'b1), .d_in(d8_in), .h_in(h8_in), .v_in(v8_in), .d_out(d8_out), .dh(dh8), .s(s8),
    .err_detected(det8), .err_corrected(cor8), .err_uncorrectable(unc8));

  function automatic void enc(input logic [W-1:0] d, output logic [1:0] h, output logic [R-1:0] v);
    h = '0; v = '0;
    for (int i = 0; i < R; i++) begin
      h[0] ^= d[i];
      h[1] ^= d[i+R];
      v[i] = d[i] ^ d[i+R];
    end
  endfunction

  task automatic expect_eq(input string what, input logic [W-1:0] got, input logic [W-1:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  // apply a code word with data error mask de, H mask he, V mask ve
  task automatic run(input string cls, input logic [W-1:0] d, input logic [W-1:0] de,
                     input logic [1:0] he, input logic [R-1:0] ve,
                     input logic exp_fix, input logic exp_det, input logic exp_cor,
                     input logic exp_unc);
    logic [1:0] h; logic [R-1:0] v;
    enc(d, h, v);
    en = 1'b1; d_in = d ^ de; h_in = h ^ he; v_in = v ^ ve;
    #1;
    expect_eq({cls, " data"}, d_out, exp_fix ? d : d ^ de);
    expect_eq({cls, " det"}, W'(det), W'(exp_det));
    expect_eq({cls, " cor"}, W'(cor), W'(exp_cor));
    expect_eq({cls, " unc"}, W'(unc), W'(exp_unc));
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] d, m;
    int pos, len, row;
    for (int n = 0; n < 300; n++) begin
      d = {$urandom, $urandom};
      run("clean", d, '0, 2'b00, '0, 1, 0, 0, 0);
      pos = $urandom_range(W-1);
      run("single", d, W'(1) << pos, 2'b00, '0, 1, 1, 1, 0);
      // odd adjacent burst inside one row
      row = $urandom_range(1);
      len = 2 * $urandom_range(15) + 1;
      pos = $urandom_range(R - len);
      m = ((W'(1) << len) - 1) << (pos + row * R);
      run("odd burst", d, m, 2'b00, '0, 1, 1, 1, 0);
      // whole-row burst of 32 bits is even: detected only
      // odd scattered errors in one row
      m = '0;
      for (int k = 0; k < 3; k++) m[row*R + $urandom_range(R-1)] ^= 1'b1;
      if ($countones(m) % 2 == 1) run("odd scatter", d, m, 2'b00, '0, 1, 1, 1, 0);
      // single check-bit errors
      run("h bit", d, '0, 2'b01 << $urandom_range(1), '0, 1, 1, 1, 0);
      run("v bit", d, '0, 2'b00, R'(1) << $urandom_range(R-1), 1, 1, 1, 0);
      // even burst in one row
      len = 2 * $urandom_range(1, 15);
      pos = $urandom_range(R - len);
      m = ((W'(1) << len) - 1) << (pos + row * R);
      run("even burst", d, m, 2'b00, '0, 0, 1, 0, 1);
      // one error in each row, different columns
      pos = $urandom_range(R-2);
      m = (W'(1) << pos) | (W'(1) << (R + pos + 1));
      run("two rows", d, m, 2'b00, '0, 0, 1, 0, 1);
      // enable low: pass through untouched
      run("x", d, '0, 2'b00, '0, 1, 0, 0, 0);
      en = 1'b0; d_in = d ^ 64'h10; #1;
      expect_eq("en=0 data", d_out, d ^ 64'h10);
      expect_eq("en=0 det", W'(det), '0);
    end
    // 8-bit instance: three adjacent errors in row 1 corrected
    d8_in = 8'hA5 ^ 8'b0111_0000;
    h8_in = {^(8'hA5 >> 4), ^(8'hA5 & 8'h0F)};
    v8_in = 4'h5 ^ 4'hA;
    #1;
    expect_eq("w8 data", W'(d8_out), W'(8'hA5));
    expect_eq("w8 cor", W'(cor8), W'(1));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
