// tb_prmc_encoder: self-checking test of the PrMC encoder at the four data
// widths of the code comparison (8, 16, 32, 64 bits).
// For random and corner-case words it recomputes, bit by bit, the parity of
// each half-word row and the XOR of each column pair, compares them with the
// encoder, and checks that the number of check bits is DATA_W/2 + 2
// (6, 10, 18, 34). Purely combinational DUTs; a watchdog ends the run.
module tb_prmc_encoder;
  int checks = 0, failures = 0;

  logic [7:0]  d8;  logic [1:0] h8;  logic [3:0]  v8;
  logic [15:0] d16; logic [1:0] h16; logic [7:0]  v16;
  logic [31:0] d32; logic [1:0] h32; logic [15:0] v32;
  logic [63:0] d64; logic [1:0] h64; logic [31:0] v64;

  prmc_encoder #(.DATA_W(8))  u8  (.d(d8),  .h(h8),  .v(v8));
  prmc_encoder #(.DATA_W(16)) u16 (.d(d16), .h(h16), .v(v16));
  prmc_encoder #(.DATA_W(32)) u32 (.d(d32), .h(h32), .v(v32));
  prmc_encoder #(.DATA_W(64)) u64 (.d(d64), .h(h64), .v(v64));

  // Reference: row r = bits [r*W/2 +: W/2]; column i = bits i and i+W/2.
  function automatic void ref_code(input logic [63:0] d, input int w,
                                   output logic [1:0] h, output logic [31:0] v);
    h = '0; v = '0;
    for (int i = 0; i < w; i++) begin
      if (i < w/2) h[0] = h[0] ^ d[i];
      else         h[1] = h[1] ^ d[i];
    end
    for (int i = 0; i < w/2; i++) v[i] = d[i] ^ d[i + w/2];
  endfunction

  task automatic check(input string what, input logic [63:0] got, input logic [63:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [1:0]  eh;
    logic [31:0] ev;
    logic [63:0] pat;
    // redundancy of the code at each width
    check("r8",  64'($bits(h8)  + $bits(v8)),  64'd6);
    check("r16", 64'($bits(h16) + $bits(v16)), 64'd10);
    check("r32", 64'($bits(h32) + $bits(v32)), 64'd18);
    check("r64", 64'($bits(h64) + $bits(v64)), 64'd34);
    for (int n = 0; n < 400; n++) begin
      if (n == 0)      pat = '0;
      else if (n == 1) pat = '1;
      else if (n < 66) pat = 64'd1 << (n - 2);
      else             pat = {$urandom, $urandom};
      d8 = pat[7:0]; d16 = pat[15:0]; d32 = pat[31:0]; d64 = pat;
      #1;
      ref_code(64'(d8), 8, eh, ev);
      check("h8", 64'(h8), 64'(eh));   check("v8", 64'(v8), 64'(ev[3:0]));
      ref_code(64'(d16), 16, eh, ev);
      check("h16", 64'(h16), 64'(eh)); check("v16", 64'(v16), 64'(ev[7:0]));
      ref_code(64'(d32), 32, eh, ev);
      check("h32", 64'(h32), 64'(eh)); check("v32", 64'(v32), 64'(ev[15:0]));
      ref_code(d64, 64, eh, ev);
      check("h64", 64'(h64), 64'(eh)); check("v64", 64'(v64), 64'(ev));
    end
    // the worked example of the document's horizontal-bit drawing:
    // h0 = d0^d1^d2^d3, h1 = d4^d5^d6^d7
    d8 = 8'b0111_0001; #1;
    check("fig h", 64'(h8), 64'(2'b11));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
