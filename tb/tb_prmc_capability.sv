// tb_prmc_capability: the code comparison workload - PrMC at 8, 16, 32 and
// 64 data bits. For every width it checks the code-word size and code rate
// (k / (k + k/2 + 2)), then tries every adjacent error burst of every length
// at every position inside each row: bursts of odd length must be
// corrected, bursts of even length must be flagged uncorrectable and left
// unchanged. It also tries every single error anywhere in the code word
// (data, H and V bits): the data must always come out right. It reports, per
// width, the longest adjacent burst corrected, which must be W/2 - 1 (the
// longest odd burst that fits in a row). Combinational DUTs; watchdog.
module tb_prmc_capability;
  int checks = 0, failures = 0;

  logic [7:0]  d8i,  d8o;  logic [1:0] h8,  dh8;  logic [3:0]  v8,  s8;  logic de8,  co8,  un8;
  logic [15:0] d16i, d16o; logic [1:0] h16, dh16; logic [7:0]  v16, s16; logic de16, co16, un16;
  logic [31:0] d32i, d32o; logic [1:0] h32, dh32; logic [15:0] v32, s32; logic de32, co32, un32;
  logic [63:0] d64i, d64o; logic [1:0] h64, dh64; logic [31:0] v64, s64; logic de64, co64, un64;

  prmc_decoder #(.DATA_W(8))  u8  (.en(1'b1), .d_in(d8i),  .h_in(h8),  .v_in(v8),  .d_out(d8o),  .dh(dh8),  .s(s8),
                                   .err_detected(de8),  .err_corrected(co8),  .err_uncorrectable(un8));
  prmc_decoder #(.DATA_W(16)) u16 (.en(1'b1), .d_in(d16i), .h_in(h16), .v_in(v16), .d_out(d16o), .dh(dh16), .s(s16),
                                   .err_detected(de16), .err_corrected(co16), .err_uncorrectable(un16));
  prmc_decoder #(.DATA_W(32)) u32 (.en(1'b1), .d_in(d32i), .h_in(h32), .v_in(v32), .d_out(d32o), .dh(dh32), .s(s32),
                                   .err_detected(de32), .err_corrected(co32), .err_uncorrectable(un32));
  prmc_decoder #(.DATA_W(64)) u64 (.en(1'b1), .d_in(d64i), .h_in(h64), .v_in(v64), .d_out(d64o), .dh(dh64), .s(s64),
                                   .err_detected(de64), .err_corrected(co64), .err_uncorrectable(un64));

  // drive one width: data word d with error mask e on data, eh on H, ev on V
  task automatic apply(input int w, input logic [63:0] d, input logic [63:0] e,
                       input logic [1:0] eh, input logic [31:0] ev,
                       output logic [63:0] dout, output logic cor, output logic unc);
    logic [1:0] h; logic [31:0] v;
    h = '0; v = '0;
    for (int i = 0; i < w/2; i++) begin
      h[0] ^= d[i]; h[1] ^= d[i + w/2]; v[i] = d[i] ^ d[i + w/2];
    end
    h ^= eh; v ^= ev;
    case (w)
      8:  begin d8i  = 8'(d ^ e);  h8  = h; v8  = v[3:0];  end
      16: begin d16i = 16'(d ^ e); h16 = h; v16 = v[7:0];  end
      32: begin d32i = 32'(d ^ e); h32 = h; v32 = v[15:0]; end
      default: begin d64i = d ^ e; h64 = h; v64 = v; end
    endcase
    #1;
    case (w)
      8:  begin dout = 64'(d8o);  cor = co8;  unc = un8;  end
      16: begin dout = 64'(d16o); cor = co16; unc = un16; end
      32: begin dout = 64'(d32o); cor = co32; unc = un32; end
      default: begin dout = d64o; cor = co64; unc = un64; end
    endcase
  endtask

  task automatic chk(input string what, input logic ok);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    #10000000; failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int widths[4] = '{8, 16, 32, 64};
    int exp_r[4]  = '{6, 10, 18, 34};
    for (int wi = 0; wi < 4; wi++) begin
      int w, r, maxburst;
      logic [63:0] d, e, dmask, dout;
      logic cor, unc;
      w = widths[wi];
      r = w/2 + 2;
      dmask = (w == 64) ? '1 : ((64'd1 << w) - 1);
      chk($sformatf("r for k=%0d", w), r == exp_r[wi]);
      maxburst = 0;
      for (int trial = 0; trial < 4; trial++) begin
        d = {$urandom, $urandom} & dmask;
        for (int row = 0; row < 2; row++)
          for (int len = 1; len <= w/2; len++)
            for (int pos = 0; pos + len <= w/2; pos++) begin
              e = ((64'd1 << len) - 1) << (pos + row * w/2);
              apply(w, d, e, 2'b00, '0, dout, cor, unc);
              if (len % 2 == 1) begin
                chk($sformatf("k=%0d odd burst len %0d corrected", w, len), dout == d && cor && !unc);
                if (dout == d && len > maxburst) maxburst = len;
              end else begin
                chk($sformatf("k=%0d even burst len %0d flagged", w, len), dout == (d ^ e) && unc);
              end
            end
        for (int b = 0; b < w + r; b++) begin
          logic [63:0] ed; logic [1:0] eh; logic [31:0] ev;
          ed = '0; eh = '0; ev = '0;
          if (b < w) ed[b] = 1'b1;
          else if (b < w + 2) eh[b - w] = 1'b1;
          else ev[b - w - 2] = 1'b1;
          apply(w, d, ed, eh, ev, dout, cor, unc);
          chk($sformatf("k=%0d single error at code bit %0d", w, b), dout == d && cor && !unc);
        end
      end
      chk($sformatf("k=%0d longest corrected burst", w), maxburst == w/2 - 1);
      $display("k=%0d r=%0d n=%0d code rate %0.2f%% longest adjacent burst corrected %0d",
               w, r, w + r, 100.0 * w / (w + r), maxburst);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
