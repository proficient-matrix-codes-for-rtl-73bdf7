// tb_loopback_module: self-checking test of the per-port link / self-loop
// switch. For random flits and every combination of the handshake inputs it
// checks, in normal mode, that the link feeds the input path and the output
// buffer drives the link, and in loopback mode that the link is cut in both
// directions and the output buffer's head is returned into the input path.
// Combinational DUT; watchdog.
module tb_loopback_module;
  import noc_pkg::*;
  int checks = 0, failures = 0;
  logic  loop_en, lnk_in_valid, lnk_in_ready, lnk_out_valid, lnk_out_ready;
  logic  ob_valid, ob_pop, ip_valid, ip_looped, ip_ready;
  flit_t lnk_in_flit, lnk_out_flit, ob_flit, ip_flit;

  loopback_module dut (.*);

  task automatic chk(input string what, input logic [$bits(flit_t)-1:0] got,
                     input logic [$bits(flit_t)-1:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic flit_t rnd_flit();
    flit_t f;
    f = flit_t'({$urandom, $urandom, $urandom, $urandom, $urandom});
    return f;
  endfunction

  initial begin
    #100000; failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 50; n++) begin
      for (int c = 0; c < 32; c++) begin
        {loop_en, lnk_in_valid, lnk_out_ready, ob_valid, ip_ready} = 5'(c);
        lnk_in_flit = rnd_flit(); ob_flit = rnd_flit();
        #1;
        chk("out flit", lnk_out_flit, ob_flit);
        if (!loop_en) begin
          chk("ip_valid", 1'(ip_valid), lnk_in_valid);
          chk("ip_flit", ip_flit, lnk_in_flit);
          chk("looped", 1'(ip_looped), 1'b0);
          chk("in_ready", 1'(lnk_in_ready), ip_ready);
          chk("out_valid", 1'(lnk_out_valid), ob_valid);
          chk("ob_pop", 1'(ob_pop), ob_valid & lnk_out_ready);
        end else begin
          chk("ip_valid L", 1'(ip_valid), ob_valid);
          chk("ip_flit L", ip_flit, ob_flit);
          chk("looped L", 1'(ip_looped), 1'b1);
          chk("in_ready L", 1'(lnk_in_ready), 1'b0);
          chk("out_valid L", 1'(lnk_out_valid), 1'b0);
          chk("ob_pop L", 1'(ob_pop), ob_valid & ip_ready);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
