// tb_routing_error_detect: self-checking test of the per-port routing error
// detector, for two port directions. Random headers are applied with valid,
// looped and from-PE combinations; the reference computes the expected
// arrival direction and whether the previous hop moved the packet toward its
// destination from the (dx, dy) steps of the eight directions. Correct and
// corrupted headers must both be seen. Combinational DUT; watchdog.
module tb_routing_error_detect;
  import noc_pkg::*;
  int checks = 0, failures = 0;
  logic valid, looped, from_pe, err_e, err_sw;
  logic [COORD_W-1:0] my_x, my_y;
  hdr_t hdr;
  int n_ok = 0, n_err = 0;

  routing_error_detect #(.MY_DIR(DIR_E))  dut_e  (.valid, .looped, .from_pe, .my_x, .my_y, .hdr, .route_err(err_e));
  routing_error_detect #(.MY_DIR(DIR_SW)) dut_sw (.valid, .looped, .from_pe, .my_x, .my_y, .hdr, .route_err(err_sw));

  int sxv[8] = '{0, 1, 1, 1, 0, -1, -1, -1};
  int syv[8] = '{1, 1, 0, -1, -1, -1, 0, 1};

  function automatic int ref_err(int port);
    int arrive, mx, my, tow;
    if (!valid || (from_pe && !looped)) return 0;
    arrive = looped ? port : (port + 4) % 8;
    if (int'(hdr.prev) != arrive) return 1;
    if (looped) return 0;
    mx = sxv[hdr.prev]; my = syv[hdr.prev];
    tow = (mx == 1 && hdr.dst_x >= my_x) || (mx == -1 && hdr.dst_x <= my_x) ||
          (my == 1 && hdr.dst_y >= my_y) || (my == -1 && hdr.dst_y <= my_y);
    return tow ? 0 : 1;
  endfunction

  task automatic chk(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0d exp %0d", what, got, exp); end
  endtask

  initial begin
    #100000; failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int e;
    for (int n = 0; n < 20000; n++) begin
      valid = ($urandom_range(7) != 0);
      looped = ($urandom_range(3) == 0);
      from_pe = ($urandom_range(3) == 0);
      my_x = COORD_W'($urandom); my_y = COORD_W'($urandom);
      hdr.dst_x = COORD_W'($urandom); hdr.dst_y = COORD_W'($urandom);
      // mostly plausible previous directions
      case ($urandom_range(2))
        0: hdr.prev = DIR_W;            // correct arrival at E port
        1: hdr.prev = DIR_NE;           // correct arrival at SW port
        default: hdr.prev = dir_e'($urandom_range(7));
      endcase
      #1;
      e = ref_err(2); chk("E port", err_e, e);
      if (e) n_err++; else n_ok++;
      e = ref_err(5); chk("SW port", err_sw, e);
    end
    chk("saw good", n_ok > 0, 1);
    chk("saw bad", n_err > 0, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
