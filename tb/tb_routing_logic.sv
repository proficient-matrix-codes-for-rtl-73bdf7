// tb_routing_logic: self-checking test of the adaptive 8-direction router.
// The reference describes every direction by its (dx, dy) unit step and
// ranks all eight directions independently of the DUT: for a destination
// (dx, dy) the preferred step is (sign dx, sign dy); the alternatives are the
// other steps whose components each either equal the preferred one or, where
// the preferred component is zero, are +-1 on the axis of travel, taken in the
// order: x-only / positive-y first. Random positions, destinations, port
// availability masks and processing-element ports are checked, plus local
// delivery and the blocked case. Combinational DUT; watchdog.
module tb_routing_logic;
  import noc_pkg::*;
  int checks = 0, failures = 0;
  logic [COORD_W-1:0] my_x, my_y, dst_x, dst_y;
  logic [NPORTS-1:0]  port_ok;
  dir_e               pe_port, route_dir;
  logic               route_valid, is_local;
  int n_pref = 0, n_alt = 0, n_block = 0, n_local = 0;

  routing_logic dut (.*);

  // step vectors of directions N, NE, E, SE, S, SW, W, NW
  int sxv[8] = '{0, 1, 1, 1, 0, -1, -1, -1};
  int syv[8] = '{1, 1, 0, -1, -1, -1, 0, 1};

  function automatic int dir_with(int sx, int sy);
    for (int d = 0; d < 8; d++) if (sxv[d] == sx && syv[d] == sy) return d;
    return -1;
  endfunction

  function automatic int sgn(int a);
    return a > 0 ? 1 : a < 0 ? -1 : 0;
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
    int ex, ey, cand[3], exp_dir, exp_valid;
    for (int n = 0; n < 20000; n++) begin
      my_x = COORD_W'($urandom); my_y = COORD_W'($urandom);
      case ($urandom_range(3))
        0: begin dst_x = my_x; dst_y = my_y; end
        1: begin dst_x = my_x; dst_y = COORD_W'($urandom); end
        2: begin dst_x = COORD_W'($urandom); dst_y = my_y; end
        default: begin dst_x = COORD_W'($urandom); dst_y = COORD_W'($urandom); end
      endcase
      port_ok = ($urandom_range(2) == 0) ? '1 : NPORTS'($urandom);
      pe_port = dir_e'($urandom_range(7));
      #1;
      ex = sgn(int'(dst_x) - int'(my_x));
      ey = sgn(int'(dst_y) - int'(my_y));
      exp_valid = 0; exp_dir = -1;
      if (ex == 0 && ey == 0) begin
        exp_valid = port_ok[pe_port]; exp_dir = pe_port; n_local++;
        chk("local flag", is_local, 1);
      end else begin
        if (ex != 0 && ey != 0) cand = '{dir_with(ex, ey), dir_with(ex, 0), dir_with(0, ey)};
        else if (ey == 0)       cand = '{dir_with(ex, 0), dir_with(ex, 1), dir_with(ex, -1)};
        else                    cand = '{dir_with(0, ey), dir_with(1, ey), dir_with(-1, ey)};
        for (int k = 0; k < 3; k++)
          if (!exp_valid && port_ok[cand[k]] && cand[k] != int'(pe_port)) begin
            exp_valid = 1; exp_dir = cand[k];
            if (k == 0) n_pref++; else n_alt++;
          end
        if (!exp_valid) n_block++;
        chk("local flag", is_local, 0);
      end
      chk("valid", route_valid, exp_valid);
      if (exp_valid) chk("dir", route_dir, exp_dir);
    end
    chk("saw preferred", n_pref > 0, 1);
    chk("saw detour", n_alt > 0, 1);
    chk("saw blocked", n_block > 0, 1);
    chk("saw local", n_local > 0, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
