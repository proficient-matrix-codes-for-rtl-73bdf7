// tb_port_fsm: self-checking test of the port mode FSM. Random fault and
// output-buffer-empty inputs are applied for many cycles and the state,
// port_ok and loop_en are compared each cycle with a reference model of
// the ACTIVE -> DRAIN -> DISABLED -> ACTIVE cycle; each transition must be
// seen at least once. Watchdog of 10000 cycles.
module tb_port_fsm;
  import noc_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, fault, ob_empty, port_ok, loop_en;
  port_state_e state, model;
  int n_drain = 0, n_dis = 0, n_act = 0;

  port_fsm dut (.*);
  always #5 clk = ~clk;

  task automatic chk(input string what, input int got, input int exp);
    checks++;
    if (got != exp) begin failures++; $display("FAIL %s: got %0d exp %0d", what, got, exp); end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    fault = 0; ob_empty = 1;
    repeat (2) @(posedge clk);
    #1 rst_n = 1; model = PS_ACTIVE;
    for (int i = 0; i < 3000; i++) begin
      fault    = ($urandom_range(3) == 0) ? ~fault : fault;
      ob_empty = 1'($urandom_range(1));
      #1;
      chk("state", int'(state), int'(model));
      chk("ok", int'(port_ok), int'(model == PS_ACTIVE));
      chk("loop", int'(loop_en), int'(model != PS_ACTIVE));
      @(posedge clk);
      case (model)
        PS_ACTIVE:   if (fault)    begin model = PS_DRAIN;    n_drain++; end
        PS_DRAIN:    if (ob_empty) begin model = PS_DISABLED; n_dis++;   end
        default:     if (!fault)   begin model = PS_ACTIVE;   n_act++;   end
      endcase
      #1;
    end
    chk("saw drain", int'(n_drain > 0), 1);
    chk("saw disabled", int'(n_dis > 0), 1);
    chk("saw reactivate", int'(n_act > 0), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
