// tb_flit_fifo: self-checking test of the synchronous FIFO at the input
// buffer size (8 entries of 64 bits). Random push / pop traffic, including
// pushes when full and pops when empty, is checked cycle by cycle against a
// queue model: head word, empty, full and count. A fill to full and a drain
// to empty are done explicitly. Watchdog of 20000 cycles.
module tb_flit_fifo;
  localparam int W = 64, D = 8;
  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic push, pop, empty, full;
  logic [W-1:0] wr_data, rd_data;
  logic [$clog2(D):0] count;
  logic [W-1:0] q[$];

  flit_fifo #(.WIDTH(W), .DEPTH(D)) dut (.*);

  always #5 clk = ~clk;

  task automatic chk(input string what, input logic [W-1:0] got, input logic [W-1:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("FAIL %s: got %h exp %h", what, got, exp); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic step(input logic pu, input logic po);
    logic dpop, dpush;
    push = pu; pop = po; wr_data = {$urandom, $urandom};
    #1;
    chk("empty", W'(empty), W'(q.size() == 0));
    chk("full",  W'(full),  W'(q.size() == D));
    chk("count", W'(count), W'(q.size()));
    if (q.size() > 0) chk("head", rd_data, q[0]);
    dpop  = po && q.size() > 0;
    dpush = pu && (q.size() < D || dpop);
    @(posedge clk);
    if (dpop) void'(q.pop_front());
    if (dpush) q.push_back(wr_data);
    #1;
  endtask

  initial begin
    push = 0; pop = 0; wr_data = '0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1; #1;
    for (int i = 0; i < D + 2; i++) step(1, 0);   // fill, then push while full
    step(1, 1);                                    // push and pop while full
    for (int i = 0; i < D + 2; i++) step(0, 1);   // drain, then pop while empty
    for (int i = 0; i < 3000; i++) step(1'($urandom_range(1)), 1'($urandom_range(1)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
