// tb_sync_fifo: checks the channel FIFO against a queue model.
// Random pushes and pops (including attempts on full and empty) are applied;
// every popped word, the full/empty flags and the count are compared with a
// behavioural queue. The FIFO is filled to its 256-word depth once.
module tb_sync_fifo;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic push = 1'b0, pop = 1'b0, full, empty;
  logic [23:0] din = '0, dout;
  logic [8:0] count;
  sync_fifo dut (.*);

  int checks = 0, failures = 0;
  logic [23:0] model[$];
  int saw_full = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  task automatic step(bit p, bit q, logic [23:0] d);
    @(negedge clk);
    check(full == (model.size() == 256), "full flag");
    check(empty == (model.size() == 0), "empty flag");
    check(count == 9'(model.size()), "count");
    if (model.size() > 0) check(dout == model[0], $sformatf("head %h expected %h", dout, model[0]));
    push = p && !full; pop = q && !empty; din = d;
    @(posedge clk);
    #1;
    if (pop) void'(model.pop_front());
    if (push) model.push_back(d);
    if (model.size() == 256) saw_full++;
    push = 1'b0; pop = 1'b0;
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 300; i++) step(1'b1, 1'b0, 24'($urandom));
    for (int i = 0; i < 2000; i++) step($urandom_range(0, 1) == 1, $urandom_range(0, 1) == 1, 24'($urandom));
    for (int i = 0; i < 300; i++) step(1'b0, 1'b1, '0);
    check(saw_full > 0, "filled to 256 words");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
