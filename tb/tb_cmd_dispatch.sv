// tb_cmd_dispatch: checks the command-loading rule. With want_cmd high the
// port wins over the FIFO when both hold a word, the FIFO is used when the
// port is empty, and nothing is offered when both are empty. With want_cmd
// low, data words come from the source of the last command even when the
// other source holds a word.
module tb_cmd_dispatch;
  import mlsim_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic want_cmd = 1'b0, take = 1'b0, w_valid, w_from_port;
  word_t w_data, port_data = '0, fifo_data = '0;
  logic port_valid = 1'b0, fifo_valid = 1'b0, port_take, fifo_take;
  cmd_dispatch dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    bit pv, fv, src;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 200; i++) begin
      @(negedge clk);
      pv = $urandom_range(0, 1) == 1; fv = $urandom_range(0, 1) == 1;
      port_valid = pv; fifo_valid = fv;
      port_data = 24'($urandom); fifo_data = 24'($urandom);
      want_cmd = 1'b1; take = 1'b0;
      #1;
      check(w_valid == (pv || fv), "command offered when a source holds a word");
      if (pv) check(w_from_port && w_data == port_data, "port has priority");
      else if (fv) check(!w_from_port && w_data == fifo_data, "fifo used when port empty");
      if (!(pv || fv)) continue;
      src = pv;
      take = 1'b1;
      #1;
      check(port_take == src && fifo_take == !src, "take goes to the chosen source");
      @(negedge clk);
      // data words: both sources full, the locked source must be used
      want_cmd = 1'b0; take = 1'b0;
      port_valid = 1'b1; fifo_valid = 1'b1;
      port_data = 24'($urandom); fifo_data = 24'($urandom);
      #1;
      check(w_from_port == src && w_data == (src ? port_data : fifo_data),
            "data follows the command's source");
      // locked source empty: must wait even if the other holds a word
      if (src) port_valid = 1'b0; else fifo_valid = 1'b0;
      #1;
      check(!w_valid, "data waits for the command's source");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
