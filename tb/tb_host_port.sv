// tb_host_port: checks the Multibus input port. A word written by the host
// must appear with port_valid and host_full set on the next cycle, stay until
// the unit takes it, and be replaced only by a later write.
module tb_host_port;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  logic host_wr = 1'b0, host_full, port_valid, port_take = 1'b0;
  logic [23:0] host_wdata = '0, port_data;
  host_port dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    logic [23:0] w;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(!host_full && !port_valid, "empty after reset");
    for (int i = 0; i < 50; i++) begin
      w = 24'($urandom);
      host_wr = 1'b1; host_wdata = w;
      @(negedge clk);
      host_wr = 1'b0;
      check(host_full && port_valid && port_data == w, "word held after write");
      repeat ($urandom_range(0, 3)) begin
        @(negedge clk);
        check(host_full && port_data == w, "word held until taken");
      end
      port_take = 1'b1;
      @(negedge clk);
      port_take = 1'b0;
      check(!host_full && !port_valid, "port empty after take");
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
