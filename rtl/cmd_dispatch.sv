// cmd_dispatch: the command-loading logic of a unit.
//
// A unit runs "commands": a command word names the task and is followed by
// the data words the task needs. When the unit finishes a command it asks for
// the next one (want_cmd high). As the original design describes, the hardware then
// takes the word from the input port if that port is full, otherwise from the
// input FIFO if it is not empty, and otherwise waits. The source that supplied
// the command is remembered, and the data words of that command (want_cmd
// low) are read from the same source. The unit consumes the presented word by
// raising `take` while `w_valid` is high; the mux is combinational, so a word
// can be taken every cycle.
module cmd_dispatch
  import mlsim_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  want_cmd,
  input  logic  take,
  output logic  w_valid,
  output word_t w_data,
  output logic  w_from_port,
  // input port (Multibus)
  input  logic  port_valid,
  input  word_t port_data,
  output logic  port_take,
  // input FIFO (previous unit)
  input  logic  fifo_valid,
  input  word_t fifo_data,
  output logic  fifo_take
);
  logic src_port_q;
  logic sel_port;

  always_comb begin
    sel_port    = want_cmd ? port_valid : src_port_q;
    w_valid     = sel_port ? port_valid : fifo_valid;
    w_data      = sel_port ? port_data  : fifo_data;
    w_from_port = sel_port;
    port_take   = take && sel_port;
    fifo_take   = take && !sel_port;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) src_port_q <= 1'b0;
    else if (want_cmd && take) src_port_q <= sel_port;
  end

  a_take_valid: assert property (@(posedge clk) disable iff (!rst_n) take |-> w_valid);

endmodule
