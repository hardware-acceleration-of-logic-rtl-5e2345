// host_port: the input port of a unit's Multibus interface.
//
// The host workstation passes commands and data to a unit one 24-bit word at
// a time through this port. A host write loads the word and sets the "full"
// flag, which the host polls before its next write. The unit's command logic
// gives a full port priority over its input FIFO (see cmd_dispatch); taking
// the word clears the flag on the next clock. Register-level behaviour of the
// port (one word, full flag, host polling) is this design's choice; the
// original design names the port and its "full" condition only.
module host_port #(
  parameter int WIDTH = 24
) (
  input  logic             clk,
  input  logic             rst_n,
  // host (Multibus) side
  input  logic             host_wr,
  input  logic [WIDTH-1:0] host_wdata,
  output logic             host_full,
  // unit side
  output logic             port_valid,
  output logic [WIDTH-1:0] port_data,
  input  logic             port_take
);
  logic             full_q;
  logic [WIDTH-1:0] data_q;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      full_q <= 1'b0;
      data_q <= '0;
    end else if (port_take && full_q) begin
      full_q <= 1'b0;
    end else if (host_wr && !full_q) begin
      full_q <= 1'b1;
      data_q <= host_wdata;
    end
  end

  assign host_full  = full_q;
  assign port_valid = full_q;
  assign port_data  = data_q;

  a_host_polls: assert property (@(posedge clk) disable iff (!rst_n) !(host_wr && full_q));
  a_take_valid: assert property (@(posedge clk) disable iff (!rst_n) !(port_take && !full_q));

endmodule
