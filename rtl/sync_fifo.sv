// sync_fifo: the channel FIFO between two processing units.
//
// Each unit card drives the next unit through a FIFO of 256 words of 24 bits
// (the depth and width are the original design's). The FIFO smooths out short-term
// differences in the speed of the units. This is a plain single-clock FIFO:
// a word pushed while not full is readable at the head on the next cycle.
// `pop` removes the head word when not empty. The storage is an array without
// reset; only the pointers and the count are reset. Using one clock for both
// ends is this design's choice.
module sync_fifo #(
  parameter int WIDTH = 24,
  parameter int DEPTH = 256
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             push,
  input  logic [WIDTH-1:0] din,
  output logic             full,
  input  logic             pop,
  output logic [WIDTH-1:0] dout,
  output logic             empty,
  output logic [$clog2(DEPTH):0] count
);
  localparam int AW = $clog2(DEPTH);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0] wr_ptr, rd_ptr;

  wire do_push = push && !full;
  wire do_pop  = pop && !empty;

  assign full  = (count == (AW+1)'(DEPTH));
  assign empty = (count == '0);
  assign dout  = mem[rd_ptr];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
      count  <= '0;
    end else begin
      if (do_push) wr_ptr <= (wr_ptr == AW'(DEPTH-1)) ? '0 : wr_ptr + 1'b1;
      if (do_pop)  rd_ptr <= (rd_ptr == AW'(DEPTH-1)) ? '0 : rd_ptr + 1'b1;
      count <= count + (AW+1)'(do_push) - (AW+1)'(do_pop);
    end
  end

  always_ff @(posedge clk) begin
    if (do_push) mem[wr_ptr] <= din;
  end

  // A producer must not push into a full channel.
  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n) !(push && full));

endmodule
