// eval2_model: behavioural stand-in for the Eval-2 physical-model processor.
//
// It accepts instruction packets forwarded by the eval unit ({OP_EVAL, g},
// {type, current state, fanin count}, packed input states) and, one cycle
// after the last word, offers the result packet: {OP_SCHED, g} + {state} when
// the output differs from the current state, else {OP_SPIKE, g}. The "chip"
// modelled here is a three-valued majority of the first three inputs with a
// forcing output. It always accepts input and holds at most one result.
module eval2_model
  import mlsim_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  word_t in_data,
  output logic  in_ready,
  output logic  out_valid,
  output word_t out_data,
  input  logic  out_ready
);
  int    widx, nin, nwords;
  word_t hdr, w1;
  int    levels[$];
  word_t res[$];

  assign in_ready  = 1'b1;

  always @(posedge clk) begin
    if (!rst_n) begin
      widx <= 0;
      res.delete();
      out_valid <= 1'b0;
      out_data  <= '0;
    end else begin
      if (out_valid && out_ready) void'(res.pop_front());
      if (in_valid) begin
        if (widx == 0) begin
          hdr = in_data; widx <= 1; levels.delete();
        end else if (widx == 1) begin
          w1 = in_data;
          nin = int'(in_data[11:8]);
          nwords = (nin + 5) / 6;
          if (nwords == 0) begin widx <= 0; finish_packet(); end
          else widx <= 2;
        end else begin
          for (int i = 0; i < 6; i++)
            if (levels.size() < nin) levels.push_back(int'(in_data[i*4 +: 2]));
          if (widx - 1 == nwords) begin widx <= 0; finish_packet(); end
          else widx <= widx + 1;
        end
      end
      out_valid <= res.size() > 0;
      out_data  <= (res.size() > 0) ? res[0] : '0;
    end
  end

  function automatic void finish_packet();
    int n0, n1, r;
    logic [3:0] cur, nw;
    n0 = 0; n1 = 0;
    for (int i = 0; i < 3 && i < levels.size(); i++) begin
      if (levels[i] == 0) n0++; else if (levels[i] == 1) n1++;
    end
    r = (n1 >= 2) ? 1 : (n0 >= 2) ? 0 : 2;
    nw = 4'(r);
    cur = w1[15:12];
    if (nw != cur) begin
      res.push_back({OP_SCHED, hdr[GATE_W-1:0]});
      res.push_back(word_t'(nw));
    end else begin
      res.push_back({OP_SPIKE, hdr[GATE_W-1:0]});
    end
  endfunction

endmodule
