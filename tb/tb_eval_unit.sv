// tb_eval_unit: checks gate evaluation (logic gates, transfer gates and
// tristates with level/strength states), the schedule/spike decision, the
// Eval-2 hand-off and the end-of-tick ordering of the Eval-1 unit.
// Models are loaded through the input port; random instruction packets (all
// gate types, 1 to 15 inputs, random three-valued input states and current
// states) go in through the FIFO side. Expected results come from the
// independent evaluator of ml_tb_pkg. A tick marker sent right after a
// physical-model packet must come out after that packet's result. The
// steady-state rate is checked: a packet of 4 inputs whose result is a spike
// check takes 7 cycles (command, header, one cycle per input, result).
// Last, hand-worked packets check the transfer gate and tristate strengths.
module tb_eval_unit;
  import mlsim_pkg::*;
  import ml_tb_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic  port_valid = 1'b0, port_take, fifo_valid, fifo_take, out_push, out_full = 1'b0;
  word_t port_data = '0, fifo_data, out_data;
  logic  pmx_out_valid, pmx_out_ready, pmx_in_valid, pmx_in_ready;
  word_t pmx_out_data, pmx_in_data;
  logic [31:0] n_evals, n_pmx;

  eval_unit #(.N_TYPES(16)) dut (.*);
  eval2_model u_e2 (.clk, .rst_n, .in_valid(pmx_out_valid), .in_data(pmx_out_data),
    .in_ready(pmx_out_ready), .out_valid(pmx_in_valid), .out_data(pmx_in_data),
    .out_ready(pmx_in_ready));

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  word_t inq[$];
  word_t outq[$];
  int    out_cyc[$];
  int    cyc = 0;
  assign fifo_valid = inq.size() > 0;
  assign fifo_data  = (inq.size() > 0) ? inq[0] : '0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (fifo_take && inq.size() > 0) void'(inq.pop_front());
    if (rst_n && out_push) begin outq.push_back(out_data); out_cyc.push_back(cyc); end
  end

  word_t exp_q[$];

  // build one packet and its expected result
  task automatic add_packet(int g, int t, int n, logic [3:0] ins[$], logic [3:0] cur);
    int lv[$];
    logic [3:0] rs;
    word_t w;
    inq.push_back(mk_hdr(OP_EVAL, gate_t'(g)));
    inq.push_back({8'(t), cur, 4'(n), 8'h00});
    w = '0;
    for (int i = 0; i < n; i++) begin
      w[(i % 6) * 4 +: 4] = ins[i];
      if (i % 6 == 5 || i == n - 1) begin inq.push_back(w); w = '0; end
      lv.push_back(lvl(ins[i]));
    end
    if (t == T_PMX) rs = 4'(ref_gate(t, lv));
    else rs = ref_state(t, ins, cur);
    if (rs != cur) begin
      exp_q.push_back(mk_hdr(OP_SCHED, gate_t'(g)));
      exp_q.push_back(word_t'(rs));
    end else exp_q.push_back(mk_hdr(OP_SPIKE, gate_t'(g)));
  endtask

  initial begin
    logic [3:0] ins[$];
    int n, t;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < N_TB_TYPES; k++) begin
      @(negedge clk);
      port_valid = 1'b1; port_data = {OP_LD_MODEL, 4'h0, 8'(model_of(k)), 8'(k)};
      @(posedge clk); #1;
      while (!port_take) begin @(posedge clk); #1; end
      @(negedge clk);
      port_valid = 1'b0;
    end
    // random packets, a tick marker after each physical-model packet
    for (int p = 0; p < 400; p++) begin
      t = int'($urandom_range(0, N_TB_TYPES - 1));
      n = (t == T_BUF || t == T_NOT) ? 1 : (t == T_XFER || t == T_TRI) ? 2 :
          int'($urandom_range(1, 15));
      ins.delete();
      for (int i = 0; i < n; i++) ins.push_back({2'($urandom_range(0, 3)), 2'($urandom_range(0, 2))});
      add_packet(p, t, n, ins, {2'($urandom_range(0, 3)), 2'($urandom_range(0, 2))});
      if (t == T_PMX) begin
        inq.push_back(mk_hdr(OP_TICK_END, '0));
        exp_q.push_back(mk_hdr(OP_TICK_END, '0));
      end
    end
    while (inq.size() > 0) @(negedge clk);
    repeat (20) @(negedge clk);
    check(outq.size() == exp_q.size(), $sformatf("%0d words out, expected %0d", outq.size(), exp_q.size()));
    for (int i = 0; i < outq.size() && i < exp_q.size(); i++)
      check(outq[i] == exp_q[i], $sformatf("word %0d: %h expected %h", i, outq[i], exp_q[i]));
    check(n_pmx > 0 && n_evals > 0, "both evaluation paths used");
    // rate: ten 4-input and gates with a 0 input, current state 0 -> spike checks
    outq.delete(); out_cyc.delete(); exp_q.delete();
    ins.delete();
    ins.push_back(4'h0); ins.push_back(4'h1); ins.push_back(4'h1); ins.push_back(4'h1);
    for (int p = 0; p < 10; p++) add_packet(p, T_AND, 4, ins, 4'h0);
    while (inq.size() > 0) @(negedge clk);
    repeat (10) @(negedge clk);
    check(outq.size() == 10, "ten results");
    if (outq.size() == 10)
      check(out_cyc[9] - out_cyc[0] == 9 * 7, $sformatf("7 cycles per packet, saw %0d over 9",
                                                         out_cyc[9] - out_cyc[0]));
    // switch models, expected values written out by hand (state = {strength, level},
    // strength F=0 R=1 Z=2 U=3, level 0/1/U=2): a transfer gate driving a node
    // that goes R1, then Z1 when switched off, then U1 with an unknown control
    outq.delete(); exp_q.delete();
    sw_packet(600, T_XFER, 4'h1, 4'h1, 4'hA); sw_expect(600, 4'h5);  // on: F1 -> R1
    sw_packet(601, T_XFER, 4'h1, 4'h0, 4'h5); sw_expect(601, 4'h9);  // off: keeps 1 as Z1
    sw_packet(602, T_XFER, 4'h1, 4'h2, 4'h9); sw_expect(602, 4'hD);  // unknown control: U1
    sw_packet(603, T_XFER, 4'h1, 4'h2, 4'hD); sw_spike(603);         // unchanged: spike check
    sw_packet(604, T_XFER, 4'h0, 4'h2, 4'h9); sw_expect(604, 4'hE);  // levels differ: UU
    sw_packet(605, T_XFER, 4'h8, 4'h1, 4'h0); sw_expect(605, 4'h8);  // Z0 passes as Z0
    sw_packet(606, T_XFER, 4'h4, 4'h1, 4'h1); sw_expect(606, 4'h4);  // R0 passes as R0
    sw_packet(607, T_TRI,  4'h0, 4'h1, 4'h9); sw_expect(607, 4'h0);  // tristate on: F0
    sw_packet(608, T_TRI,  4'h1, 4'h0, 4'h0); sw_expect(608, 4'h8);  // tristate off: Z0
    while (inq.size() > 0) @(negedge clk);
    repeat (10) @(negedge clk);
    check(outq.size() == exp_q.size(), "switch model result count");
    for (int i = 0; i < outq.size() && i < exp_q.size(); i++)
      check(outq[i] == exp_q[i], $sformatf("switch word %0d: %h expected %h", i, outq[i], exp_q[i]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // two-input packet (data, control) with no computed expectation
  task automatic sw_packet(int g, int t, logic [3:0] d, logic [3:0] c, logic [3:0] cur);
    inq.push_back(mk_hdr(OP_EVAL, gate_t'(g)));
    inq.push_back({8'(t), cur, 4'd2, 8'h00});
    inq.push_back({16'h0, c, d});
  endtask
  task automatic sw_expect(int g, logic [3:0] s);
    exp_q.push_back(mk_hdr(OP_SCHED, gate_t'(g)));
    exp_q.push_back(word_t'(s));
  endtask
  task automatic sw_spike(int g);
    exp_q.push_back(mk_hdr(OP_SPIKE, gate_t'(g)));
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
