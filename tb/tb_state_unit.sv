// tb_state_unit: checks the State unit's tables and packet building.
// A random circuit of 64 gates (1 to 15 fanins, random fanouts) is loaded
// through the input port. Then, through the FIFO side, random state updates
// are applied and fanout requests issued; each request must produce one
// instruction packet per fanout gate, in fanout-list order, carrying the
// gate's type, current state, fanin count and fanin states packed six per
// word. Updates must appear on the trace outputs and in the read port, and
// the tick marker must be passed on. Expected packets are built from the
// testbench's own copy of the tables.
module tb_state_unit;
  import mlsim_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  localparam int NG = 64;
  logic  port_valid, port_take, fifo_valid, fifo_take, out_push, out_full;
  word_t port_data, fifo_data, out_data;
  gate_t rd_gate = '0;
  sim_state_t rd_state, trace_state;
  logic trace_valid;
  gate_t trace_gate;
  logic [31:0] n_updates, n_packets;
  logic list_overflow;

  state_unit #(.N_GATES(NG), .LIST_DEPTH(2048)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  word_t portq[$], inq[$], outq[$], exp_q[$];
  int    ntrace = 0;
  assign port_valid = portq.size() > 0;
  assign port_data  = (portq.size() > 0) ? portq[0] : '0;
  assign fifo_valid = inq.size() > 0;
  assign fifo_data  = (inq.size() > 0) ? inq[0] : '0;
  logic stall = 1'b0;
  assign out_full = stall;
  always @(posedge clk) begin
    if (port_take && portq.size() > 0) void'(portq.pop_front());
    if (fifo_take && inq.size() > 0) void'(inq.pop_front());
    if (rst_n && out_push) outq.push_back(out_data);
    stall <= ($urandom_range(0, 3) == 0);
  end

  int typ[NG], nfi[NG], fi[NG][15];
  int fo[NG][$];
  logic [3:0] st[NG];

  always @(posedge clk)
    if (rst_n && trace_valid) begin
      ntrace++;
      check(trace_state == inq[0][3:0], "trace shows the update");
    end

  initial begin
    int g, f;
    word_t w;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (g = 0; g < NG; g++) begin
      typ[g] = int'($urandom_range(0, 255));
      st[g] = 4'($urandom_range(0, 15));
      nfi[g] = int'($urandom_range(0, 15));
      for (int i = 0; i < nfi[g]; i++) begin
        fi[g][i] = int'($urandom_range(0, NG - 1));
        fo[fi[g][i]].push_back(g);
      end
    end
    for (g = 0; g < NG; g++) begin
      portq.push_back(mk_hdr(OP_LD_GATE, gate_t'(g)));
      portq.push_back(word_t'({8'(typ[g]), st[g]}));
      portq.push_back(mk_hdr(OP_LD_FANIN, gate_t'(g)));
      portq.push_back(word_t'(nfi[g]));
      for (int i = 0; i < nfi[g]; i++) portq.push_back(word_t'(fi[g][i]));
      portq.push_back(mk_hdr(OP_LD_FANOUT, gate_t'(g)));
      portq.push_back(word_t'(fo[g].size()));
      foreach (fo[g][i]) portq.push_back(word_t'(fo[g][i]));
    end
    while (portq.size() > 0) @(negedge clk);
    // rounds of updates then fanout requests, as the queue unit sends them
    for (int r = 0; r < 20; r++) begin
      int ups[$];
      for (int k = 0; k < 3; k++) begin
        g = int'($urandom_range(0, NG - 1));
        ups.push_back(g);
        st[g] = 4'($urandom_range(0, 15));
        inq.push_back(mk_hdr(OP_UPDATE, gate_t'(g)));
        inq.push_back(word_t'(st[g]));
      end
      foreach (ups[k]) begin
        inq.push_back(mk_hdr(OP_FANOUT, gate_t'(ups[k])));
        foreach (fo[ups[k]][j]) begin
          f = fo[ups[k]][j];
          exp_q.push_back(mk_hdr(OP_EVAL, gate_t'(f)));
          exp_q.push_back({8'(typ[f]), st[f], 4'(nfi[f]), 8'h00});
          w = '0;
          for (int i = 0; i < nfi[f]; i++) begin
            w[(i % 6) * 4 +: 4] = st[fi[f][i]];
            if (i % 6 == 5 || i == nfi[f] - 1) begin exp_q.push_back(w); w = '0; end
          end
        end
      end
      inq.push_back(mk_hdr(OP_TICK_END, '0));
      exp_q.push_back(mk_hdr(OP_TICK_END, '0));
    end
    while (inq.size() > 0) @(negedge clk);
    repeat (200) @(negedge clk);
    check(outq.size() == exp_q.size(), $sformatf("%0d words out, expected %0d", outq.size(), exp_q.size()));
    for (int i = 0; i < outq.size() && i < exp_q.size(); i++)
      check(outq[i] == exp_q[i], $sformatf("word %0d: %h expected %h", i, outq[i], exp_q[i]));
    check(ntrace == 60 && n_updates == 60, "60 updates traced");
    for (g = 0; g < NG; g++) begin
      rd_gate = gate_t'(g);
      #1;
      check(rd_state == st[g], $sformatf("state of g%0d", g));
    end
    check(!list_overflow, "no list overflow");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
