// tb_megalogician_full: end-to-end test of the accelerator with every
// parameter at its default (2**20 gates, 2**16 events, 256-word channels).
//
// The host tasks below load the three units through their input ports and
// start runs; an Eval-2 model answers packets for physical-model gates. Two
// circuits are simulated and compared, update by update, with the reference
// simulator of ml_tb_pkg:
//   1. the seven-gate example (A and B drive a network of nand gates), with
//      A falling at time 100: the expected updates are A=0 @100, C=1 @110,
//      E=0 @122;
//   2. a random layered circuit of 400 gates mixing every gate type, fanins
//      of up to 8 (multi-word packets) and physical-model gates, with a
//      burst of 20 stimulus events at one time.
// With the default 4096-entry tick buffer and 256-word channels the tick
// split and channel back-pressure do not occur here (tb_megalogician makes
// them happen at reduced sizes); scheduling, spike cancellation and the
// Eval-2 hand-off must occur.
module tb_megalogician_full;
  import mlsim_pkg::*;
  import ml_tb_pkg::*;

  localparam int TD = 1 << 12;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic  q_host_wr = 1'b0, s_host_wr = 1'b0, e_host_wr = 1'b0;
  word_t q_host_wdata = '0, s_host_wdata = '0, e_host_wdata = '0;
  logic  q_host_full, s_host_full, e_host_full;
  logic  pmx_out_valid, pmx_out_ready, pmx_in_valid, pmx_in_ready;
  word_t pmx_out_data, pmx_in_data;
  logic  running;
  simtime_t now;
  gate_t rd_gate = '0;
  sim_state_t rd_state;
  logic  trace_valid;
  gate_t trace_gate;
  sim_state_t trace_state;
  logic [31:0] n_events, n_sched, n_spikes, n_ticks, n_splits, n_updates, n_packets, n_evals, n_pmx;
  logic pool_overflow, list_overflow;
  logic [2:0] chan_full_seen;

  megalogician dut (.*);  // default parameters

  eval2_model u_eval2 (
    .clk, .rst_n,
    .in_valid(pmx_out_valid), .in_data(pmx_out_data), .in_ready(pmx_out_ready),
    .out_valid(pmx_in_valid), .out_data(pmx_in_data), .out_ready(pmx_in_ready)
  );

  int checks = 0, failures = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // host writes, one word per port, polling the full flag
  task automatic qwr(word_t w);
    @(negedge clk);
    while (q_host_full) @(negedge clk);
    q_host_wr = 1'b1; q_host_wdata = w;
    @(negedge clk);
    q_host_wr = 1'b0;
  endtask
  task automatic swr(word_t w);
    @(negedge clk);
    while (s_host_full) @(negedge clk);
    s_host_wr = 1'b1; s_host_wdata = w;
    @(negedge clk);
    s_host_wr = 1'b0;
  endtask
  task automatic ewr(word_t w);
    @(negedge clk);
    while (e_host_full) @(negedge clk);
    e_host_wr = 1'b1; e_host_wdata = w;
    @(negedge clk);
    e_host_wr = 1'b0;
  endtask

  task automatic load(circuit c);
    for (int t = 0; t < N_TB_TYPES; t++)
      ewr({OP_LD_MODEL, 4'h0, 8'(model_of(t)), 8'(t)});
    for (int g = 0; g < c.n; g++) begin
      swr(mk_hdr(OP_LD_GATE, gate_t'(g)));
      swr(word_t'({8'(c.typ[g]), c.init[g]}));
      swr(mk_hdr(OP_LD_FANIN, gate_t'(g)));
      swr(word_t'(c.nfi[g]));
      for (int i = 0; i < c.nfi[g]; i++) swr(word_t'(c.fi[g * MAXF + i]));
      swr(mk_hdr(OP_LD_FANOUT, gate_t'(g)));
      swr(word_t'(c.fo[g].size()));
      foreach (c.fo[g][i]) swr(word_t'(c.fo[g][i]));
      qwr(mk_hdr(OP_LD_DELAY, gate_t'(g)));
      qwr({12'(c.rise[g]), 12'(c.fall[g])});
    end
    foreach (c.stim[i]) begin
      qwr(mk_hdr(OP_LD_EVENT, gate_t'(c.stim[i].g)));
      qwr(word_t'(c.stim[i].t));
      qwr(word_t'(c.stim[i].s));
    end
  endtask

  ev_t got[$];
  always @(posedge clk)
    if (rst_n && trace_valid) got.push_back('{t: int'(now), g: int'(trace_gate), s: trace_state});

  task automatic run_to(int end_t);
    qwr(mk_hdr(OP_RUN, '0));
    qwr(word_t'(end_t));
    wait (running);
    wait (!running);
    repeat (4) @(negedge clk);
  endtask

  task automatic compare(circuit c, string name);
    check(got.size() == c.trace.size(),
          $sformatf("%s: %0d updates, expected %0d", name, got.size(), c.trace.size()));
    for (int i = 0; i < got.size() && i < c.trace.size(); i++)
      check(got[i].t == c.trace[i].t && got[i].g == c.trace[i].g && got[i].s == c.trace[i].s,
            $sformatf("%s: update %0d got g%0d=%h @%0d expected g%0d=%h @%0d", name, i,
                      got[i].g, got[i].s, got[i].t, c.trace[i].g, c.trace[i].s, c.trace[i].t));
    for (int g = 0; g < c.n; g++) begin
      rd_gate = gate_t'(g);
      #1;
      check(rd_state == c.st[g], $sformatf("%s: final state of g%0d %h expected %h",
                                           name, g, rd_state, c.st[g]));
    end
  endtask


  circuit c;
  int base_sched, base_spikes, base_splits, base_pmx, base_evals;
  int nsp, nev, nsch, nsplt, npm;

  initial begin
    // example circuit
    c = example_circuit(7);
    c.tick_depth = TD;
    c.reset_sim();
    c.run(400);
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    load(c);
    run_to(400);
    compare(c, "example");
    check(now == 400, "example: time stops at the end time");
    // the three expected updates of the worked example
    check(got.size() == 3 && got[1].g == 2 && got[1].t == 110 && got[1].s == 4'h1 &&
          got[2].g == 4 && got[2].t == 122 && got[2].s == 4'h0, "example: C@110, E@122");
    base_sched = int'(n_sched); base_spikes = int'(n_spikes); base_splits = int'(n_splits);
    base_pmx = int'(n_pmx); base_evals = int'(n_evals);
    check(n_sched == 2 && n_evals == 5, $sformatf("example: %0d scheduled, %0d evaluated",
                                                  n_sched, n_evals));

    // random layered circuit, after a fresh reset
    rst_n = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    got.delete();
    c = new(400);
    c.tick_depth = TD;
    begin
      int nin, lo, hi, t, k, r0;
      int ins[$];
      ins.delete();
      for (int g = 0; g < 24; g++) c.add_gate(g, T_BUF, ins, 1, 1, int'($urandom_range(0, 1)));
      for (int g = 24; g < 400; g++) begin
        lo = (g < 120) ? 0 : g - 100;
        hi = g - 1;
        t = int'($urandom_range(0, N_TB_TYPES - 1));
        if (t == T_PMX && ($urandom_range(0, 3) != 0)) t = T_NAND;
        nin = (t == T_BUF || t == T_NOT) ? 1 : (t == T_XFER || t == T_TRI) ? 2 :
              ($urandom_range(0, 9) == 0) ? int'($urandom_range(7, 8)) : int'($urandom_range(2, 4));
        ins.delete();
        for (int i = 0; i < nin; i++) ins.push_back(int'($urandom_range(lo, hi)));
        r0 = int'($urandom_range(0, 2));
        c.add_gate(g, t, ins, int'($urandom_range(1, 20)), int'($urandom_range(1, 20)), r0);
      end
      for (int s = 0; s < 40; s++)
        c.add_stim(int'($urandom_range(1, 30)) * 25, int'($urandom_range(0, 23)),
                   int'($urandom_range(0, 1)));
      // a burst larger than the tick buffer
      for (int g = 0; g < 20; g++) c.add_stim(900, g, int'($urandom_range(0, 1)));
      k = 0;
    end
    c.reset_sim();
    c.run(1500);
    load(c);
    run_to(700);
    run_to(1500);
    compare(c, "random");
    check(int'(n_sched) == c.n_sched && int'(n_spikes) == c.n_spikes &&
          int'(n_splits) == c.n_splits && int'(n_pmx) == c.n_pmx && int'(n_evals) == c.n_evals,
          $sformatf("random: counts sched %0d/%0d spikes %0d/%0d splits %0d/%0d pmx %0d/%0d evals %0d/%0d",
                    n_sched, c.n_sched, n_spikes, c.n_spikes, n_splits, c.n_splits,
                    n_pmx, c.n_pmx, n_evals, c.n_evals));
    check(!pool_overflow && !list_overflow, "no overflow");

    // every mechanism must have happened
    check(n_sched > 0, "mechanism: event scheduled");
    check(n_spikes > 0, "mechanism: spike cancelled a pending event");
    check(n_pmx > 0, "mechanism: Eval-2 hand-off");
    $display("mechanisms: sched=%0d spikes=%0d splits=%0d pmx=%0d chan_full=%b ticks=%0d events=%0d packets=%0d",
             n_sched, n_spikes, n_splits, n_pmx, chan_full_seen, n_ticks, n_events, n_packets);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog (running=%b now=%0d updates=%0d)", running, now, got.size());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
