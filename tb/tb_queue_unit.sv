// tb_queue_unit: checks the Queue unit on its own. The testbench plays the
// rest of the ring: it reads the unit's OP_UPDATE / OP_FANOUT / OP_TICK_END
// packets and answers fanout requests with scripted OP_SCHED and OP_SPIKE
// commands, returning the tick marker after the answers.
//   A: stimulus events at random times must come out in time order (load
//      order among equal times) at the right simulation time, each tick's
//      updates before its fanout requests; six events at one time with a
//      4-entry tick buffer must split the tick.
//   B: a chain of scheduled events must land at now + rise delay (level 1),
//      fall delay (level 0) or the larger of the two (unknown).
//   C: a spike check must remove every pending event of its gate.
//   D: loading more events than the pool holds must raise pool_overflow.
module tb_queue_unit;
  import mlsim_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic  port_valid, port_take, fifo_valid, fifo_take, out_push, out_full, out_room;
  word_t port_data, fifo_data, out_data;
  logic  running, pool_overflow;
  simtime_t now;
  logic [31:0] n_events, n_sched, n_spikes, n_ticks, n_splits;

  queue_unit #(.N_GATES(64), .EV_DEPTH(16), .TICK_DEPTH(4)) dut (.*);

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  typedef struct { int t; int g; int s; } upd_t;
  word_t portq[$], inq[$], pend_q[$];
  upd_t  got[$];
  int    fan_seen[$];
  int    tick_ends = 0;
  bit    order_ok = 1'b1;
  assign port_valid = portq.size() > 0;
  assign port_data  = (portq.size() > 0) ? portq[0] : '0;
  assign fifo_valid = inq.size() > 0;
  assign fifo_data  = (inq.size() > 0) ? inq[0] : '0;
  assign out_full   = 1'b0;
  logic room_q = 1'b1;
  assign out_room = room_q;

  int rise[64], fall[64];
  int widx = 0;
  word_t hdr;
  bit in_fanout_phase = 1'b0;

  // ring model: responses to fanout requests
  task automatic respond(int g);
    int lv;
    if (g < 9) begin
      lv = (g % 3 == 0) ? 1 : (g % 3 == 1) ? 0 : 2;
      pend_q.push_back(mk_hdr(OP_SCHED, gate_t'(g + 1)));
      pend_q.push_back(word_t'(lv));
    end else if (g == 21) begin
      pend_q.push_back(mk_hdr(OP_SPIKE, gate_t'(20)));
      pend_q.push_back(mk_hdr(OP_SPIKE, gate_t'(23)));  // nothing pending
    end
  endtask

  always @(posedge clk) begin
    if (port_take && portq.size() > 0) void'(portq.pop_front());
    if (fifo_take && inq.size() > 0) void'(inq.pop_front());
    room_q <= ($urandom_range(0, 4) != 0);
    if (pend_q.size() > 0 && $urandom_range(0, 1) == 1) inq.push_back(pend_q.pop_front());
    if (rst_n && out_push) begin
      if (widx == 1) begin
        got.push_back('{t: int'(now), g: int'(hdr_gate(hdr)), s: int'(out_data[3:0])});
        if (in_fanout_phase) order_ok = 1'b0;
        widx = 0;
      end else begin
        unique case (hdr_op(out_data))
          OP_UPDATE: begin hdr = out_data; widx = 1; end
          OP_FANOUT: begin
            in_fanout_phase = 1'b1;
            fan_seen.push_back(int'(hdr_gate(out_data)));
            respond(int'(hdr_gate(out_data)));
          end
          OP_TICK_END: begin
            in_fanout_phase = 1'b0;
            tick_ends++;
            pend_q.push_back(out_data);
          end
          default: check(1'b0, "unexpected packet");
        endcase
      end
    end
  end

  task automatic run_to(int t);
    portq.push_back(mk_hdr(OP_RUN, '0));
    portq.push_back(word_t'(t));
    wait (running);
    wait (!running);
    repeat (5) @(negedge clk);
  endtask

  task automatic ld_event(int t, int g, int s);
    portq.push_back(mk_hdr(OP_LD_EVENT, gate_t'(g)));
    portq.push_back(word_t'(t));
    portq.push_back(word_t'(s));
  endtask

  initial begin
    upd_t exp[$];
    int t, d, lv;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int g = 0; g < 64; g++) begin
      rise[g] = g + 3; fall[g] = 2 * g + 1;
      portq.push_back(mk_hdr(OP_LD_DELAY, gate_t'(g)));
      portq.push_back({12'(rise[g]), 12'(fall[g])});
    end
    // A: ordering and tick split (gates 30..45 have no responses)
    for (int i = 0; i < 6; i++) exp.push_back('{t: 20, g: 30 + i, s: i % 3});
    for (int i = 0; i < 8; i++) exp.push_back('{t: 10 * int'($urandom_range(1, 8)), g: 36 + i, s: 1});
    foreach (exp[i]) ld_event(exp[i].t, exp[i].g, exp[i].s);
    exp.sort() with (item.t);  // stable by time: equal times keep load order
    run_to(90);
    check(got.size() == exp.size(), $sformatf("A: %0d updates, expected %0d", got.size(), exp.size()));
    foreach (exp[i]) if (i < got.size())
      check(got[i].t == exp[i].t && got[i].g == exp[i].g && got[i].s == exp[i].s,
            $sformatf("A: update %0d g%0d@%0d expected g%0d@%0d", i, got[i].g, got[i].t, exp[i].g, exp[i].t));
    check(order_ok, "A: updates of a tick precede its fanout requests");
    check(fan_seen.size() == exp.size(), "A: one fanout request per event");
    check(n_splits == 1, $sformatf("A: one split tick, saw %0d", n_splits));
    check(now == 90, "A: time stops at the end time");
    check(tick_ends == int'(n_ticks), "A: one marker per tick");
    // B: schedule chain from gate 0 at time 100
    got.delete(); exp.delete();
    ld_event(100, 0, 1);
    t = 100;
    exp.push_back('{t: 100, g: 0, s: 1});
    for (int g = 0; g < 9; g++) begin
      lv = (g % 3 == 0) ? 1 : (g % 3 == 1) ? 0 : 2;
      d = (lv == 1) ? rise[g + 1] : (lv == 0) ? fall[g + 1] :
          ((rise[g + 1] > fall[g + 1]) ? rise[g + 1] : fall[g + 1]);
      t += d;
      exp.push_back('{t: t, g: g + 1, s: lv});
    end
    run_to(290);
    check(got.size() == exp.size(), $sformatf("B: %0d updates, expected %0d", got.size(), exp.size()));
    foreach (exp[i]) if (i < got.size())
      check(got[i].t == exp[i].t && got[i].g == exp[i].g && got[i].s == exp[i].s,
            $sformatf("B: update %0d g%0d=%0d@%0d expected g%0d=%0d@%0d", i, got[i].g, got[i].s,
                      got[i].t, exp[i].g, exp[i].s, exp[i].t));
    check(n_sched == 9, "B: nine events scheduled");
    // C: spike check removes both pending events of gate 20
    got.delete();
    ld_event(300, 20, 1);
    ld_event(320, 20, 0);
    ld_event(295, 21, 1);
    ld_event(330, 22, 1);
    run_to(400);
    check(got.size() == 2 && got[0].g == 21 && got[1].g == 22, "C: gate 20 events removed");
    check(n_spikes == 2, $sformatf("C: two events removed, saw %0d", n_spikes));
    check(!pool_overflow, "C: no overflow yet");
    // D: more events than the 15-entry pool
    for (int i = 0; i < 20; i++) ld_event(500 + i, 50, 1);
    while (portq.size() > 0) @(negedge clk);
    repeat (200) @(negedge clk);
    check(pool_overflow, "D: pool overflow flagged");
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
