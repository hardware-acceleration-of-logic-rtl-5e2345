// queue_unit: the Queue unit, which holds the event queue and runs time.
//
// The event queue is a linked list of events kept in time order; each event
// is {gate, time, new state}. It lives in an event pool with a free list
// (pool entry 0 is the list terminator). A per-gate count of pending events
// lets the unit find out at once whether a gate has an event scheduled.
// The unit also holds the rise and fall delay of every gate.
//
// Host commands (input port): OP_LD_DELAY {gate} + {rise[23:12], fall[11:0]}
// (also clears the gate's pending count), OP_LD_EVENT {gate} + {time} +
// {state} (a stimulus event), OP_RUN + {end time}.
// Commands from the eval unit (input FIFO): OP_SCHED {gate} + {state}
// inserts an event at now + delay (rise delay for a new level 1, fall delay
// for 0, the larger one for unknown); OP_SPIKE {gate} removes every pending
// event of the gate (the new evaluation cancelled a pulse shorter than the
// gate's delay); OP_TICK_END closes the current time tick.
//
// While running, the unit advances time one unit per cycle until the head
// event is due. A time tick then has two phases, as the original design describes:
// all due events are taken off the queue and sent to the state unit as
// OP_UPDATE packets, then the same gates are sent again as OP_FANOUT, then an
// OP_TICK_END marker. The marker returns through the state and eval units
// behind every result of the tick, so the next tick starts only when all of
// this tick's events are scheduled. Results from the eval unit are served
// before new packets are sent, so the ring cannot lock up when the channels
// fill. If more events are due than the tick buffer holds, the tick is split
// and the rest run in a second pass at the same time. The run ends when the
// queue is empty or the head event is later than the end time; `now` then
// holds the end time.
//
// The original design gives the list structure, the delay table, the schedule and
// spike-check tasks and the two phases. The pool and tick-buffer sizes, the
// word layouts, the end-of-tick marker, the spike action (removal) and the
// choice of delay for an unknown level are this design's.
// Timing: inserting walks one list entry per cycle.
module queue_unit
  import mlsim_pkg::*;
#(
  parameter int N_GATES    = 1 << 20,
  parameter int EV_DEPTH   = 1 << 16,
  parameter int TICK_DEPTH = 1 << 12
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  port_valid,
  input  word_t port_data,
  output logic  port_take,
  input  logic  fifo_valid,
  input  word_t fifo_data,
  output logic  fifo_take,
  output logic  out_push,
  output word_t out_data,
  input  logic  out_full,
  input  logic  out_room,     // output channel has room for a two-word packet
  // status for the host
  output logic        running,
  output simtime_t    now,
  output logic [31:0] n_events,     // events taken off the queue
  output logic [31:0] n_sched,      // events scheduled by the eval unit
  output logic [31:0] n_spikes,     // pending events removed by a spike check
  output logic [31:0] n_ticks,
  output logic [31:0] n_splits,     // ticks split because the tick buffer filled
  output logic        pool_overflow // an event was dropped: pool full
);
  localparam int GA = $clog2(N_GATES);
  localparam int EA = $clog2(EV_DEPTH);
  localparam int TA = $clog2(TICK_DEPTH);
  typedef logic [EA-1:0] eptr_t;
  localparam eptr_t NIL = '0;

  typedef enum logic [4:0] {
    S_CMD, S_LDD, S_LDE_T, S_LDE_S, S_RUN_T, S_SCH_S, S_INS_ALLOC, S_INS_WALK,
    S_RM_WALK, S_POP_W0, S_POP_W1, S_FAN, S_TEND
  } st_e;
  typedef enum logic [1:0] {T_IDLE, T_POP, T_FAN, T_WAIT} tphase_e;

  // unit memory
  logic [DELAY_W-1:0] rise_d [N_GATES];
  logic [DELAY_W-1:0] fall_d [N_GATES];
  logic [7:0]         pend   [N_GATES];
  gate_t              ev_gate  [EV_DEPTH];
  simtime_t           ev_time  [EV_DEPTH];
  sim_state_t         ev_state [EV_DEPTH];
  eptr_t              ev_next  [EV_DEPTH];
  gate_t              tick_buf [TICK_DEPTH];

  st_e     st;
  tphase_e tph;
  eptr_t   head, free_head, bump, node_q, prev_q;
  logic    bump_full;
  simtime_t end_time, ins_time;
  gate_t   gate_q;
  sim_state_t ins_state;
  logic [TA:0] tb_n, tb_k;

  logic  want_cmd, take, w_valid, w_from_port;
  word_t w_data;

  cmd_dispatch u_disp (
    .clk, .rst_n, .want_cmd, .take, .w_valid, .w_data, .w_from_port,
    .port_valid, .port_data, .port_take, .fifo_valid, .fifo_data, .fifo_take
  );

  // schedule time for the event carried by an OP_SCHED data word
  sim_state_t sch_state;
  simtime_t   sch_time;
  logic [DELAY_W-1:0] d_rise, d_fall, d_max;
  always_comb begin
    sch_state = sim_state_t'(w_data[3:0]);
    d_rise = rise_d[GA'(gate_q)];
    d_fall = fall_d[GA'(gate_q)];
    d_max  = (d_rise > d_fall) ? d_rise : d_fall;
    unique case (lv(sch_state))
      LV_1:    sch_time = now + simtime_t'(d_rise);
      LV_0:    sch_time = now + simtime_t'(d_fall);
      default: sch_time = now + simtime_t'(d_max);
    endcase
  end

  // list walk
  eptr_t walk_next;
  logic  head_due, tick_free;
  assign walk_next = ev_next[prev_q];
  assign head_due  = (head != NIL) && (ev_time[head] <= now);
  assign tick_free = (tb_n != (TA+1)'(TICK_DEPTH));

  // Tick work is done only between commands and when no command is waiting.
  logic idle_slot;
  // Packets are only started when the output channel can take them whole, so
  // the unit never stalls on its output while results wait at its input.
  assign idle_slot = (st == S_CMD) && !w_valid && running && out_room;

  logic ins_at_head, ins_after;
  assign ins_at_head = (prev_q == NIL) && (head == NIL || ev_time[head] > ins_time);
  assign ins_after   = (prev_q != NIL) && (walk_next == NIL || ev_time[walk_next] > ins_time);

  always_comb begin
    want_cmd = (st == S_CMD);
    take     = 1'b0;
    out_push = 1'b0;
    out_data = '0;
    unique case (st)
      S_CMD, S_LDD, S_LDE_T, S_LDE_S, S_RUN_T, S_SCH_S: take = w_valid;
      S_POP_W0: begin out_push = !out_full; out_data = mk_hdr(OP_UPDATE, ev_gate[head]); end
      S_POP_W1: begin out_push = !out_full; out_data = word_t'(ev_state[head]); end
      S_FAN: begin out_push = !out_full; out_data = mk_hdr(OP_FANOUT, tick_buf[TA'(tb_k)]); end
      S_TEND: begin out_push = !out_full; out_data = mk_hdr(OP_TICK_END, '0); end
      default: ;
    endcase
  end

  // memory writes
  always_ff @(posedge clk) begin
    if (st == S_LDD && w_valid) begin
      rise_d[GA'(gate_q)] <= w_data[2*DELAY_W-1:DELAY_W];
      fall_d[GA'(gate_q)] <= w_data[DELAY_W-1:0];
    end
    if (st == S_INS_ALLOC && !(free_head == NIL && bump_full)) begin
      ev_gate[(free_head != NIL) ? free_head : bump]  <= gate_q;
      ev_time[(free_head != NIL) ? free_head : bump]  <= ins_time;
      ev_state[(free_head != NIL) ? free_head : bump] <= ins_state;
    end
    // link updates
    if (st == S_INS_WALK) begin
      if (ins_at_head) ev_next[node_q] <= head;
      if (ins_after) begin
        ev_next[node_q] <= walk_next;
        ev_next[prev_q] <= node_q;
      end
    end
    if (st == S_RM_WALK && node_q != NIL && ev_gate[node_q] == gate_q) begin
      if (prev_q != NIL) ev_next[prev_q] <= ev_next[node_q];
      ev_next[node_q] <= free_head;
    end
    if (st == S_POP_W1 && !out_full) begin
      ev_next[head] <= free_head;
      tick_buf[TA'(tb_n)] <= ev_gate[head];
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      st <= S_CMD; tph <= T_IDLE; running <= 1'b0; now <= '0; end_time <= '0;
      head <= NIL; free_head <= NIL; bump <= eptr_t'(1); bump_full <= 1'b0;
      node_q <= NIL; prev_q <= NIL; ins_time <= '0; ins_state <= '0; gate_q <= '0;
      tb_n <= '0; tb_k <= '0;
      n_events <= '0; n_sched <= '0; n_spikes <= '0; n_ticks <= '0; n_splits <= '0;
      pool_overflow <= 1'b0;
    end else begin
      unique case (st)
        S_CMD: begin
          if (w_valid) begin
            gate_q <= hdr_gate(w_data);
            unique case (hdr_op(w_data))
              OP_LD_DELAY: st <= S_LDD;
              OP_LD_EVENT: st <= S_LDE_T;
              OP_RUN:      st <= S_RUN_T;
              OP_SCHED:    st <= S_SCH_S;
              OP_SPIKE: begin
                if (pend[GA'(hdr_gate(w_data))] != '0) begin
                  prev_q <= NIL;
                  node_q <= head;
                  st <= S_RM_WALK;
                end
              end
              OP_TICK_END: if (tph == T_WAIT) tph <= T_IDLE;
              default: ;
            endcase
          end else if (idle_slot) begin
            unique case (tph)
              T_IDLE: begin
                if (head == NIL || ev_time[head] > end_time) begin
                  running <= 1'b0;
                  now <= end_time;
                end else if (ev_time[head] <= now) begin
                  tph <= T_POP;
                  tb_n <= '0;
                  n_ticks <= n_ticks + 1'b1;
                end else begin
                  now <= now + 1'b1;
                end
              end
              T_POP: begin
                if (head_due && tick_free) st <= S_POP_W0;
                else begin
                  if (head_due) n_splits <= n_splits + 1'b1;
                  tph <= T_FAN;
                  tb_k <= '0;
                end
              end
              T_FAN: begin
                if (tb_k == tb_n) begin
                  st <= S_TEND;
                  tph <= T_WAIT;
                end else st <= S_FAN;
              end
              default: ;  // T_WAIT: wait for the marker
            endcase
          end
        end
        S_LDD: if (w_valid) begin
          pend[GA'(gate_q)] <= '0;
          st <= S_CMD;
        end
        S_LDE_T: if (w_valid) begin ins_time <= w_data; st <= S_LDE_S; end
        S_LDE_S: if (w_valid) begin ins_state <= sim_state_t'(w_data[3:0]); st <= S_INS_ALLOC; end
        S_RUN_T: if (w_valid) begin
          end_time <= w_data;
          running  <= 1'b1;
          tph      <= T_IDLE;
          st       <= S_CMD;
        end
        S_SCH_S: if (w_valid) begin
          ins_state <= sch_state;
          ins_time  <= sch_time;
          n_sched   <= n_sched + 1'b1;
          st <= S_INS_ALLOC;
        end
        S_INS_ALLOC: begin
          if (free_head != NIL) begin
            node_q <= free_head;
            free_head <= ev_next[free_head];
            prev_q <= NIL;
            st <= S_INS_WALK;
          end else if (!bump_full) begin
            node_q <= bump;
            bump <= bump + 1'b1;
            if (bump == eptr_t'(EV_DEPTH-1)) bump_full <= 1'b1;
            prev_q <= NIL;
            st <= S_INS_WALK;
          end else begin
            pool_overflow <= 1'b1;
            st <= S_CMD;
          end
        end
        S_INS_WALK: begin
          if (ins_at_head) head <= node_q;
          if (ins_at_head || ins_after) begin
            pend[GA'(gate_q)] <= pend[GA'(gate_q)] + 1'b1;
            st <= S_CMD;
          end else prev_q <= (prev_q == NIL) ? head : walk_next;
        end
        S_RM_WALK: begin
          if (node_q == NIL) st <= S_CMD;
          else if (ev_gate[node_q] == gate_q) begin
            if (prev_q == NIL) head <= ev_next[node_q];
            free_head <= node_q;
            pend[GA'(gate_q)] <= pend[GA'(gate_q)] - 1'b1;
            n_spikes <= n_spikes + 1'b1;
            node_q <= ev_next[node_q];
            if (pend[GA'(gate_q)] == 8'd1) st <= S_CMD;
          end else begin
            prev_q <= node_q;
            node_q <= ev_next[node_q];
          end
        end
        S_POP_W0: if (!out_full) st <= S_POP_W1;
        S_POP_W1: if (!out_full) begin
          head <= ev_next[head];
          free_head <= head;
          pend[GA'(ev_gate[head])] <= pend[GA'(ev_gate[head])] - 1'b1;
          tb_n <= tb_n + 1'b1;
          n_events <= n_events + 1'b1;
          st <= S_CMD;
        end
        S_FAN: if (!out_full) begin
          tb_k <= tb_k + 1'b1;
          st <= S_CMD;
        end
        S_TEND: if (!out_full) st <= S_CMD;
        default: st <= S_CMD;
      endcase
    end
  end

endmodule
