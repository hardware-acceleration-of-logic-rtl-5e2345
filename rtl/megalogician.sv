// megalogician: the logic simulation accelerator, a circular pipeline of
// three processing units.
//
// The simulation algorithm is split by function into three units, each with
// its own memory, and the units talk only through one-way FIFO channels:
//
//   queue unit --events--> state unit --instruction packets--> eval unit
//        ^                                                         |
//        +-------------------------- results ----------------------+
//
// The queue unit keeps the time-ordered event queue and the gate delays and
// runs simulation time. The state unit keeps the state of every node and the
// fanin/fanout lists; it applies state updates and, for every gate an event
// fans out to, collects the input states into an instruction packet. The
// eval unit evaluates the packet and returns either a new event to schedule
// or a spike check. Eval-2, the processor that evaluates physical chips, is
// outside this block: packets for such gates leave on pmx_out and the
// results return on pmx_in. Each unit has an input port on the host bus for
// loading its tables and for commands. The three units work at the same
// time; the channels (256 x 24 each, as in the original design) absorb short-term
// speed differences.
//
// Host ports: q_/s_/e_host_* write one word into a unit's input port, the
// host polls *_full before writing. Status: running/now from the queue unit,
// rd_gate/rd_state read the state array, trace_* show every state update as
// it is applied (time = now). Word formats are given in mlsim_pkg and in the
// unit files. Unit partitioning, channel sizes and the two-phase tick follow
// the original design; the handshakes and host ports are this design's.
module megalogician
  import mlsim_pkg::*;
#(
  parameter int N_GATES    = 1 << 20,
  parameter int LIST_DEPTH = 1 << 22,
  parameter int EV_DEPTH   = 1 << 16,
  parameter int TICK_DEPTH = 1 << 12,
  parameter int N_TYPES    = 256,
  parameter int FIFO_DEPTH = 256
) (
  input  logic  clk,
  input  logic  rst_n,
  // host bus: one input port per unit
  input  logic  q_host_wr,
  input  word_t q_host_wdata,
  output logic  q_host_full,
  input  logic  s_host_wr,
  input  word_t s_host_wdata,
  output logic  s_host_full,
  input  logic  e_host_wr,
  input  word_t e_host_wdata,
  output logic  e_host_full,
  // Eval-2 (physical modelling) channel
  output logic  pmx_out_valid,
  output word_t pmx_out_data,
  input  logic  pmx_out_ready,
  input  logic  pmx_in_valid,
  input  word_t pmx_in_data,
  output logic  pmx_in_ready,
  // status and observation
  output logic        running,
  output simtime_t    now,
  input  gate_t       rd_gate,
  output sim_state_t  rd_state,
  output logic        trace_valid,
  output gate_t       trace_gate,
  output sim_state_t  trace_state,
  output logic [31:0] n_events,
  output logic [31:0] n_sched,
  output logic [31:0] n_spikes,
  output logic [31:0] n_ticks,
  output logic [31:0] n_splits,
  output logic [31:0] n_updates,
  output logic [31:0] n_packets,
  output logic [31:0] n_evals,
  output logic [31:0] n_pmx,
  output logic        pool_overflow,
  output logic        list_overflow,
  output logic [2:0]  chan_full_seen   // a channel (q->s, s->e, e->q) was full
);
  localparam int CW = $clog2(FIFO_DEPTH) + 1;

  // input ports
  logic  q_pv, s_pv, e_pv, q_pt, s_pt, e_pt;
  word_t q_pd, s_pd, e_pd;

  host_port u_qport (.clk, .rst_n, .host_wr(q_host_wr), .host_wdata(q_host_wdata),
    .host_full(q_host_full), .port_valid(q_pv), .port_data(q_pd), .port_take(q_pt));
  host_port u_sport (.clk, .rst_n, .host_wr(s_host_wr), .host_wdata(s_host_wdata),
    .host_full(s_host_full), .port_valid(s_pv), .port_data(s_pd), .port_take(s_pt));
  host_port u_eport (.clk, .rst_n, .host_wr(e_host_wr), .host_wdata(e_host_wdata),
    .host_full(e_host_full), .port_valid(e_pv), .port_data(e_pd), .port_take(e_pt));

  // channels
  logic  qs_push, qs_full, qs_pop, qs_empty;
  logic  se_push, se_full, se_pop, se_empty;
  logic  eq_push, eq_full, eq_pop, eq_empty;
  word_t qs_din, qs_dout, se_din, se_dout, eq_din, eq_dout;
  logic [CW-1:0] qs_cnt, se_cnt, eq_cnt;
  logic  qs_room;

  sync_fifo #(.WIDTH(WORD_W), .DEPTH(FIFO_DEPTH)) u_q2s (.clk, .rst_n,
    .push(qs_push), .din(qs_din), .full(qs_full), .pop(qs_pop), .dout(qs_dout),
    .empty(qs_empty), .count(qs_cnt));
  sync_fifo #(.WIDTH(WORD_W), .DEPTH(FIFO_DEPTH)) u_s2e (.clk, .rst_n,
    .push(se_push), .din(se_din), .full(se_full), .pop(se_pop), .dout(se_dout),
    .empty(se_empty), .count(se_cnt));
  sync_fifo #(.WIDTH(WORD_W), .DEPTH(FIFO_DEPTH)) u_e2q (.clk, .rst_n,
    .push(eq_push), .din(eq_din), .full(eq_full), .pop(eq_pop), .dout(eq_dout),
    .empty(eq_empty), .count(eq_cnt));

  assign qs_room = (qs_cnt <= CW'(FIFO_DEPTH - 2));

  queue_unit #(.N_GATES(N_GATES), .EV_DEPTH(EV_DEPTH), .TICK_DEPTH(TICK_DEPTH)) u_queue (
    .clk, .rst_n,
    .port_valid(q_pv), .port_data(q_pd), .port_take(q_pt),
    .fifo_valid(!eq_empty), .fifo_data(eq_dout), .fifo_take(eq_pop),
    .out_push(qs_push), .out_data(qs_din), .out_full(qs_full), .out_room(qs_room),
    .running, .now, .n_events, .n_sched, .n_spikes, .n_ticks, .n_splits, .pool_overflow
  );

  state_unit #(.N_GATES(N_GATES), .LIST_DEPTH(LIST_DEPTH)) u_state (
    .clk, .rst_n,
    .port_valid(s_pv), .port_data(s_pd), .port_take(s_pt),
    .fifo_valid(!qs_empty), .fifo_data(qs_dout), .fifo_take(qs_pop),
    .out_push(se_push), .out_data(se_din), .out_full(se_full),
    .rd_gate, .rd_state, .trace_valid, .trace_gate, .trace_state,
    .n_updates, .n_packets, .list_overflow
  );

  eval_unit #(.N_TYPES(N_TYPES)) u_eval (
    .clk, .rst_n,
    .port_valid(e_pv), .port_data(e_pd), .port_take(e_pt),
    .fifo_valid(!se_empty), .fifo_data(se_dout), .fifo_take(se_pop),
    .out_push(eq_push), .out_data(eq_din), .out_full(eq_full),
    .pmx_out_valid, .pmx_out_data, .pmx_out_ready,
    .pmx_in_valid, .pmx_in_data, .pmx_in_ready,
    .n_evals, .n_pmx
  );

  always_ff @(posedge clk) begin
    if (!rst_n) chan_full_seen <= '0;
    else chan_full_seen <= chan_full_seen | {eq_full, se_full, qs_full};
  end

endmodule
