// eval_unit: the Eval-1 unit, which evaluates gates.
//
// The state unit sends one instruction packet per gate to evaluate:
//   word0 {OP_EVAL, gate}
//   word1 {type[23:16], current state[15:12], fanin count[11:8], 8'b0}
//   then the input states, six 4-bit states per word, first input in [3:0].
// The gate type selects a model from the unit's model memory (loaded by the
// host with OP_LD_MODEL). A model is a base function (and, or, xor, buffer)
// with an optional output inversion; the inputs are folded one per cycle by
// a three-valued table (0, 1, unknown) and the output is driven with forcing
// strength. Two further models use the full level/strength state: a
// unidirectional transfer gate and a tristate driver (input 0 data, input 1
// control, see switch_out in mlsim_pkg). Switched off, their output keeps
// the present level with high-impedance strength. As in the original
// design, the result is compared with the gate's current output: if it
// differs, {OP_SCHED, gate} plus {new state} goes to the queue unit for
// scheduling; if it is the same, {OP_SPIKE, gate} asks the queue unit to
// check for a spike.
//
// Packets whose model is marked "pmx" (a physical chip) are forwarded
// unchanged to the Eval-2 processor on pmx_out. Eval-2's results come back on
// pmx_in as finished OP_SCHED or OP_SPIKE packets and are passed on to the
// queue unit. The end-of-tick marker (OP_TICK_END) is passed on only after
// every forwarded PMX packet has come back, so the queue unit sees all
// results of a tick before the marker.
//
// The original design gives the unit's task and the level/strength example
// that the switch models follow; the packet layout, the model format, the
// fold-based evaluation and the PMX hand-off protocol are this design's.
// The logic gates ignore input strengths; wired nodes with several drivers
// are not resolved.
// Timing: with words waiting and the output channel not full, a packet of n
// inputs takes 3 + n cycles (command, header, one per input, result header),
// plus one cycle for the state word of a schedule request.
module eval_unit
  import mlsim_pkg::*;
#(
  parameter int N_TYPES = 256
) (
  input  logic  clk,
  input  logic  rst_n,
  // input port (Multibus) and input FIFO (from the state unit)
  input  logic  port_valid,
  input  word_t port_data,
  output logic  port_take,
  input  logic  fifo_valid,
  input  word_t fifo_data,
  output logic  fifo_take,
  // output FIFO (to the queue unit)
  output logic  out_push,
  output word_t out_data,
  input  logic  out_full,
  // Eval-2 (physical model processor)
  output logic  pmx_out_valid,
  output word_t pmx_out_data,
  input  logic  pmx_out_ready,
  input  logic  pmx_in_valid,
  input  word_t pmx_in_data,
  output logic  pmx_in_ready,
  // activity counters
  output logic [31:0] n_evals,
  output logic [31:0] n_pmx
);
  typedef enum logic [3:0] {
    S_CMD, S_HDR, S_IN, S_RES0, S_RES1,
    S_PMX_W0, S_PMX_W1, S_PMX_DATA, S_RET1, S_TEND
  } st_e;

  localparam int MA = (N_TYPES > 1) ? $clog2(N_TYPES) : 1;

  st_e        st;
  model_t     models [N_TYPES];
  gate_t      gate_q;
  word_t      w0_q, w1_q;
  sim_state_t cur_q;
  model_t     model_q;
  logic [NIN_W-1:0] n_in_q, idx_q;
  logic [2:0] slot_q;
  level_e     acc_q;
  sim_state_t d_q, c_q;   // inputs 0 and 1, for transfer gates and tristates
  logic [15:0] pmx_outstanding;

  logic  want_cmd, take, w_valid, w_from_port;
  word_t w_data;

  cmd_dispatch u_disp (
    .clk, .rst_n, .want_cmd, .take, .w_valid, .w_data, .w_from_port,
    .port_valid, .port_data, .port_take, .fifo_valid, .fifo_data, .fifo_take
  );

  // current input state when reading a data word
  sim_state_t in_state;
  level_e     next_acc;
  level_e     result_lv;
  sim_state_t result;
  logic       last_in;
  logic       pmx_words_done;

  always_comb begin
    in_state  = sim_state_t'(w_data[slot_q*4 +: 4]);
    next_acc  = fold_level(model_q.fn, acc_q, lv(in_state), idx_q == '0);
    last_in   = (idx_q + 1'b1 == n_in_q);
    pmx_words_done = ({1'b0, idx_q} + (NIN_W+1)'(STATES_PER_WORD)) >= {1'b0, n_in_q};
    result_lv = model_q.invert ? invert_level(acc_q) : acc_q;
    if (model_q.fn == FN_XFER || model_q.fn == FN_TRI) result = switch_out(model_q.fn, d_q, c_q, cur_q);
    else result = '{strength: SG_F, level: result_lv};
  end

  // The return path from Eval-2 is accepted only between commands.
  logic ret_take;
  assign ret_take = (st == S_CMD) && pmx_in_valid && !out_full;

  always_comb begin
    want_cmd      = (st == S_CMD) && !pmx_in_valid;
    take          = 1'b0;
    out_push      = 1'b0;
    out_data      = '0;
    pmx_out_valid = 1'b0;
    pmx_out_data  = '0;
    pmx_in_ready  = 1'b0;
    unique case (st)
      S_CMD: begin
        if (pmx_in_valid) begin
          pmx_in_ready = !out_full;
          out_push     = ret_take;
          out_data     = pmx_in_data;
        end else begin
          // the end-of-tick marker waits for outstanding Eval-2 results
          take = w_valid && !(hdr_op(w_data) == OP_TICK_END && pmx_outstanding != '0);
        end
      end
      S_HDR:  take = w_valid;
      S_IN:   take = w_valid && (slot_q == 3'(STATES_PER_WORD-1) || last_in);
      S_RES0: begin
        out_push = !out_full;
        out_data = mk_hdr((result == cur_q) ? OP_SPIKE : OP_SCHED, gate_q);
      end
      S_RES1: begin out_push = !out_full; out_data = word_t'(result); end
      S_PMX_W0: begin pmx_out_valid = 1'b1; pmx_out_data = w0_q; end
      S_PMX_W1: begin pmx_out_valid = 1'b1; pmx_out_data = w1_q; end
      S_PMX_DATA: begin
        pmx_out_valid = w_valid;
        pmx_out_data  = w_data;
        take          = w_valid && pmx_out_ready;
      end
      S_RET1: begin
        pmx_in_ready = !out_full;
        out_push     = pmx_in_valid && !out_full;
        out_data     = pmx_in_data;
      end
      S_TEND: begin
        out_push = !out_full;
        out_data = mk_hdr(OP_TICK_END, '0);
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk) begin
    if (st == S_CMD && !pmx_in_valid && w_valid && hdr_op(w_data) == OP_LD_MODEL)
      models[MA'(w_data[TYPE_W-1:0])] <= model_t'(w_data[15:8]);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      st <= S_CMD;
      gate_q <= '0; w0_q <= '0; w1_q <= '0; cur_q <= '0; model_q <= '0;
      n_in_q <= '0; idx_q <= '0; slot_q <= '0; acc_q <= LV_0;
      d_q <= '{strength: SG_U, level: LV_U}; c_q <= '{strength: SG_U, level: LV_U};
      pmx_outstanding <= '0; n_evals <= '0; n_pmx <= '0;
    end else begin
      unique case (st)
        S_CMD: begin
          if (pmx_in_valid) begin
            if (ret_take) begin
              pmx_outstanding <= pmx_outstanding - 1'b1;
              if (hdr_op(pmx_in_data) == OP_SCHED) st <= S_RET1;
            end
          end else if (take) begin
            unique case (hdr_op(w_data))
              OP_EVAL: begin
                gate_q <= hdr_gate(w_data);
                w0_q   <= w_data;
                st     <= S_HDR;
              end
              OP_TICK_END: st <= S_TEND;
              default: ;  // OP_LD_MODEL handled above; others ignored
            endcase
          end
        end
        S_HDR: if (w_valid) begin
          w1_q    <= w_data;
          cur_q   <= sim_state_t'(w_data[15:12]);
          n_in_q  <= w_data[11:8];
          model_q <= models[MA'(w_data[23:16])];
          idx_q   <= '0;
          slot_q  <= '0;
          d_q     <= '{strength: SG_U, level: LV_U};
          c_q     <= '{strength: SG_U, level: LV_U};
          acc_q   <= fold_init(models[MA'(w_data[23:16])].fn);
          if (models[MA'(w_data[23:16])].pmx) st <= S_PMX_W0;
          else if (w_data[11:8] == '0) st <= S_RES0;
          else st <= S_IN;
        end
        S_IN: if (w_valid) begin
          // one input per cycle; the word is taken at its last slot
          acc_q <= next_acc;
          if (idx_q == NIN_W'(0)) d_q <= in_state;
          if (idx_q == NIN_W'(1)) c_q <= in_state;
          idx_q <= idx_q + 1'b1;
          slot_q <= (slot_q == 3'(STATES_PER_WORD-1)) ? 3'd0 : slot_q + 1'b1;
          if (last_in) st <= S_RES0;
        end
        S_RES0: if (!out_full) begin
          n_evals <= n_evals + 1'b1;
          if (result == cur_q) st <= S_CMD;
          else st <= S_RES1;
        end
        S_RES1:  if (!out_full) st <= S_CMD;
        S_PMX_W0: if (pmx_out_ready) st <= S_PMX_W1;
        S_PMX_W1: if (pmx_out_ready) begin
          pmx_outstanding <= pmx_outstanding + 1'b1;
          n_pmx <= n_pmx + 1'b1;
          idx_q <= '0;
          if (n_in_q == '0) st <= S_CMD;
          else st <= S_PMX_DATA;
        end
        S_PMX_DATA: if (w_valid && pmx_out_ready) begin
          // count words: ceil(n_in / 6)
          idx_q <= idx_q + NIN_W'(STATES_PER_WORD);
          if (pmx_words_done) st <= S_CMD;
        end
        S_RET1: if (pmx_in_valid && !out_full) st <= S_CMD;
        S_TEND: if (!out_full) st <= S_CMD;
        default: st <= S_CMD;
      endcase
    end
  end

endmodule
