// state_unit: the State unit, which keeps node states and circuit connectivity.
//
// Its memory holds, for every gate, the current state (state array), the gate
// type, and two connectivity lists: the fanin list (the gates that drive its
// inputs, in input order) and the fanout list (the gates it drives). Both
// lists are stored back to back in list memories and found through a
// per-gate base pointer and count. The host fills these tables with
// OP_LD_GATE, OP_LD_FANIN and OP_LD_FANOUT before the simulation starts;
// list space is handed out in load order.
//
// During simulation the queue unit drives two phases per time tick, as the
// original design describes:
//   OP_UPDATE {gate} + {state}   writes the state array (state update phase)
//   OP_FANOUT {gate}             for every gate on the fanout list, build an
//                                instruction packet for the eval unit:
//                                {OP_EVAL, g}, {type, current state, fanin
//                                count}, then the fanin states, six per word.
//   OP_TICK_END                  is passed on to the eval unit.
// Each accepted OP_UPDATE is also shown on the trace outputs (for the host's
// waveform display), and rd_gate/rd_state give the host a read port into the
// state array. Word layouts, list storage and these host ports are this
// design's choices.
// Timing: one table step per cycle; an instruction packet for a gate with n
// fanins takes 3 + n + ceil(n/6) cycles when the output channel is not full.
module state_unit
  import mlsim_pkg::*;
#(
  parameter int N_GATES    = 1 << 20,
  parameter int LIST_DEPTH = 1 << 22,
  parameter int FO_CNT_W   = 12
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
  // host read-back and update trace
  input  gate_t      rd_gate,
  output sim_state_t rd_state,
  output logic       trace_valid,
  output gate_t      trace_gate,
  output sim_state_t trace_state,
  // activity counters
  output logic [31:0] n_updates,
  output logic [31:0] n_packets,
  output logic        list_overflow
);
  localparam int GA = $clog2(N_GATES);
  localparam int LA = $clog2(LIST_DEPTH);
  typedef logic [LA-1:0] lptr_t;

  typedef enum logic [3:0] {
    S_CMD, S_UPD, S_LDG, S_LDCNT, S_LDLIST, S_FO_NEXT, S_FO_W0, S_FO_W1,
    S_FO_GATHER, S_FO_PUSH, S_TEND
  } st_e;

  // unit memory
  sim_state_t       state_arr [N_GATES];
  logic [TYPE_W-1:0] type_arr [N_GATES];
  lptr_t            fi_base [N_GATES];
  logic [NIN_W-1:0] fi_cnt  [N_GATES];
  lptr_t            fo_base [N_GATES];
  logic [FO_CNT_W-1:0] fo_cnt [N_GATES];
  gate_t            fi_list [LIST_DEPTH];
  gate_t            fo_list [LIST_DEPTH];

  st_e   st;
  gate_t gate_q, g_q;
  logic  ld_fanout_q;
  lptr_t fi_top, fo_top;
  logic [FO_CNT_W-1:0] ld_left, fo_i;
  logic [NIN_W-1:0]    fi_j;
  logic [2:0]          slot_q;
  word_t               pack_q;

  logic  want_cmd, take, w_valid, w_from_port;
  word_t w_data;

  cmd_dispatch u_disp (
    .clk, .rst_n, .want_cmd, .take, .w_valid, .w_data, .w_from_port,
    .port_valid, .port_data, .port_take, .fifo_valid, .fifo_data, .fifo_take
  );

  // table look-ups
  gate_t      fo_gate;     // next fanout gate
  gate_t      fi_gate;     // next fanin gate of the gate being packed
  sim_state_t fi_state;
  logic       last_fi;

  always_comb begin
    fo_gate  = fo_list[LA'(fo_base[GA'(gate_q)] + lptr_t'(fo_i))];
    fi_gate  = fi_list[LA'(fi_base[GA'(g_q)] + lptr_t'(fi_j))];
    fi_state = state_arr[GA'(fi_gate)];
    last_fi  = (fi_j + 1'b1 == fi_cnt[GA'(g_q)]);
    rd_state = state_arr[GA'(rd_gate)];
  end

  always_comb begin
    want_cmd = (st == S_CMD);
    take     = 1'b0;
    out_push = 1'b0;
    out_data = '0;
    unique case (st)
      S_CMD, S_UPD, S_LDG, S_LDCNT, S_LDLIST: take = w_valid;
      S_FO_W0: begin out_push = !out_full; out_data = mk_hdr(OP_EVAL, g_q); end
      S_FO_W1: begin
        out_push = !out_full;
        out_data = {type_arr[GA'(g_q)], state_arr[GA'(g_q)], fi_cnt[GA'(g_q)], 8'h00};
      end
      S_FO_PUSH: begin out_push = !out_full; out_data = pack_q; end
      S_TEND: begin out_push = !out_full; out_data = mk_hdr(OP_TICK_END, '0); end
      default: ;
    endcase
  end

  assign trace_valid = (st == S_UPD) && w_valid;
  assign trace_gate  = gate_q;
  assign trace_state = sim_state_t'(w_data[3:0]);

  // memory writes
  always_ff @(posedge clk) begin
    if (st == S_UPD && w_valid) state_arr[GA'(gate_q)] <= sim_state_t'(w_data[3:0]);
    if (st == S_LDG && w_valid) begin
      state_arr[GA'(gate_q)] <= sim_state_t'(w_data[3:0]);
      type_arr[GA'(gate_q)]  <= w_data[11:4];
    end
    if (st == S_LDCNT && w_valid) begin
      if (ld_fanout_q) begin
        fo_base[GA'(gate_q)] <= fo_top;
        fo_cnt[GA'(gate_q)]  <= w_data[FO_CNT_W-1:0];
      end else begin
        fi_base[GA'(gate_q)] <= fi_top;
        fi_cnt[GA'(gate_q)]  <= w_data[NIN_W-1:0];
      end
    end
    if (st == S_LDLIST && w_valid) begin
      if (ld_fanout_q) fo_list[fo_top] <= hdr_gate(w_data);
      else             fi_list[fi_top] <= hdr_gate(w_data);
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      st <= S_CMD;
      gate_q <= '0; g_q <= '0; ld_fanout_q <= 1'b0;
      fi_top <= '0; fo_top <= '0; ld_left <= '0; fo_i <= '0; fi_j <= '0;
      slot_q <= '0; pack_q <= '0;
      n_updates <= '0; n_packets <= '0; list_overflow <= 1'b0;
    end else begin
      unique case (st)
        S_CMD: if (w_valid) begin
          gate_q <= hdr_gate(w_data);
          fo_i   <= '0;
          unique case (hdr_op(w_data))
            OP_UPDATE:    st <= S_UPD;
            OP_FANOUT:    st <= S_FO_NEXT;
            OP_TICK_END:  st <= S_TEND;
            OP_LD_GATE:   st <= S_LDG;
            OP_LD_FANIN:  begin ld_fanout_q <= 1'b0; st <= S_LDCNT; end
            OP_LD_FANOUT: begin ld_fanout_q <= 1'b1; st <= S_LDCNT; end
            default: ;
          endcase
        end
        S_UPD: if (w_valid) begin
          n_updates <= n_updates + 1'b1;
          st <= S_CMD;
        end
        S_LDG: if (w_valid) st <= S_CMD;
        S_LDCNT: if (w_valid) begin
          ld_left <= w_data[FO_CNT_W-1:0];
          st <= (w_data[FO_CNT_W-1:0] == '0) ? S_CMD : S_LDLIST;
        end
        S_LDLIST: if (w_valid) begin
          if (ld_fanout_q) begin
            fo_top <= fo_top + 1'b1;
            if (fo_top == LA'(LIST_DEPTH-1)) list_overflow <= 1'b1;
          end else begin
            fi_top <= fi_top + 1'b1;
            if (fi_top == LA'(LIST_DEPTH-1)) list_overflow <= 1'b1;
          end
          ld_left <= ld_left - 1'b1;
          if (ld_left == FO_CNT_W'(1)) st <= S_CMD;
        end
        S_FO_NEXT: begin
          if (fo_i == fo_cnt[GA'(gate_q)]) st <= S_CMD;
          else begin
            g_q <= fo_gate;
            fo_i <= fo_i + 1'b1;
            st <= S_FO_W0;
          end
        end
        S_FO_W0: if (!out_full) st <= S_FO_W1;
        S_FO_W1: if (!out_full) begin
          n_packets <= n_packets + 1'b1;
          fi_j <= '0;
          slot_q <= '0;
          pack_q <= '0;
          st <= (fi_cnt[GA'(g_q)] == '0) ? S_FO_NEXT : S_FO_GATHER;
        end
        S_FO_GATHER: begin
          pack_q[slot_q*4 +: 4] <= fi_state;
          fi_j <= fi_j + 1'b1;
          slot_q <= slot_q + 1'b1;
          if (last_fi || slot_q == 3'(STATES_PER_WORD-1)) st <= S_FO_PUSH;
        end
        S_FO_PUSH: if (!out_full) begin
          pack_q <= '0;
          slot_q <= '0;
          // fi_j already counts the states packed so far
          st <= (fi_j == fi_cnt[GA'(g_q)]) ? S_FO_NEXT : S_FO_GATHER;
        end
        S_TEND: if (!out_full) st <= S_CMD;
        default: st <= S_CMD;
      endcase
    end
  end

endmodule
