// mlsim_pkg: shared types, constants and evaluation functions of the logic
// simulation accelerator.
//
// Every unit talks in 24-bit words. A packet starts with a header word
// {opcode[23:20], gate[19:0]}; the 20-bit gate identifier covers the
// one-million-gate capacity of the machine. Further words of a packet are
// data whose meaning depends on the opcode (see the unit files). Following
// the original design, a node state is a level/strength pair (12 states: levels
// 0, 1, U and strengths forcing, resistive, high impedance, unknown); here it
// is packed into 4 bits. The opcode values, field positions and widths other
// than the 24-bit word are this design's own choices.
package mlsim_pkg;

  localparam int WORD_W  = 24;  // internal data bus and FIFO width
  localparam int OP_W    = 4;
  localparam int GATE_W  = 20;  // 2**20 gates: "up to 1 million gates"
  localparam int TIME_W  = 24;  // simulation time in one word
  localparam int DELAY_W = 12;  // rise and fall delay share one word
  localparam int TYPE_W  = 8;   // gate type code
  localparam int NIN_W   = 4;   // fanin count carried in a packet
  localparam int STATES_PER_WORD = 6;  // 4-bit states packed per word

  typedef logic [WORD_W-1:0] word_t;
  typedef logic [GATE_W-1:0] gate_t;
  typedef logic [TIME_W-1:0] simtime_t;

  typedef enum logic [1:0] {LV_0 = 2'd0, LV_1 = 2'd1, LV_U = 2'd2, LV_X = 2'd3} level_e;
  typedef enum logic [1:0] {SG_F = 2'd0, SG_R = 2'd1, SG_Z = 2'd2, SG_U = 2'd3} strength_e;

  typedef struct packed {
    strength_e strength;
    level_e    level;
  } sim_state_t;

  typedef enum logic [OP_W-1:0] {
    OP_NOP       = 4'd0,
    // Queue unit
    OP_RUN       = 4'd1,   // host: word1 = end time
    OP_LD_DELAY  = 4'd2,   // host: word1 = {rise, fall}
    OP_LD_EVENT  = 4'd3,   // host: word1 = time, word2 = state
    OP_SCHED     = 4'd4,   // eval: word1 = new state
    OP_SPIKE     = 4'd5,   // eval: spike check for gate
    OP_TICK_END  = 4'd6,   // end-of-tick marker travelling round the ring
    // State unit
    OP_UPDATE    = 4'd7,   // queue: word1 = new state
    OP_FANOUT    = 4'd8,   // queue: evaluate the fanout of gate
    OP_LD_GATE   = 4'd9,   // host: word1 = {type, state}
    OP_LD_FANIN  = 4'd10,  // host: word1 = count, then count gate words
    OP_LD_FANOUT = 4'd11,  // host: word1 = count, then count gate words
    // Eval unit
    OP_EVAL      = 4'd12,  // state: instruction packet
    OP_LD_MODEL  = 4'd13   // host: header [15:8] = model, [7:0] = type
  } opcode_e;

  // Behaviour of a gate type, held in the eval unit memory.
  // FN_XFER is a unidirectional transfer gate and FN_TRI a tristate driver;
  // for both, input 0 is the data and input 1 the control.
  typedef enum logic [2:0] {
    FN_AND = 3'd0, FN_OR = 3'd1, FN_XOR = 3'd2, FN_BUF = 3'd3,
    FN_XFER = 3'd4, FN_TRI = 3'd5
  } gate_fn_e;
  typedef struct packed {
    logic     reserved;
    logic     pmx;      // evaluated by the physical-model processor (Eval-2)
    logic     invert;   // complement the result (nand, nor, xnor, not)
    logic [1:0] spare;
    gate_fn_e fn;
  } model_t;

  function automatic word_t mk_hdr(opcode_e op, gate_t g);
    return {op, g};
  endfunction

  function automatic opcode_e hdr_op(word_t w);
    return opcode_e'(w[WORD_W-1 -: OP_W]);
  endfunction

  function automatic gate_t hdr_gate(word_t w);
    return w[GATE_W-1:0];
  endfunction

  // Level of a state, with the unused level code read as unknown.
  function automatic level_e lv(sim_state_t s);
    return (s.level == LV_X) ? LV_U : s.level;
  endfunction

  // Fold one more input level into a partial result (3-valued logic).
  function automatic level_e fold_level(gate_fn_e fn, level_e acc, level_e in, logic first);
    level_e r;
    unique case (fn)
      FN_AND: r = (acc == LV_0 || in == LV_0) ? LV_0 :
                  (acc == LV_U || in == LV_U) ? LV_U : LV_1;
      FN_OR:  r = (acc == LV_1 || in == LV_1) ? LV_1 :
                  (acc == LV_U || in == LV_U) ? LV_U : LV_0;
      FN_XOR: r = (acc == LV_U || in == LV_U) ? LV_U :
                  ((acc == LV_1) != (in == LV_1)) ? LV_1 : LV_0;
      default: r = first ? in : acc;  // FN_BUF passes its first input
    endcase
    return r;
  endfunction

  // Starting value of the fold: the identity of the function.
  function automatic level_e fold_init(gate_fn_e fn);
    return (fn == FN_AND) ? LV_1 : LV_0;
  endfunction

  function automatic level_e invert_level(level_e l);
    return (l == LV_0) ? LV_1 : (l == LV_1) ? LV_0 : LV_U;
  endfunction

  // Output of a transfer gate or tristate driver. Switched on, the data level
  // is passed on: a tristate driver drives it with forcing strength, a
  // transfer gate passes it through a resistive channel (forcing becomes
  // resistive, weaker strengths pass unchanged). Switched off, the node keeps
  // its level as stored charge (high impedance). With an unknown control
  // the strength is unknown, and the level is kept only where the on and off
  // cases agree.
  function automatic sim_state_t switch_out(gate_fn_e fn, sim_state_t d, sim_state_t c,
                                            sim_state_t cur);
    sim_state_t on_v, r;
    on_v.level    = lv(d);
    on_v.strength = (fn == FN_TRI) ? SG_F : (d.strength == SG_F) ? SG_R : d.strength;
    unique case (lv(c))
      LV_1:    r = on_v;
      LV_0:    r = '{strength: SG_Z, level: lv(cur)};
      default: r = '{strength: SG_U, level: (on_v.level == lv(cur)) ? lv(cur) : LV_U};
    endcase
    return r;
  endfunction

endpackage
