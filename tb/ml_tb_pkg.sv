// ml_tb_pkg: test circuits and a reference event-driven simulator for the
// accelerator testbenches.
//
// `circuit` holds a gate-level netlist (types, fanin lists, fanout lists,
// rise/fall delays, initial states) and a list of stimulus events. Its run()
// method simulates the netlist in plain behavioural code with the timing
// rules the hardware is meant to follow: events are taken in time order
// (insertion order among equal times); a time tick first applies up to
// `tick_depth` due events, then evaluates every fanout gate of those events;
// a result that differs from the gate's present state is scheduled after the
// rise delay (new level 1), fall delay (0) or the larger one (unknown); a
// result equal to the present state cancels all pending events of the gate.
// Gates of type T_PMX stand for physical models and are evaluated here, and
// by the testbench's Eval-2 model, as the three-valued majority of their
// first three inputs.
package ml_tb_pkg;
  import mlsim_pkg::*;

  localparam int T_AND = 0, T_NAND = 1, T_OR = 2, T_NOR = 3, T_XOR = 4,
                 T_XNOR = 5, T_BUF = 6, T_NOT = 7, T_PMX = 8, T_XFER = 9, T_TRI = 10,
                 N_TB_TYPES = 11;
  localparam int MAXF = 8;

  function automatic model_t model_of(int t);
    model_t m;
    m = '0;
    unique case (t)
      T_AND:  m.fn = FN_AND;
      T_NAND: begin m.fn = FN_AND; m.invert = 1'b1; end
      T_OR:   m.fn = FN_OR;
      T_NOR:  begin m.fn = FN_OR; m.invert = 1'b1; end
      T_XOR:  m.fn = FN_XOR;
      T_XNOR: begin m.fn = FN_XOR; m.invert = 1'b1; end
      T_BUF:  m.fn = FN_BUF;
      T_NOT:  begin m.fn = FN_BUF; m.invert = 1'b1; end
      T_XFER: m.fn = FN_XFER;
      T_TRI:  m.fn = FN_TRI;
      default: m.pmx = 1'b1;
    endcase
    return m;
  endfunction

  // independent three-valued evaluation (levels 0, 1, 2 = unknown)
  function automatic int lvl(logic [3:0] s);
    return (s[1:0] == 2'd3) ? 2 : int'(s[1:0]);
  endfunction

  function automatic int ref_gate(int t, int ins[$]);
    int n0, n1, nu, r;
    n0 = 0; n1 = 0; nu = 0;
    foreach (ins[i]) begin
      if (ins[i] == 0) n0++; else if (ins[i] == 1) n1++; else nu++;
    end
    unique case (t)
      T_AND, T_NAND: r = (n0 > 0) ? 0 : (nu > 0) ? 2 : 1;
      T_OR, T_NOR:   r = (n1 > 0) ? 1 : (nu > 0) ? 2 : 0;
      T_XOR, T_XNOR: r = (nu > 0) ? 2 : (n1 % 2);
      T_BUF, T_NOT:  r = ins[0];
      default: begin  // majority of the first three inputs
        n0 = 0; n1 = 0;
        for (int i = 0; i < 3 && i < ins.size(); i++) begin
          if (ins[i] == 0) n0++; else if (ins[i] == 1) n1++;
        end
        r = (n1 >= 2) ? 1 : (n0 >= 2) ? 0 : 2;
      end
    endcase
    if (t == T_NAND || t == T_NOR || t == T_XNOR || t == T_NOT) r = (r == 2) ? 2 : 1 - r;
    return r;
  endfunction

  // Full-state reference: logic gates drive forcing strength; transfer
  // gates and tristates follow the level/strength rules written out here
  // independently (strength codes F=0, R=1, Z=2, U=3).
  function automatic logic [3:0] ref_state(int t, logic [3:0] ins[$], logic [3:0] cur);
    int lvls[$];
    int dl, cl, curl, ds, os;
    if (t == T_XFER || t == T_TRI) begin
      dl = (ins.size() > 0) ? lvl(ins[0]) : 2;
      ds = (ins.size() > 0) ? int'(ins[0][3:2]) : 3;
      cl = (ins.size() > 1) ? lvl(ins[1]) : 2;
      curl = lvl(cur);
      os = (t == T_TRI) ? 0 : (ds == 0) ? 1 : ds;
      if (cl == 1) return {2'(os), 2'(dl)};
      if (cl == 0) return {2'd2, 2'(curl)};
      return {2'd3, 2'((dl == curl) ? curl : 2)};
    end
    foreach (ins[i]) lvls.push_back(lvl(ins[i]));
    return {2'd0, 2'(ref_gate(t, lvls))};
  endfunction

  typedef struct {
    int t;
    int g;
    logic [3:0] s;
  } ev_t;

  class circuit;
    int n;
    int typ[];
    int nfi[];
    int fi[];        // n * MAXF
    int fo[][$];
    int rise[];
    int fall[];
    logic [3:0] init[];
    ev_t stim[$];

    // reference simulation results
    logic [3:0] st[];
    ev_t q[$];
    ev_t trace[$];
    int tick_depth;
    int now;
    int n_splits, n_sched, n_spikes, n_evals, n_pmx, n_ticks;

    function new(int n_gates);
      n = n_gates;
      typ = new[n]; nfi = new[n]; fi = new[n * MAXF]; fo = new[n];
      rise = new[n]; fall = new[n]; init = new[n]; st = new[n];
      foreach (typ[i]) begin typ[i] = T_BUF; nfi[i] = 0; rise[i] = 1; fall[i] = 1; init[i] = 4'h0; end
      tick_depth = 1 << 30;
      now = 0;
      n_splits = 0; n_sched = 0; n_spikes = 0; n_evals = 0; n_pmx = 0; n_ticks = 0;
    endfunction

    function void add_gate(int g, int t, int ins[$], int r, int f, int lvl0);
      typ[g] = t; nfi[g] = ins.size(); rise[g] = r; fall[g] = f;
      init[g] = 4'(lvl0);  // forcing strength
      foreach (ins[i]) begin
        fi[g * MAXF + i] = ins[i];
        fo[ins[i]].push_back(g);
      end
    endfunction

    function void add_stim(int t, int g, int level);
      ev_t e;
      e.t = t; e.g = g; e.s = 4'(level);
      stim.push_back(e);
    endfunction

    function void reset_sim();
      foreach (st[i]) st[i] = init[i];
      q.delete();
      trace.delete();
      foreach (stim[i]) insert(stim[i]);
      now = 0;
    endfunction

    function void insert(ev_t e);
      int pos;
      pos = q.size();
      foreach (q[i]) if (q[i].t > e.t) begin pos = i; break; end
      q.insert(pos, e);
    endfunction

    function logic [3:0] eval_gate(int g);
      logic [3:0] ins[$];
      for (int i = 0; i < nfi[g]; i++) ins.push_back(st[fi[g * MAXF + i]]);
      if (typ[g] == T_PMX) begin
        int lv[$];
        foreach (ins[i]) lv.push_back(lvl(ins[i]));
        return 4'(ref_gate(T_PMX, lv));
      end
      return ref_state(typ[g], ins, st[g]);
    endfunction

    function void run(int end_t);
      int popped[$];
      forever begin
        if (q.size() == 0 || q[0].t > end_t) begin now = end_t; break; end
        if (q[0].t > now) now = q[0].t;
        popped.delete();
        n_ticks++;
        while (q.size() > 0 && q[0].t <= now && popped.size() < tick_depth) begin
          ev_t e;
          e = q.pop_front();
          st[e.g] = e.s;
          e.t = now;
          trace.push_back(e);
          popped.push_back(e.g);
        end
        if (q.size() > 0 && q[0].t <= now) n_splits++;
        foreach (popped[k]) begin
          foreach (fo[popped[k]][j]) begin
            int f, r;
            logic [3:0] rs;
            f = fo[popped[k]][j];
            rs = eval_gate(f);
            r = lvl(rs);
            if (typ[f] == T_PMX) n_pmx++; else n_evals++;
            if (rs != st[f]) begin
              ev_t e;
              e.g = f; e.s = rs;
              e.t = now + ((r == 1) ? rise[f] : (r == 0) ? fall[f] :
                           ((rise[f] > fall[f]) ? rise[f] : fall[f]));
              insert(e);
              n_sched++;
            end else begin
              for (int i = q.size() - 1; i >= 0; i--)
                if (q[i].g == f) begin q.delete(i); n_spikes++; end
            end
          end
        end
      end
    endfunction
  endclass

  // The example circuit: A, B inputs; C = nand(A,B) 10; D = nand(A,C) 15;
  // E = nand(B,C) 12; G = nand(D,E) 18; H = buf(G) 1. Gate ids 0..6.
  function automatic circuit example_circuit(int n_gates);
    circuit c;
    int none[$];
    c = new(n_gates);
    c.add_gate(0, T_BUF,  none, 1, 1, 1);
    c.add_gate(1, T_BUF,  none, 1, 1, 1);
    c.add_gate(2, T_NAND, {0, 1}, 10, 10, 0);
    c.add_gate(3, T_NAND, {0, 2}, 15, 15, 1);
    c.add_gate(4, T_NAND, {1, 2}, 12, 12, 1);
    c.add_gate(5, T_NAND, {3, 4}, 18, 18, 1);
    c.add_gate(6, T_BUF,  {5}, 1, 1, 1);
    c.add_stim(100, 0, 0);
    return c;
  endfunction

endpackage
