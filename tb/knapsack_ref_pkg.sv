// knapsack_ref_pkg: reference models for the knapsack RHFSM testbenches.
//
// ref_search() runs the same depth-first search as an ordinary recursive
// software function and counts what the hardware should do: one clock cycle
// per graph-scheme node (Begin and End included), module calls, returns,
// objects rejected because they do not fit, the deepest stack pointer
// reached, and the best vector found with a strict '>' in visiting order.
// brute_force() tries all 2^n vectors to give the optimum weight
// independently of any search order.
package knapsack_ref_pkg;

  int    r_n, r_cap;
  int    r_w [64];
  int    r_v [64];
  longint r_cycles;
  int    r_calls, r_returns, r_prunes, r_max_sp;
  int    r_level, r_cur_v, r_cur_w, r_opt_w;
  longint unsigned r_x, r_opt_x;

  // Module z1, entered at stack pointer sp.
  function automatic void ref_z1(int sp);
    if (sp > r_max_sp) r_max_sp = sp;
    r_cycles++;                                  // a0 Begin
    forever begin
      r_cycles++;                                // a1 level++
      r_level++;
      if (r_level != r_n && r_cur_v + r_v[r_level] <= r_cap) begin
        int my_level = r_level;
        r_cycles++;                              // a2 take
        r_x[my_level] = 1'b1;
        r_cur_v += r_v[my_level];
        r_cur_w += r_w[my_level];
        r_cycles++;                              // a3 best + call
        if (r_cur_w > r_opt_w) begin r_opt_w = r_cur_w; r_opt_x = r_x; end
        r_calls++;
        ref_z1(sp + 1);
        r_cycles++;                              // a4 restore
        r_x[my_level] = 1'b0;
        r_cur_v -= r_v[my_level];
        r_cur_w -= r_w[my_level];
        r_level = my_level;
      end else if (r_level != r_n) begin
        r_prunes++;
      end else begin
        break;
      end
    end
    r_cycles++;                                  // a5 End
    r_returns++;
  endfunction

  // Module z0 and the whole search. Returns the number of clock cycles.
  function automatic longint ref_search();
    r_cycles = 0; r_calls = 0; r_returns = 0; r_prunes = 0; r_max_sp = 0;
    r_x = 0; r_opt_x = 0; r_opt_w = 0; r_cur_v = 0; r_cur_w = 0;
    r_level = -1;
    r_cycles++;                                  // z0 a0 init + call
    r_calls++;
    ref_z1(1);
    r_cycles++;                                  // z0 a1 End
    return r_cycles;
  endfunction

  function automatic int brute_force();
    int best = 0;
    for (longint unsigned m = 0; m < (64'd1 << r_n); m++) begin
      int sw = 0, sv = 0;
      for (int i = 0; i < r_n; i++) if (m[i]) begin sw += r_w[i]; sv += r_v[i]; end
      if (sv <= r_cap && sw > best) best = sw;
    end
    return best;
  endfunction

endpackage
