// rhfsm_pkg: types shared by the recursive hierarchical FSM (RHFSM) that runs
// the knapsack backtracking search.
//
// The algorithm is written as a hierarchical graph-scheme with two modules:
// z0 (the entry module, which initialises the search and calls z1 once) and
// z1 (the recursive search module, which calls itself). Node labels a0..a5
// are the RHFSM states; the same label is reused in both modules, so a state
// is only meaningful together with the active module. Labels and module names
// follow the algorithm's graph-scheme; the binary encodings are this design's
// own choice.
package rhfsm_pkg;

  // HGS modules. The active module is the top of the module stack.
  typedef enum logic [0:0] {
    MOD_Z0 = 1'b0,
    MOD_Z1 = 1'b1
  } hgs_module_t;

  // HGS node labels. The current state is the top of the state stack.
  typedef enum logic [2:0] {
    ST_A0 = 3'd0,
    ST_A1 = 3'd1,
    ST_A2 = 3'd2,
    ST_A3 = 3'd3,
    ST_A4 = 3'd4,
    ST_A5 = 3'd5
  } hgs_state_t;

  // Operation applied to both stacks in one clock cycle.
  //   STK_NONE : hold
  //   STK_SET  : overwrite the top (a transition inside the active module)
  //   STK_PUSH : top <= d_top (return state), top+1 <= d_new, pointer + 1
  //   STK_POP  : pointer - 1 (End of the active module)
  typedef enum logic [1:0] {
    STK_NONE = 2'd0,
    STK_SET  = 2'd1,
    STK_PUSH = 2'd2,
    STK_POP  = 2'd3
  } stack_op_t;

  // Action of the current node on the search datapath.
  //   DP_NONE    : nothing (Begin, End)
  //   DP_INIT    : x = 0, opt_x = 0, opt_W = 0, cur_V = cur_W = 0, level = -1
  //   DP_INC     : level++
  //   DP_TAKE    : x[level] = 1, cur_V += v[level], cur_W += w[level]
  //   DP_OPT     : if cur_W > opt_W then opt_W = cur_W, opt_x = x
  //   DP_RESTORE : undo the most recent DP_TAKE and return to its level
  typedef enum logic [2:0] {
    DP_NONE    = 3'd0,
    DP_INIT    = 3'd1,
    DP_INC     = 3'd2,
    DP_TAKE    = 3'd3,
    DP_OPT     = 3'd4,
    DP_RESTORE = 3'd5
  } dp_op_t;

endpackage
