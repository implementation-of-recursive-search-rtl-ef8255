// knapsack_rhfsm: a recursive hierarchical finite state machine (RHFSM) that
// solves the 0-1 knapsack problem by depth-first backtracking over the binary
// search tree, pruning every branch whose volume would exceed the capacity V.
//
// Recursion in hardware: the search is a recursive procedure (module z1 calls
// itself once per object it takes), and the RHFSM executes it with two
// stacks, exactly as a processor would with a call stack:
//   - the state stack (FSM_stack) holds, per active module invocation, the
//     state to execute; its top is the current state;
//   - the module stack (M_stack) holds which module each invocation runs;
//     its top selects the active module.
// A combinational circuit (CC) takes the two tops and the datapath
// conditions and decides the next state, a call (push: return state into
// the old top, state a0 and the called module into the new top) or a return
// (pop). The datapath part of the CC holds x, cur_V, cur_W, level, opt_x and
// opt_W. See knapsack_cc for the node list.
//
// Interface and timing: load the objects through item_we/item_addr/
// item_weight/item_volume, set n_items (n <= N_MAX) and capacity (V), then
// pulse `start`. `busy` is high while searching; `done` pulses for one cycle
// when z0 ends, and opt_x/opt_w then hold the best vector and its weight
// until the next start. Every node of the graph-scheme takes one clock cycle
// (Begin and End included). call_evt/ret_evt/prune_evt/stall are per-cycle
// event strobes for monitoring. `start` while busy is ignored.
//
// MAX_LEVELS is the stack depth. The deepest nesting is z0 plus one z1 per
// tree level plus the leaf invocation, i.e. n + 2, hence the default
// N_MAX + 2. A call that finds the stacks full waits (`stall` high) and is
// retried; with a smaller MAX_LEVELS the search may therefore hang.
//
// Following the algorithm: the structure (two stacks and a CC), the module
// call and return sequence, the graph-scheme. This design's own choices: the
// default sizes (N_MAX, widths), the loading port and start/busy/done.
module knapsack_rhfsm
  import rhfsm_pkg::*;
#(
  parameter int N_MAX      = 16,
  parameter int W_W        = 8,
  parameter int V_W        = 8,
  parameter int MAX_LEVELS = N_MAX + 2,
  localparam int AW        = (N_MAX > 1) ? $clog2(N_MAX) : 1,
  localparam int NW        = $clog2(N_MAX + 1),
  localparam int SW        = W_W + NW,
  localparam int CW        = V_W + NW,
  localparam int PW        = (MAX_LEVELS > 1) ? $clog2(MAX_LEVELS) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  // object table loading
  input  logic             item_we,
  input  logic [AW-1:0]    item_addr,
  input  logic [W_W-1:0]   item_weight,
  input  logic [V_W-1:0]   item_volume,
  // problem and run control
  input  logic [NW-1:0]    n_items,
  input  logic [CW-1:0]    capacity,
  input  logic             start,
  output logic             busy,
  output logic             done,
  output logic             stall,
  // result
  output logic [N_MAX-1:0] opt_x,
  output logic [SW-1:0]    opt_w,
  // event strobes
  output logic             call_evt,
  output logic             ret_evt,
  output logic             prune_evt
);

  logic busy_q;
  logic init;
  assign init = start && !busy_q;

  // --- stacks -----------------------------------------------------------
  stack_op_t   stk_op;
  hgs_state_t  next_state, cur_state;
  hgs_module_t call_module, cur_module;
  logic [2:0]  fsm_top;
  logic [0:0]  m_top;
  logic [PW-1:0] fsm_sp, m_sp;
  logic        fsm_full, m_full;

  rhfsm_stack #(.WIDTH(3), .DEPTH(MAX_LEVELS)) u_fsm_stack (
    .clk      (clk),
    .rst_n    (rst_n),
    .init     (init),
    .init_val (ST_A0),
    .op       (stk_op),
    .d_top    (next_state),
    .d_new    (ST_A0),
    .top      (fsm_top),
    .sp       (fsm_sp),
    .full     (fsm_full)
  );

  rhfsm_stack #(.WIDTH(1), .DEPTH(MAX_LEVELS)) u_m_stack (
    .clk      (clk),
    .rst_n    (rst_n),
    .init     (init),
    .init_val (MOD_Z0),
    .op       (stk_op),
    .d_top    (m_top),
    .d_new    (call_module),
    .top      (m_top),
    .sp       (m_sp),
    .full     (m_full)
  );

  assign cur_state  = hgs_state_t'(fsm_top);
  assign cur_module = hgs_module_t'(m_top);

  // --- combinational circuit: control --------------------------------------
  dp_op_t dp_op;
  logic   c_more, c_fit, finish, prune;

  knapsack_cc u_cc (
    .en          (busy_q),
    .module_i    (cur_module),
    .state_i     (cur_state),
    .sp_zero     (fsm_sp == '0),
    .stk_full    (fsm_full),
    .c_more      (c_more),
    .c_fit       (c_fit),
    .stk_op      (stk_op),
    .next_state  (next_state),
    .call_module (call_module),
    .dp_op       (dp_op),
    .finish      (finish),
    .stall       (stall),
    .prune       (prune)
  );

  // --- combinational circuit: knapsack datapath and object table --------------
  logic [AW-1:0]  rd_addr;
  logic [N_MAX-1:0]   cur_x;
  logic [CW-1:0]      cur_v;
  logic [SW-1:0]      cur_w;
  logic signed [NW:0] level;
  logic [W_W-1:0] rd_weight;
  logic [V_W-1:0] rd_volume;

  knapsack_item_mem #(.N_MAX(N_MAX), .W_W(W_W), .V_W(V_W)) u_items (
    .clk     (clk),
    .we      (item_we && !busy_q),
    .waddr   (item_addr),
    .wweight (item_weight),
    .wvolume (item_volume),
    .raddr   (rd_addr),
    .rweight (rd_weight),
    .rvolume (rd_volume)
  );

  knapsack_datapath #(.N_MAX(N_MAX), .W_W(W_W), .V_W(V_W)) u_dp (
    .clk         (clk),
    .rst_n       (rst_n),
    .dp_op       (dp_op),
    .n_items     (n_items),
    .capacity    (capacity),
    .item_addr   (rd_addr),
    .item_weight (rd_weight),
    .item_volume (rd_volume),
    .c_more      (c_more),
    .c_fit       (c_fit),
    .opt_x       (opt_x),
    .opt_w       (opt_w),
    .cur_x       (cur_x),
    .cur_v       (cur_v),
    .cur_w       (cur_w),
    .level       (level)
  );

  // --- run control ---------------------------------------------------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy_q <= 1'b0;
      done   <= 1'b0;
    end else begin
      done <= 1'b0;
      if (init) begin
        busy_q <= 1'b1;
      end else if (finish) begin
        busy_q <= 1'b0;
        done   <= 1'b1;
      end
    end
  end

  assign busy      = busy_q;
  assign call_evt  = (stk_op == STK_PUSH);
  assign ret_evt   = (stk_op == STK_POP);
  assign prune_evt = prune;

  // Search invariants: the current vector never exceeds the capacity, the
  // level stays within -1 .. n, and an empty vector has no volume or weight.
  // (In the first cycle of a run the registers still hold the previous run.)
  a_volume_ok : assert property (@(posedge clk) disable iff (!rst_n)
    (busy_q && dp_op != DP_INIT) |-> cur_v <= capacity);
  a_level_ok : assert property (@(posedge clk) disable iff (!rst_n)
    (busy_q && dp_op != DP_INIT) |-> (level >= -1 && level <= $signed({1'b0, n_items})));
  a_empty_ok : assert property (@(posedge clk) disable iff (!rst_n)
    (cur_x == '0) |-> (cur_v == '0 && cur_w == '0));

  // The two stack pointers move together.
  a_sp_equal : assert property (@(posedge clk) disable iff (!rst_n) fsm_sp == m_sp);
  a_full_equal : assert property (@(posedge clk) disable iff (!rst_n) fsm_full == m_full);

endmodule
