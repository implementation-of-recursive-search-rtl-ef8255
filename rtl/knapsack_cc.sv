// knapsack_cc: control part of the combinational circuit (CC) of the
// recursive hierarchical FSM that runs the knapsack search.
//
// How it works: purely combinational. The active module (top of the module
// stack) and its current state (top of the state stack) select one node of
// the graph-scheme. The node's action on the datapath is put on `dp_op`, and
// the transition out of it on `stk_op`/`next_state`/`call_module`:
//
//   z0: a0  initialise, call z1, return to a1
//       a1  End (the search is finished when z0 ends)
//   z1: a0  Begin
//       a1  level++; then (level != n) && fits ? a2 : (level != n) ? a1 : a5
//       a2  take object `level` (x, cur_V, cur_W)
//       a3  update the best solution, call z1, return to a4
//       a4  undo the take of a2; then (level != n) ? a1 : a5
//       a5  End (return to the caller)
//
// A transition inside the module overwrites the top of the state stack, a
// call pushes (return state on the old top, a0 and the called module on the
// new top), an End pops. The two rhombus conditions `c_more` and `c_fit` come
// from the datapath and already reflect the current node's own action, so a
// rectangle and the rhombus after it take a single clock cycle together.
//
// Interface and timing: no clock. `en` low forces a hold. When a call meets a
// full stack (`stk_full`), the call waits: `stall` is raised and neither the
// stacks nor the datapath change, so the node is retried next cycle.
//
// Following the algorithm: the nodes, their actions, the two rhombus tests
// and the call/return discipline. This design's own reading: an object that
// does not fit at a1 leads to the test (level != n), as in the algorithm's
// pseudo-code; Begin and End take one cycle each; `finish` at End of z0.
module knapsack_cc
  import rhfsm_pkg::*;
(
  input  logic        en,
  input  hgs_module_t module_i,
  input  hgs_state_t  state_i,
  input  logic        sp_zero,
  input  logic        stk_full,
  input  logic        c_more,
  input  logic        c_fit,
  output stack_op_t   stk_op,
  output hgs_state_t  next_state,
  output hgs_module_t call_module,
  output dp_op_t      dp_op,
  output logic        finish,
  output logic        stall,
  output logic        prune
);

  stack_op_t op_raw;
  dp_op_t    dp_raw;
  logic      finish_raw;
  logic      prune_raw;

  always_comb begin
    op_raw      = STK_NONE;
    dp_raw      = DP_NONE;
    next_state  = ST_A0;
    call_module = MOD_Z1;
    finish_raw  = 1'b0;
    prune_raw   = 1'b0;

    unique case (module_i)
      MOD_Z0: begin
        unique case (state_i)
          ST_A0: begin
            dp_raw      = DP_INIT;
            op_raw      = STK_PUSH;
            next_state  = ST_A1;
            call_module = MOD_Z1;
          end
          default: begin  // a1: End of z0
            if (sp_zero) finish_raw = 1'b1;
            else         op_raw     = STK_POP;
          end
        endcase
      end

      MOD_Z1: begin
        unique case (state_i)
          ST_A0: begin  // Begin
            op_raw     = STK_SET;
            next_state = ST_A1;
          end
          ST_A1: begin
            dp_raw = DP_INC;
            op_raw = STK_SET;
            if (c_more && c_fit) begin
              next_state = ST_A2;
            end else if (c_more) begin
              next_state = ST_A1;
              prune_raw  = 1'b1;
            end else begin
              next_state = ST_A5;
            end
          end
          ST_A2: begin
            dp_raw     = DP_TAKE;
            op_raw     = STK_SET;
            next_state = ST_A3;
          end
          ST_A3: begin
            dp_raw      = DP_OPT;
            op_raw      = STK_PUSH;
            next_state  = ST_A4;
            call_module = MOD_Z1;
          end
          ST_A4: begin
            dp_raw     = DP_RESTORE;
            op_raw     = STK_SET;
            next_state = c_more ? ST_A1 : ST_A5;
          end
          default: begin  // a5: End of z1
            if (sp_zero) finish_raw = 1'b1;
            else         op_raw     = STK_POP;
          end
        endcase
      end

      default: ;
    endcase
  end

  // "else delay": a call that finds the stacks full changes nothing.
  always_comb begin
    stall  = en && (op_raw == STK_PUSH) && stk_full;
    stk_op = (en && !stall) ? op_raw : STK_NONE;
    dp_op  = (en && !stall) ? dp_raw : DP_NONE;
    finish = en && finish_raw;
    prune  = en && prune_raw;
  end

endmodule
