// tb_knapsack_cc: exhaustive self-checking test of the RHFSM control circuit.
//
// Every combination of enable, active module, state, stack flags and the two
// rhombus conditions is applied. The expected stack operation, next state,
// called module, datapath action and flags are written out below node by
// node from the graph-scheme of the knapsack search (z0: a0 init + call z1,
// a1 End; z1: a0 Begin, a1 level++ with its tests, a2 take, a3 update best +
// call z1, a4 restore with its test, a5 End). A full stack must turn a call
// into a stall that changes nothing.
module tb_knapsack_cc;
  import rhfsm_pkg::*;

  logic        en, sp_zero, stk_full, c_more, c_fit;
  hgs_module_t module_i;
  hgs_state_t  state_i;
  stack_op_t   stk_op;
  hgs_state_t  next_state;
  hgs_module_t call_module;
  dp_op_t      dp_op;
  logic        finish, stall, prune;

  int checks = 0, failures = 0;
  int n_stall = 0, n_call = 0, n_ret = 0, n_fin = 0, n_prune = 0;

  knapsack_cc dut (.*);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(string what, int got, int exp, int vec);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL vec %0d %s: got %0d expected %0d", vec, what, got, exp);
    end
  endtask

  initial begin
    for (int v = 0; v < 512; v++) begin
      stack_op_t e_op;
      int        e_ns;      // -1: don't care (no write of the top)
      int        e_cm;      // -1: don't care
      dp_op_t    e_dp;
      logic      e_fin, e_stall, e_prune;
      logic [2:0] st;
      {en, module_i, st, sp_zero, stk_full, c_more, c_fit} = v[8:0];
      if (st > 5) continue;
      state_i = hgs_state_t'(st);
      #1;
      e_op = STK_NONE; e_ns = -1; e_cm = -1; e_dp = DP_NONE;
      e_fin = 0; e_stall = 0; e_prune = 0;
      if (module_i == MOD_Z0) begin
        if (st == 0) begin e_op = STK_PUSH; e_ns = 1; e_cm = 1; e_dp = DP_INIT; end
        else if (sp_zero) e_fin = 1;
        else e_op = STK_POP;
      end else begin
        case (int'(st))
          0: begin e_op = STK_SET; e_ns = 1; end
          1: begin
            e_op = STK_SET; e_dp = DP_INC;
            e_ns = (c_more && c_fit) ? 2 : c_more ? 1 : 5;
            e_prune = c_more && !c_fit;
          end
          2: begin e_op = STK_SET; e_ns = 3; e_dp = DP_TAKE; end
          3: begin e_op = STK_PUSH; e_ns = 4; e_cm = 1; e_dp = DP_OPT; end
          4: begin e_op = STK_SET; e_dp = DP_RESTORE; e_ns = c_more ? 1 : 5; end
          default: if (sp_zero) e_fin = 1; else e_op = STK_POP;
        endcase
      end
      if (e_op == STK_PUSH && stk_full) begin
        e_stall = 1; e_op = STK_NONE; e_dp = DP_NONE;
      end
      if (!en) begin
        e_op = STK_NONE; e_dp = DP_NONE; e_fin = 0; e_stall = 0; e_prune = 0;
      end
      expect_eq("stk_op", int'(stk_op), int'(e_op), v);
      expect_eq("dp_op", int'(dp_op), int'(e_dp), v);
      expect_eq("finish", int'(finish), int'(e_fin), v);
      expect_eq("stall", int'(stall), int'(e_stall), v);
      expect_eq("prune", int'(prune), int'(e_prune), v);
      if (e_ns >= 0 && (e_op == STK_SET || e_op == STK_PUSH))
        expect_eq("next_state", int'(next_state), e_ns, v);
      if (e_cm >= 0 && e_op == STK_PUSH)
        expect_eq("call_module", int'(call_module), e_cm, v);
      n_stall += int'(stall); n_call += int'(stk_op == STK_PUSH);
      n_ret += int'(stk_op == STK_POP); n_fin += int'(finish); n_prune += int'(prune);
    end
    $display("calls=%0d returns=%0d stalls=%0d finishes=%0d prunes=%0d",
             n_call, n_ret, n_stall, n_fin, n_prune);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
