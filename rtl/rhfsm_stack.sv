// rhfsm_stack: one stack of a recursive hierarchical FSM. The RHFSM uses two
// instances: the state stack (its top is the current state of the active
// module) and the module stack (its top is the active module).
//
// How it works: a register array addressed by a stack pointer. The entry at
// the pointer is presented combinationally on `top`. In one clock cycle at
// most two locations are written, which is what a module call needs: the
// return state goes into the current top and the first state of the called
// module into the location above it, while the pointer advances. A module's
// End pops the stack by moving the pointer down; the caller's return state,
// stored at the call, is then on top again.
//
// Interface and timing: `op` (see rhfsm_pkg::stack_op_t) takes effect at the
// rising clock edge. `init` has priority over `op`: it sets the pointer to 0
// and writes `init_val` to location 0. A push while `full` is refused and
// must be retried by the caller (the controller then waits); a pop at
// pointer 0 is ignored. Both cases are flagged by assertions.
//
// Following the algorithm's RHFSM: the two stacks, the call sequence (store
// the return state, advance the pointer, place state a0 and the called
// module on top) and the refusal of a push at MAX_LEVELS-1. This design's own
// choices: the register-array storage, the asynchronous active-low reset and
// a private pointer copy in each instance (both instances always receive the
// same operation).
module rhfsm_stack
  import rhfsm_pkg::*;
#(
  parameter int WIDTH = 3,
  parameter int DEPTH = 18,
  localparam int PW = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             init,
  input  logic [WIDTH-1:0] init_val,
  input  stack_op_t        op,
  input  logic [WIDTH-1:0] d_top,
  input  logic [WIDTH-1:0] d_new,
  output logic [WIDTH-1:0] top,
  output logic [PW-1:0]    sp,
  output logic             full
);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [PW-1:0]    sp_q;

  localparam logic [PW-1:0] SP_MAX = PW'(DEPTH - 1);

  assign sp   = sp_q;
  assign full = (sp_q == SP_MAX);
  assign top  = mem[sp_q];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sp_q <= '0;
    end else if (init) begin
      sp_q <= '0;
    end else begin
      unique case (op)
        STK_PUSH: if (!full) sp_q <= sp_q + 1'b1;
        STK_POP:  if (sp_q != '0) sp_q <= sp_q - 1'b1;
        default:  ;
      endcase
    end
  end

  // Storage: no reset, every entry is written before it is read.
  always_ff @(posedge clk) begin
    if (init) begin
      mem[0] <= init_val;
    end else begin
      unique case (op)
        STK_SET: mem[sp_q] <= d_top;
        STK_PUSH: if (!full) begin
          mem[sp_q]        <= d_top;
          mem[sp_q + 1'b1] <= d_new;
        end
        default: ;
      endcase
    end
  end

  a_no_overflow : assert property (@(posedge clk) disable iff (!rst_n)
    !(op == STK_PUSH && full && !init))
    else $warning("rhfsm_stack: push refused, stack full");
  a_no_underflow : assert property (@(posedge clk) disable iff (!rst_n)
    !(op == STK_POP && sp_q == '0 && !init))
    else $warning("rhfsm_stack: pop at pointer 0 ignored");

endmodule
