// tb_rhfsm_stack: self-checking test of the RHFSM stack (used as both the
// state stack and the module stack).
//
// A reference stack kept in the testbench receives the same random sequence
// of set/push/pop operations (plus re-initialisations) as the design; after
// every clock edge the top entry, the pointer and the full flag are compared.
// The stack is small (DEPTH 5) so that pushes against a full stack and pops
// at pointer 0 both occur and must be refused.
module tb_rhfsm_stack;
  import rhfsm_pkg::*;

  localparam int WIDTH = 3;
  localparam int DEPTH = 5;
  localparam int PW    = $clog2(DEPTH);

  logic             clk = 1'b0;
  logic             rst_n = 1'b0;
  logic             init;
  logic [WIDTH-1:0] init_val, d_top, d_new, top;
  stack_op_t        op;
  logic [PW-1:0]    sp;
  logic             full;

  int checks = 0, failures = 0;
  int n_push = 0, n_refused = 0, n_pop = 0;

  rhfsm_stack #(.WIDTH(WIDTH), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [WIDTH-1:0] ref_mem [DEPTH];
  int ref_sp;

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  initial begin
    init = 1'b0; init_val = '0; d_top = '0; d_new = '0; op = STK_NONE;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    // first use: initialise
    @(negedge clk);
    init = 1'b1; init_val = 3'd6;
    @(posedge clk); #1;
    ref_sp = 0; ref_mem[0] = 3'd6;
    check("sp after init", int'(sp), 0);
    check("top after init", int'(top), 6);
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      init     = ($urandom_range(0, 99) == 0);
      init_val = WIDTH'($urandom);
      op       = stack_op_t'($urandom_range(0, 3));
      d_top    = WIDTH'($urandom);
      d_new    = WIDTH'($urandom);
      // reference
      if (init) begin
        ref_sp = 0; ref_mem[0] = init_val;
      end else begin
        case (op)
          STK_SET: ref_mem[ref_sp] = d_top;
          STK_PUSH: if (ref_sp != DEPTH - 1) begin
            ref_mem[ref_sp] = d_top; ref_mem[ref_sp + 1] = d_new; ref_sp++; n_push++;
          end else n_refused++;
          STK_POP: if (ref_sp != 0) begin ref_sp--; n_pop++; end
          default: ;
        endcase
      end
      @(posedge clk); #1;
      check("sp", int'(sp), ref_sp);
      check("top", int'(top), int'(ref_mem[ref_sp]));
      check("full", int'(full), int'(ref_sp == DEPTH - 1));
    end
    op = STK_NONE; init = 1'b0;
    // every stack level must have been visited and a full push refused
    checks++;
    if (n_push == 0 || n_pop == 0 || n_refused == 0) begin
      failures++;
      $display("FAIL coverage push=%0d pop=%0d refused=%0d", n_push, n_pop, n_refused);
    end
    $display("pushes=%0d pops=%0d refused=%0d", n_push, n_pop, n_refused);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
