// tb_knapsack_rhfsm_full: the knapsack RHFSM at its default size (16 objects,
// 8-bit weights and volumes, 18 stack levels), solving full 16-object
// instances end to end.
//
// Runs one instance in which every object fits (the whole 2^16-leaf tree is
// visited and the stacks reach their deepest level) and several random
// instances with a tight capacity (many objects rejected). Each run is
// checked against a brute-force optimum, against the recursive software
// model's best vector, cycle count (one clock cycle per graph-scheme node),
// number of calls and number of rejected objects.
module tb_knapsack_rhfsm_full;
  import knapsack_ref_pkg::*;

  localparam int N_MAX = 16;
  localparam int AW    = $clog2(N_MAX);
  localparam int NW    = $clog2(N_MAX + 1);
  localparam int SW    = 8 + NW;
  localparam int CW    = 8 + NW;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  logic           item_we, start, busy, done, stall;
  logic [AW-1:0]  item_addr;
  logic [7:0]     item_weight, item_volume;
  logic [NW-1:0]  n_items;
  logic [CW-1:0]  capacity;
  logic [N_MAX-1:0] opt_x;
  logic [SW-1:0]  opt_w;
  logic           call_evt, ret_evt, prune_evt;

  knapsack_rhfsm dut (.*);

  int checks = 0, failures = 0;

  initial begin
    repeat (20000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic run_one(string name);
    longint exp_cycles, cycles;
    int c_calls, c_prunes, c_stalls, best, sw, sv;
    for (int i = 0; i < r_n; i++) begin
      @(negedge clk);
      item_we = 1'b1; item_addr = AW'(i);
      item_weight = 8'(r_w[i]); item_volume = 8'(r_v[i]);
    end
    @(negedge clk);
    item_we = 1'b0; n_items = NW'(r_n); capacity = CW'(r_cap); start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    exp_cycles = ref_search();
    best = brute_force();
    cycles = 0; c_calls = 0; c_prunes = 0; c_stalls = 0;
    while (!done) begin
      cycles += longint'(busy);
      c_calls += int'(call_evt); c_prunes += int'(prune_evt); c_stalls += int'(stall);
      @(negedge clk);
    end
    expect_eq({name, " opt_w vs brute force"}, longint'(opt_w), longint'(best));
    expect_eq({name, " opt_x vs model"}, longint'(opt_x), longint'(r_opt_x[N_MAX-1:0]));
    sw = 0; sv = 0;
    for (int i = 0; i < N_MAX; i++) if (opt_x[i]) begin sw += r_w[i]; sv += r_v[i]; end
    expect_eq({name, " opt_x weight"}, longint'(sw), longint'(opt_w));
    expect_eq({name, " opt_x feasible"}, longint'(sv <= r_cap), longint'(1));
    expect_eq({name, " cycles"}, longint'(cycles), longint'(exp_cycles));
    expect_eq({name, " calls"}, longint'(c_calls), longint'(r_calls));
    expect_eq({name, " rejected objects"}, longint'(c_prunes), longint'(r_prunes));
    expect_eq({name, " no stall"}, longint'(c_stalls), longint'(0));
    $display("%s: opt_w=%0d opt_x=%h cycles=%0d calls=%0d rejected=%0d deepest stack pointer=%0d",
             name, opt_w, opt_x, cycles, c_calls, c_prunes, r_max_sp);
  endtask

  initial begin
    item_we = 0; item_addr = '0; item_weight = '0; item_volume = '0;
    n_items = '0; capacity = '0; start = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    r_n = N_MAX; r_cap = 16 * 255;
    for (int i = 0; i < N_MAX; i++) begin r_w[i] = $urandom_range(1, 255); r_v[i] = $urandom_range(1, 255); end
    run_one("all fit");
    expect_eq("deepest stack pointer", longint'(r_max_sp), longint'(N_MAX + 1));

    for (int t = 0; t < 4; t++) begin
      r_n = N_MAX; r_cap = $urandom_range(300, 1200);
      for (int i = 0; i < N_MAX; i++) begin r_w[i] = $urandom_range(1, 255); r_v[i] = $urandom_range(1, 255); end
      run_one("random");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
