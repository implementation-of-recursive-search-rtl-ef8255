// tb_knapsack_rhfsm: end-to-end self-checking test of the knapsack RHFSM.
//
// Instance `dut` (N_MAX = 8) solves many random 0-1 knapsack instances and a
// few hand-picked corner cases (no objects, zero capacity, everything fits,
// nothing fits, n < N_MAX). For each run the testbench checks:
//   - opt_w against a brute-force optimum over all 2^n vectors;
//   - opt_x against the recursive software model of the same search, and
//     that opt_x is feasible and weighs opt_w;
//   - the run length: one clock cycle per graph-scheme node, as counted by
//     the model;
//   - the numbers of module calls, returns and rejected objects.
// Instance `dut_small` has a stack of only 4 levels; searching 6 objects
// that all fit must make exactly three calls and then wait on the full stack
// (stall) instead of corrupting it, while `dut` never stalls. Every mechanism (call, return, reject, best-solution
// update, stall, finish) must have been seen at least once.
module tb_knapsack_rhfsm;
  import knapsack_ref_pkg::*;

  localparam int N_MAX = 8;
  localparam int W_W   = 8;
  localparam int V_W   = 8;
  localparam int AW    = $clog2(N_MAX);
  localparam int NW    = $clog2(N_MAX + 1);
  localparam int SW    = W_W + NW;
  localparam int CW    = V_W + NW;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  // ---- main instance ----
  logic           item_we, start, busy, done, stall;
  logic [AW-1:0]  item_addr;
  logic [W_W-1:0] item_weight;
  logic [V_W-1:0] item_volume;
  logic [NW-1:0]  n_items;
  logic [CW-1:0]  capacity;
  logic [N_MAX-1:0] opt_x;
  logic [SW-1:0]  opt_w;
  logic           call_evt, ret_evt, prune_evt;

  knapsack_rhfsm #(.N_MAX(N_MAX), .W_W(W_W), .V_W(V_W)) dut (.*);

  // ---- instance with a too-small stack ----
  logic           s_item_we, s_start, s_busy, s_done, s_stall;
  logic [AW-1:0]  s_item_addr;
  logic [W_W-1:0] s_item_weight;
  logic [V_W-1:0] s_item_volume;
  logic [N_MAX-1:0] s_opt_x;
  logic [SW-1:0]  s_opt_w;
  logic           s_call, s_ret, s_prune;

  knapsack_rhfsm #(.N_MAX(N_MAX), .W_W(W_W), .V_W(V_W), .MAX_LEVELS(4)) dut_small (
    .clk, .rst_n,
    .item_we(s_item_we), .item_addr(s_item_addr), .item_weight(s_item_weight),
    .item_volume(s_item_volume), .n_items(NW'(6)), .capacity(CW'(1000)),
    .start(s_start), .busy(s_busy), .done(s_done), .stall(s_stall),
    .opt_x(s_opt_x), .opt_w(s_opt_w), .call_evt(s_call), .ret_evt(s_ret), .prune_evt(s_prune));

  int checks = 0, failures = 0;
  int s_calls;
  int n_calls = 0, n_rets = 0, n_prunes = 0, n_updates = 0, n_stalls = 0, n_done = 0;

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // Load r_n objects (from the reference package arrays), run, check.
  task automatic run_one(string name);
    longint exp_cycles, cycles;
    int c_calls, c_rets, c_prunes, c_upd, c_stalls, best, sw, sv;
    logic [SW-1:0] last_w;
    for (int i = 0; i < r_n; i++) begin
      @(negedge clk);
      item_we = 1'b1; item_addr = AW'(i);
      item_weight = W_W'(r_w[i]); item_volume = V_W'(r_v[i]);
    end
    @(negedge clk);
    item_we = 1'b0; n_items = NW'(r_n); capacity = CW'(r_cap);
    start = 1'b1;
    @(negedge clk);
    start = 1'b0;
    exp_cycles = ref_search();
    best = brute_force();
    cycles = 0; c_calls = 0; c_rets = 0; c_prunes = 0; c_upd = 0; c_stalls = 0; last_w = '0;
    while (!done) begin
      cycles += longint'(busy);
      c_calls += int'(call_evt); c_rets += int'(ret_evt); c_prunes += int'(prune_evt);
      c_stalls += int'(stall);
      @(negedge clk);
      if (opt_w != last_w) begin c_upd++; last_w = opt_w; end
    end
    expect_eq({name, " opt_w vs brute force"}, longint'(opt_w), longint'(best));
    expect_eq({name, " opt_x vs model"}, longint'(opt_x), longint'(r_opt_x[N_MAX-1:0]));
    sw = 0; sv = 0;
    for (int i = 0; i < N_MAX; i++) if (opt_x[i]) begin sw += r_w[i]; sv += r_v[i]; end
    expect_eq({name, " opt_x weight"}, longint'(sw), longint'(opt_w));
    expect_eq({name, " opt_x feasible"}, longint'(sv <= r_cap), longint'(1));
    expect_eq({name, " cycles"}, longint'(cycles), longint'(exp_cycles));
    expect_eq({name, " calls"}, longint'(c_calls), longint'(r_calls));
    expect_eq({name, " returns"}, longint'(c_rets), longint'(r_returns - 0));
    expect_eq({name, " rejected objects"}, longint'(c_prunes), longint'(r_prunes));
    expect_eq({name, " no stall with full-depth stacks"}, longint'(c_stalls), longint'(0));
    n_calls += c_calls; n_rets += c_rets; n_prunes += c_prunes; n_updates += c_upd; n_done++;
  endtask

  initial begin
    item_we = 0; item_addr = '0; item_weight = '0; item_volume = '0;
    n_items = '0; capacity = '0; start = 0;
    s_item_we = 0; s_item_addr = '0; s_item_weight = '0; s_item_volume = '0; s_start = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;

    // corner cases
    r_n = 0; r_cap = 10; run_one("no objects");
    r_n = 5; r_cap = 0;
    for (int i = 0; i < 5; i++) begin r_w[i] = i + 1; r_v[i] = 3; end
    run_one("zero capacity");
    r_n = N_MAX; r_cap = 2000;
    for (int i = 0; i < N_MAX; i++) begin r_w[i] = 10 + i; r_v[i] = 200; end
    run_one("everything fits");
    r_n = 4; r_cap = 50;
    r_w[0] = 10; r_v[0] = 20; r_w[1] = 40; r_v[1] = 50; r_w[2] = 30; r_v[2] = 30; r_w[3] = 25; r_v[3] = 10;
    run_one("small instance");   // best: objects 2 and 3, weight 55
    // random instances
    for (int t = 0; t < 150; t++) begin
      r_n = $urandom_range(1, N_MAX);
      r_cap = $urandom_range(0, 700);
      for (int i = 0; i < r_n; i++) begin
        r_w[i] = $urandom_range(1, 255); r_v[i] = $urandom_range(1, 255);
      end
      run_one("random");
    end

    // too-small stack: 6 objects that all fit need 8 levels, 4 exist
    for (int i = 0; i < 6; i++) begin
      @(negedge clk);
      s_item_we = 1'b1; s_item_addr = AW'(i); s_item_weight = 8'd1; s_item_volume = 8'd1;
    end
    @(negedge clk); s_item_we = 1'b0; s_start = 1'b1;
    @(negedge clk); s_start = 1'b0;
    s_calls = int'(s_call);   // z0's call, in the first busy cycle
    for (int c = 0; c < 200; c++) begin
      @(negedge clk);
      n_stalls += int'(s_stall);
      s_calls += int'(s_call);
      if (s_done) begin failures++; $display("FAIL small stack finished a search it cannot hold"); end
    end
    // calls up to the stack pointer 3 succeed (z0 plus three z1), then it waits
    expect_eq("small stack calls before the stall", longint'(s_calls), longint'(3));
    checks++;
    if (!s_busy) begin failures++; $display("FAIL small stack instance left busy"); end

    // every mechanism seen
    expect_eq("calls seen", longint'(n_calls > 0), longint'(1));
    expect_eq("returns seen", longint'(n_rets > 0), longint'(1));
    expect_eq("rejections seen", longint'(n_prunes > 0), longint'(1));
    expect_eq("best updates seen", longint'(n_updates > 0), longint'(1));
    expect_eq("stalls seen", longint'(n_stalls > 0), longint'(1));
    expect_eq("finishes seen", longint'(n_done > 0), longint'(1));
    $display("runs=%0d calls=%0d returns=%0d rejections=%0d best_updates=%0d stall_cycles=%0d",
             n_done, n_calls, n_rets, n_prunes, n_updates, n_stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
