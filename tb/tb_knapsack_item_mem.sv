// tb_knapsack_item_mem: self-checking test of the object table.
//
// Fills the table with random weights and volumes, then reads every entry
// back (asynchronous read, same cycle) and compares with a copy kept in the
// testbench. Then overwrites random entries and reads random addresses while
// writes are going on, checking that a write lands at the clock edge only.
module tb_knapsack_item_mem;
  localparam int N_MAX = 16;
  localparam int W_W   = 8;
  localparam int V_W   = 8;
  localparam int AW    = $clog2(N_MAX);

  logic           clk = 1'b0;
  logic           we;
  logic [AW-1:0]  waddr, raddr;
  logic [W_W-1:0] wweight, rweight;
  logic [V_W-1:0] wvolume, rvolume;

  int checks = 0, failures = 0;
  logic [W_W-1:0] ref_w [N_MAX];
  logic [V_W-1:0] ref_v [N_MAX];

  knapsack_item_mem #(.N_MAX(N_MAX), .W_W(W_W), .V_W(V_W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic read_check(int a);
    raddr = AW'(a);
    #1;
    checks++;
    if (rweight !== ref_w[a] || rvolume !== ref_v[a]) begin
      failures++;
      $display("FAIL addr %0d: got w=%0d v=%0d expected w=%0d v=%0d",
               a, rweight, rvolume, ref_w[a], ref_v[a]);
    end
  endtask

  initial begin
    we = 1'b0; waddr = '0; raddr = '0; wweight = '0; wvolume = '0;
    for (int i = 0; i < N_MAX; i++) begin
      @(negedge clk);
      we = 1'b1; waddr = AW'(i);
      wweight = W_W'($urandom); wvolume = V_W'($urandom);
      ref_w[i] = wweight; ref_v[i] = wvolume;
    end
    @(negedge clk); we = 1'b0;
    for (int i = 0; i < N_MAX; i++) read_check(i);
    for (int t = 0; t < 500; t++) begin
      @(negedge clk);
      we = $urandom_range(0, 1) == 1; waddr = AW'($urandom);
      wweight = W_W'($urandom); wvolume = V_W'($urandom);
      // before the edge the old contents are still visible
      read_check($urandom_range(0, N_MAX - 1));
      @(posedge clk);
      if (we) begin ref_w[waddr] = wweight; ref_v[waddr] = wvolume; end
      @(negedge clk); we = 1'b0;
      read_check(int'(waddr));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
