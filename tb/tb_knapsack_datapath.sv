// tb_knapsack_datapath: self-checking test of the knapsack search datapath.
//
// The testbench plays the controller: it issues random but legal sequences
// of node actions (initialise, level++, take the object at the current level,
// update the best solution, restore) and keeps its own model of x, cur_V,
// cur_W, level, opt_x and opt_W. The model remembers taken levels in a list,
// so a restore is checked against "undo the latest take" without relying on
// the design's priority encoder. Before every clock edge the object address
// and the two conditions (level != n, volume fits) are compared with the
// model; after it all registers are.
module tb_knapsack_datapath;
  import rhfsm_pkg::*;

  localparam int N_MAX = 16;
  localparam int W_W   = 8;
  localparam int V_W   = 8;
  localparam int AW    = $clog2(N_MAX);
  localparam int NW    = $clog2(N_MAX + 1);
  localparam int LW    = NW + 1;
  localparam int SW    = W_W + NW;
  localparam int CW    = V_W + NW;

  logic clk = 1'b0, rst_n = 1'b0;
  dp_op_t dp_op;
  logic [NW-1:0]  n_items;
  logic [CW-1:0]  capacity;
  logic [AW-1:0]  item_addr;
  logic [W_W-1:0] item_weight;
  logic [V_W-1:0] item_volume;
  logic c_more, c_fit;
  logic [N_MAX-1:0] opt_x, cur_x;
  logic [SW-1:0] opt_w, cur_w;
  logic [CW-1:0] cur_v;
  logic signed [LW-1:0] level;

  knapsack_datapath #(.N_MAX(N_MAX), .W_W(W_W), .V_W(V_W)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cnt [6];

  logic [W_W-1:0] wt [N_MAX];
  logic [V_W-1:0] vol [N_MAX];
  assign item_weight = wt[item_addr];
  assign item_volume = vol[item_addr];

  initial begin
    repeat (200000) @(posedge clk);
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

  // model
  int m_level, m_v, m_w, m_optw, n;
  logic [N_MAX-1:0] m_x, m_optx;
  int taken [$];

  initial begin
    dp_op = DP_NONE; n_items = '0; capacity = '0;
    foreach (wt[i]) begin wt[i] = '0; vol[i] = '0; end
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int run = 0; run < 40; run++) begin
      @(negedge clk);
      n = $urandom_range(1, N_MAX);
      n_items = NW'(n);
      capacity = CW'($urandom_range(0, 900));
      foreach (wt[i]) begin wt[i] = W_W'($urandom_range(1, 255)); vol[i] = V_W'($urandom_range(1, 255)); end
      dp_op = DP_INIT;
      @(posedge clk); #1;
      m_level = -1; m_v = 0; m_w = 0; m_optw = 0; m_x = '0; m_optx = '0; taken.delete();
      cnt[DP_INIT]++;
      for (int t = 0; t < 300; t++) begin
        dp_op_t op;
        int exp_addr, exp_next;
        @(negedge clk);
        // pick a legal random action
        do begin
          op = dp_op_t'($urandom_range(0, 5));
        end while (op == DP_INIT ||
                   (op == DP_INC && m_level >= n) ||
                   (op == DP_TAKE && !(m_level >= 0 && m_level < n &&
                                      (taken.size() == 0 || m_level > taken[$]))) ||
                   (op == DP_RESTORE && taken.size() == 0));
        dp_op = op;
        case (op)
          DP_TAKE:    begin exp_addr = m_level;   exp_next = m_level; end
          DP_RESTORE: begin exp_addr = taken[$];  exp_next = taken[$]; end
          DP_INC:     begin exp_addr = m_level + 1; exp_next = m_level + 1; end
          default:    begin exp_addr = m_level + 1; exp_next = m_level; end
        endcase
        #1;
        expect_eq("item_addr", longint'(item_addr), longint'(exp_addr % N_MAX));
        expect_eq("c_more", longint'(c_more), longint'(exp_next != n));
        expect_eq("c_fit", longint'(c_fit), longint'((m_v + vol[exp_addr % N_MAX]) <= capacity));
        @(posedge clk); #1;
        cnt[op]++;
        case (op)
          DP_INC: m_level++;
          DP_TAKE: begin
            m_x[m_level] = 1'b1; m_v += vol[m_level]; m_w += wt[m_level];
            taken.push_back(m_level);
          end
          DP_OPT: if (m_w > m_optw) begin m_optw = m_w; m_optx = m_x; end
          DP_RESTORE: begin
            m_level = taken.pop_back();
            m_x[m_level] = 1'b0; m_v -= vol[m_level]; m_w -= wt[m_level];
          end
          default: ;
        endcase
        expect_eq("level", longint'(level), longint'(m_level));
        expect_eq("cur_x", longint'(cur_x), longint'(m_x));
        expect_eq("cur_v", longint'(cur_v), longint'(m_v));
        expect_eq("cur_w", longint'(cur_w), longint'(m_w));
        expect_eq("opt_x", longint'(opt_x), longint'(m_optx));
        expect_eq("opt_w", longint'(opt_w), longint'(m_optw));
      end
    end
    dp_op = DP_NONE;
    foreach (cnt[i]) begin
      checks++;
      if (cnt[i] == 0) begin failures++; $display("FAIL action %0d never issued", i); end
    end
    $display("actions none=%0d init=%0d inc=%0d take=%0d opt=%0d restore=%0d",
             cnt[0], cnt[1], cnt[2], cnt[3], cnt[4], cnt[5]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
