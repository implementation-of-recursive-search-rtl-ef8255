// knapsack_datapath: the part of the RHFSM's combinational circuit that
// computes the knapsack solution, with the registers it works on.
//
// Registers: the current vector x (bit i = object i is in the knapsack), its
// volume cur_V and weight cur_W, the tree level, and the best vector opt_x
// with its weight opt_W. Every clock cycle the controller selects one action
// (rhfsm_pkg::dp_op_t):
//
//   DP_INIT     x = opt_x = 0, opt_W = cur_V = cur_W = 0, level = -1
//   DP_INC      level = level + 1
//   DP_TAKE     x[level] = 1, cur_V += v[level], cur_W += w[level]
//   DP_OPT      if cur_W > opt_W: opt_W = cur_W, opt_x = x
//   DP_RESTORE  undo the most recent DP_TAKE and go back to its level
//
// DP_RESTORE needs the level of the search node being resumed. When a
// recursive call returns, every deeper node has already cleared the bit it
// set, so that level is the index of the highest set bit of x; a priority
// encoder finds it, and the node's volume and weight are subtracted. No
// separate stack of levels is needed.
//
// Conditions for the controller, computed on the level this cycle's action
// produces (so a rectangle and the test after it share one cycle):
//   c_more = (level != n)
//   c_fit  = cur_V + v[level] <= V   (object `level` tentatively added)
//
// Interface and timing: `item_addr` selects the object; the object table
// answers combinationally on `item_weight`/`item_volume`. All registers
// update at the rising edge; reset is asynchronous, active low.
//
// Following the algorithm: the registers, the actions of each node, level
// starting at -1, the strict '>' in the update of the best solution, and the
// volume test with the object added. This design's own choices: the widths,
// clearing cur_W at initialisation, and recovering the level by priority
// encoding on restore.
module knapsack_datapath
  import rhfsm_pkg::*;
#(
  parameter int N_MAX = 16,
  parameter int W_W   = 8,
  parameter int V_W   = 8,
  localparam int AW   = (N_MAX > 1) ? $clog2(N_MAX) : 1,
  localparam int NW   = $clog2(N_MAX + 1),
  localparam int LW   = NW + 1,
  localparam int SW   = W_W + NW,
  localparam int CW   = V_W + NW
) (
  input  logic           clk,
  input  logic           rst_n,
  input  dp_op_t         dp_op,
  input  logic [NW-1:0]  n_items,
  input  logic [CW-1:0]  capacity,
  output logic [AW-1:0]  item_addr,
  input  logic [W_W-1:0] item_weight,
  input  logic [V_W-1:0] item_volume,
  output logic           c_more,
  output logic           c_fit,
  output logic [N_MAX-1:0] opt_x,
  output logic [SW-1:0]  opt_w,
  output logic [N_MAX-1:0] cur_x,
  output logic [CW-1:0]  cur_v,
  output logic [SW-1:0]  cur_w,
  output logic signed [LW-1:0] level
);

  logic [N_MAX-1:0]    x_q, opt_x_q;
  logic [SW-1:0]       opt_w_q, cur_w_q;
  logic [CW-1:0]       cur_v_q;
  logic signed [LW-1:0] level_q;

  // Index of the highest set bit of x: the level of the node to resume.
  logic [LW-1:0] hi_idx;
  always_comb begin
    hi_idx = '0;
    for (int i = 0; i < N_MAX; i++) begin
      if (x_q[i]) hi_idx = LW'(i);
    end
  end

  logic signed [LW-1:0] level_inc;
  logic signed [LW-1:0] level_next;
  assign level_inc = level_q + LW'(1);

  always_comb begin
    unique case (dp_op)
      DP_INIT:    level_next = '1;  // -1
      DP_INC:     level_next = level_inc;
      DP_RESTORE: level_next = $signed(hi_idx);
      default:    level_next = level_q;
    endcase
  end

  // Object read: the level being taken, the level being undone, or the
  // level about to be tested.
  always_comb begin
    unique case (dp_op)
      DP_TAKE:    item_addr = AW'(level_q);
      DP_RESTORE: item_addr = AW'(hi_idx);
      default:    item_addr = AW'(level_inc);
    endcase
  end

  logic [CW-1:0] v_sum;
  assign v_sum  = cur_v_q + CW'(item_volume);
  assign c_more = (level_next != $signed({1'b0, n_items}));
  assign c_fit  = (v_sum <= capacity);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x_q     <= '0;
      opt_x_q <= '0;
      opt_w_q <= '0;
      cur_v_q <= '0;
      cur_w_q <= '0;
      level_q <= '1;
    end else begin
      unique case (dp_op)
        DP_INIT: begin
          x_q     <= '0;
          opt_x_q <= '0;
          opt_w_q <= '0;
          cur_v_q <= '0;
          cur_w_q <= '0;
          level_q <= '1;
        end
        DP_INC: level_q <= level_inc;
        DP_TAKE: begin
          for (int i = 0; i < N_MAX; i++) begin
            if (LW'(i) == level_q) x_q[i] <= 1'b1;
          end
          cur_v_q <= v_sum;
          cur_w_q <= cur_w_q + SW'(item_weight);
        end
        DP_OPT: begin
          if (cur_w_q > opt_w_q) begin
            opt_w_q <= cur_w_q;
            opt_x_q <= x_q;
          end
        end
        DP_RESTORE: begin
          for (int i = 0; i < N_MAX; i++) begin
            if (LW'(i) == hi_idx) x_q[i] <= 1'b0;
          end
          cur_v_q <= cur_v_q - CW'(item_volume);
          cur_w_q <= cur_w_q - SW'(item_weight);
          level_q <= level_next;
        end
        default: ;
      endcase
    end
  end

  assign opt_x = opt_x_q;
  assign opt_w = opt_w_q;
  assign cur_x = x_q;
  assign cur_v = cur_v_q;
  assign cur_w = cur_w_q;
  assign level = level_q;

  a_restore_has_take : assert property (@(posedge clk) disable iff (!rst_n)
    dp_op == DP_RESTORE |-> x_q != '0);
  a_take_in_range : assert property (@(posedge clk) disable iff (!rst_n)
    dp_op == DP_TAKE |-> (level_q >= 0 && level_q < $signed({1'b0, n_items})));

endmodule
