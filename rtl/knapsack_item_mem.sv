// knapsack_item_mem: the table of objects of a 0-1 knapsack instance, one
// weight w_i and one volume v_i per object i = 0 .. N_MAX-1.
//
// How it works: a small register array with one synchronous write port, used
// by the host to load an instance before the search starts, and one
// asynchronous read port, used by the search datapath to fetch the object at
// the level it is working on in the same clock cycle (distributed-RAM style).
//
// Interface and timing: a write with `we` high lands at the rising edge of
// `clk`; `rweight`/`rvolume` follow `raddr` combinationally. An index of
// N_MAX or more (possible only when N_MAX is not a power of two) reads as 0.
//
// The algorithm only states that each object has a positive integer weight
// and volume; the storage, the loading port and the widths are this design's
// own choices.
module knapsack_item_mem #(
  parameter int N_MAX = 16,
  parameter int W_W   = 8,
  parameter int V_W   = 8,
  localparam int AW   = (N_MAX > 1) ? $clog2(N_MAX) : 1
) (
  input  logic           clk,
  input  logic           we,
  input  logic [AW-1:0]  waddr,
  input  logic [W_W-1:0] wweight,
  input  logic [V_W-1:0] wvolume,
  input  logic [AW-1:0]  raddr,
  output logic [W_W-1:0] rweight,
  output logic [V_W-1:0] rvolume
);

  logic [W_W-1:0] weight_q [N_MAX];
  logic [V_W-1:0] volume_q [N_MAX];

  always_ff @(posedge clk) begin
    if (we && (int'(waddr) < N_MAX)) begin
      weight_q[waddr] <= wweight;
      volume_q[waddr] <= wvolume;
    end
  end

  always_comb begin
    if (int'(raddr) < N_MAX) begin
      rweight = weight_q[raddr];
      rvolume = volume_q[raddr];
    end else begin
      rweight = '0;
      rvolume = '0;
    end
  end

endmodule
