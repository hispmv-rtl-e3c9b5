// fp_add_tree: pipelined single-precision adder tree.
//
// Sums N inputs with a balanced tree of fp_add units; N is padded with zeros to
// the next power of two, so the tree has LEVELS = ceil(log2(N)) levels and a
// latency of LEVELS*LAT enabled cycles. A new set of inputs can enter every
// cycle. The valid bit and a TW-bit tag travel with the set. The pipeline
// advances only while en is high; busy is high while a valid set is inside.
module fp_add_tree
  import hispmv_pkg::*;
#(
  parameter int N   = 8,
  parameter int LAT = 4,
  parameter int TW  = 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          en,
  input  logic          in_valid,
  input  fp32_t         in_val [N],
  input  logic [TW-1:0] in_tag,
  output logic          out_valid,
  output fp32_t         sum,
  output logic [TW-1:0] out_tag,
  output logic          busy
);
  localparam int LEVELS = (N <= 1) ? 0 : $clog2(N);
  localparam int NP2    = 1 << LEVELS;

  fp32_t          lv   [LEVELS+1][NP2];
  logic           lvv  [LEVELS+1];
  logic [TW-1:0]  lvt  [LEVELS+1];
  logic [LEVELS:0] lvb;

  always_comb begin
    for (int i = 0; i < NP2; i++) lv[0][i] = (i < N) ? in_val[i] : FP_ZERO;
  end
  assign lvv[0] = in_valid;
  assign lvt[0] = in_tag;
  assign lvb[0] = 1'b0;

  for (genvar l = 0; l < LEVELS; l++) begin : g_lvl
    localparam int W = NP2 >> (l + 1);
    logic          vv [W];
    logic [TW-1:0] tt [W];
    logic [W-1:0]  bb;
    for (genvar j = 0; j < W; j++) begin : g_add
      fp_add #(.LAT(LAT), .TW(TW)) u_add (
        .clk, .rst_n, .en,
        .in_valid (lvv[l]),
        .a        (lv[l][2*j]),
        .b        (lv[l][2*j+1]),
        .in_tag   (lvt[l]),
        .out_valid(vv[j]),
        .sum      (lv[l+1][j]),
        .out_tag  (tt[j]),
        .busy     (bb[j])
      );
    end
    assign lvv[l+1] = vv[0];
    assign lvt[l+1] = tt[0];
    assign lvb[l+1] = |bb;
    for (genvar j = W; j < NP2; j++) begin : g_pad
      assign lv[l+1][j] = FP_ZERO;
    end
  end

  assign out_valid = lvv[LEVELS];
  assign sum       = lv[LEVELS][0];
  assign out_tag   = lvt[LEVELS];
  assign busy      = |lvb;
endmodule
