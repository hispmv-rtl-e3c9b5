// pre_accumulator: the pre-accumulation adder chain of one PE. It folds runs of
// products for the same row that arrive back to back (dependency distance 1)
// into a single partial sum, at one product per cycle.
//
// A floating-point adder needs LAT_ADD cycles, so a product cannot simply be
// added to the result of the product just before it. Instead the run is spread
// over LAT_ADD interleaved partial sums: the k-th product of a run is added to
// the adder output that belongs to product k-LAT_ADD of the same run, which
// leaves the adder in exactly the cycle it is needed. Products of a run that
// no later product picks up are "terminal"; a run has at most LAT_ADD of them
// and they leave the adder in consecutive cycles. A window of the last
// LAT_ADD-1 terminal results keeps them, and when the last product of the run
// comes out, the run's terminal results are summed by a small adder tree and
// leave as one (row, partial sum). A run is a sequence of valid products with
// the same row in consecutive enabled cycles; a bubble ends it.
// Latency: 1 + LAT_ADD + log2(LAT_ADD)*LAT_ADD enabled cycles from the last
// product of a run to its sum. The whole unit holds while en is low. The
// published HiSpMV design names the pre-accumulation adder chain and its goal (II = 1); the
// interleaved partial sums and the final tree are this design's way of doing it.
module pre_accumulator
  import hispmv_pkg::*;
#(
  parameter int LAT_ADD = 4
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en,
  input  logic             in_valid,
  input  logic [ROW_W-1:0] in_row,
  input  fp32_t            in_val,
  output logic             out_valid,
  output logic [ROW_W-1:0] out_row,
  output fp32_t            out_val,
  output logic             merged,
  output logic             busy
);
  localparam int L   = LAT_ADD;
  localparam int KW  = $clog2(L + 1);
  localparam int RW  = 8;
  localparam int TW  = ROW_W + 1 + RW;

  logic             v0;
  logic [ROW_W-1:0] r0;
  fp32_t            x0;
  logic [KW-1:0]    k0;
  logic [RW-1:0]    rid0;

  logic             same, fb;
  logic             a_valid;
  fp32_t            a_sum;
  logic [TW-1:0]    a_tag;
  logic             a_busy;
  logic [ROW_W-1:0] a_row;
  logic             a_last;
  logic [RW-1:0]    a_rid;
  logic             terminal;

  assign same = in_valid && v0 && (in_row == r0);
  assign fb   = v0 && (k0 == KW'(L));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v0   <= 1'b0;
      r0   <= '0;
      x0   <= FP_ZERO;
      k0   <= '0;
      rid0 <= '0;
    end else if (en) begin
      v0 <= in_valid;
      r0 <= in_row;
      x0 <= in_val;
      if (same) begin
        if (k0 != KW'(L)) k0 <= k0 + KW'(1);
      end else begin
        k0   <= '0;
        rid0 <= rid0 + RW'(1);
      end
    end
  end

  fp_add #(.LAT(L), .TW(TW)) u_add (
    .clk, .rst_n, .en,
    .in_valid (v0),
    .a        (x0),
    .b        (fb ? a_sum : FP_ZERO),
    .in_tag   ({r0, !same, rid0}),
    .out_valid(a_valid),
    .sum      (a_sum),
    .out_tag  (a_tag),
    .busy     (a_busy)
  );

  assign {a_row, a_last, a_rid} = a_tag;
  assign terminal = a_valid && !fb;
  assign merged   = en && fb;

  // window of the previous L-1 terminal results
  fp32_t         w_val [L-1];
  logic [RW-1:0] w_rid [L-1];
  logic [L-2:0]  w_v;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      w_v <= '0;
      for (int i = 0; i < L - 1; i++) begin
        w_val[i] <= FP_ZERO;
        w_rid[i] <= '0;
      end
    end else if (en) begin
      w_v[0]   <= terminal;
      w_val[0] <= a_sum;
      w_rid[0] <= a_rid;
      for (int i = 1; i < L - 1; i++) begin
        w_v[i]   <= w_v[i-1];
        w_val[i] <= w_val[i-1];
        w_rid[i] <= w_rid[i-1];
      end
    end
  end

  fp32_t t_in [L];
  logic  t_busy;
  always_comb begin
    t_in[0] = a_sum;
    for (int i = 1; i < L; i++)
      t_in[i] = (w_v[i-1] && w_rid[i-1] == a_rid) ? w_val[i-1] : FP_ZERO;
  end

  fp_add_tree #(.N(L), .LAT(L), .TW(ROW_W)) u_tree (
    .clk, .rst_n, .en,
    .in_valid (terminal && a_last),
    .in_val   (t_in),
    .in_tag   (a_row),
    .out_valid(out_valid),
    .sum      (out_val),
    .out_tag  (out_row),
    .busy     (t_busy)
  );

  assign busy = v0 | a_busy | t_busy;
endmodule
