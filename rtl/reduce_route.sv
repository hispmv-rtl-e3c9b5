// reduce_route: the mode switch between the PEs of a group and their
// accumulators.
//
// Inter-row mode (intra = 0): every PE works on rows of its own, so each lane's
// product is simply forwarded to the same lane's accumulator.
// Intra-row mode (intra = 1): all PEs of the group work on one dense row. The
// valid products of all P lanes are summed by an adder tree and the single sum
// is routed to lane `owner`, the PE whose y buffer holds that row; the other
// lanes carry nothing. The row tag is taken from the lowest valid lane.
// Both paths have the same latency, LEVELS*LAT_ADD enabled cycles with
// LEVELS = log2(P), so the mode may change from one cycle to the next without
// two results meeting at one output. The equal-latency forwarding path and the
// choice of the owner lane by a side-band field are this design's choices.
module reduce_route
  import hispmv_pkg::*;
#(
  parameter int P       = 8,
  parameter int LAT_ADD = 4
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 en,
  input  logic                 intra,
  input  logic [$clog2(P)-1:0] owner,
  input  logic [P-1:0]         in_valid,
  input  logic [ROW_W-1:0]     in_row [P],
  input  fp32_t                in_val [P],
  output logic [P-1:0]         out_valid,
  output logic [ROW_W-1:0]     out_row [P],
  output fp32_t                out_val [P],
  output logic                 busy
);
  localparam int LEVELS = $clog2(P);
  localparam int D      = LEVELS * LAT_ADD;
  localparam int OW     = $clog2(P);

  // forwarding path: delay line of D stages
  logic [P-1:0]     fv_q [D];
  logic [ROW_W-1:0] fr_q [D][P];
  fp32_t            fx_q [D][P];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < D; s++) begin
        fv_q[s] <= '0;
        for (int l = 0; l < P; l++) begin
          fr_q[s][l] <= '0;
          fx_q[s][l] <= FP_ZERO;
        end
      end
    end else if (en) begin
      fv_q[0] <= intra ? '0 : in_valid;
      fr_q[0] <= in_row;
      fx_q[0] <= in_val;
      for (int s = 1; s < D; s++) begin
        fv_q[s] <= fv_q[s-1];
        fr_q[s] <= fr_q[s-1];
        fx_q[s] <= fx_q[s-1];
      end
    end
  end

  // reduce path
  fp32_t            tree_in [P];
  logic [ROW_W-1:0] red_row;
  logic             t_valid;
  fp32_t            t_sum;
  logic [ROW_W+OW-1:0] t_tag;
  logic             t_busy;

  always_comb begin
    red_row = in_row[0];
    for (int l = P - 1; l >= 0; l--) if (in_valid[l]) red_row = in_row[l];
    for (int l = 0; l < P; l++) tree_in[l] = in_valid[l] ? in_val[l] : FP_ZERO;
  end

  fp_add_tree #(.N(P), .LAT(LAT_ADD), .TW(ROW_W + OW)) u_tree (
    .clk, .rst_n, .en,
    .in_valid (intra && (|in_valid)),
    .in_val   (tree_in),
    .in_tag   ({red_row, owner}),
    .out_valid(t_valid),
    .sum      (t_sum),
    .out_tag  (t_tag),
    .busy     (t_busy)
  );

  always_comb begin
    for (int l = 0; l < P; l++) begin
      if (t_valid && t_tag[OW-1:0] == OW'(l)) begin
        out_valid[l] = 1'b1;
        out_row[l]   = t_tag[ROW_W+OW-1:OW];
        out_val[l]   = t_sum;
      end else begin
        out_valid[l] = fv_q[D-1][l];
        out_row[l]   = fr_q[D-1][l];
        out_val[l]   = fx_q[D-1][l];
      end
    end
  end

  always_comb begin
    busy = t_busy;
    for (int s = 0; s < D; s++) busy |= |fv_q[s];
  end
endmodule
