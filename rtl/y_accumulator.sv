// y_accumulator: the y buffer of one PE with its read-add-write loop.
//
// The buffer holds the partial sums of the rows this PE owns (row field =
// address). An accepted (row, value) reads the buffer, adds the value in a
// pipelined FP32 adder of LAT_ADD cycles and writes the sum back when it leaves
// the adder. Local forwarding: the read is combinational and, if the row equals
// the one whose sum leaves the adder in this cycle, that sum is used instead of
// the stale buffer word. So a row can come back after LAT_ADD cycles, with no
// extra cycles for buffer read or write. If the same row is still inside the
// adder (fewer than LAT_ADD cycles ago) hazard is raised; the PE group then
// stalls and this unit waits, while its own adder keeps running.
// clear sweeps all DEPTH words to zero, one per cycle (the "init y" phase);
// clearing is high meanwhile. rd_addr/rd_data read the buffer for the store
// phase. in_valid is taken when accept is high (the group's advance signal).
// The published HiSpMV design gives local forwarding and its purpose; the hazard stall and
// the clearing sweep are this design's choices.
module y_accumulator
  import hispmv_pkg::*;
#(
  parameter int DEPTH   = 4096,
  parameter int LAT_ADD = 4
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     clear,
  output logic                     clearing,
  input  logic                     in_valid,
  input  logic [ROW_W-1:0]         in_row,
  input  fp32_t                    in_val,
  input  logic                     accept,
  output logic                     hazard,
  output logic                     forwarded,
  input  logic [$clog2(DEPTH)-1:0] rd_addr,
  output fp32_t                    rd_data,
  output logic                     busy
);
  localparam int AW = $clog2(DEPTH);

  fp32_t            mem [DEPTH];
  logic [LAT_ADD-1:0] sv_q;
  logic [AW-1:0]    sr_q [LAT_ADD];
  logic [AW-1:0]    addr;
  logic             issue;
  fp32_t            old;
  logic             a_valid;
  fp32_t            a_sum;
  logic [AW-1:0]    a_row;
  logic             a_busy;
  logic [AW-1:0]    clr_q;

  assign addr = in_row[AW-1:0];

  always_comb begin
    hazard = 1'b0;
    for (int k = 0; k < LAT_ADD - 1; k++)
      if (sv_q[k] && sr_q[k] == addr) hazard = 1'b1;
    hazard = hazard && in_valid;
  end

  assign issue     = in_valid && accept && !hazard;
  assign forwarded = issue && a_valid && (a_row == addr);
  assign old       = (a_valid && a_row == addr) ? a_sum : mem[addr];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sv_q <= '0;
      for (int k = 0; k < LAT_ADD; k++) sr_q[k] <= '0;
    end else begin
      sv_q[0] <= issue;
      sr_q[0] <= addr;
      for (int k = 1; k < LAT_ADD; k++) begin
        sv_q[k] <= sv_q[k-1];
        sr_q[k] <= sr_q[k-1];
      end
    end
  end

  fp_add #(.LAT(LAT_ADD), .TW(AW)) u_add (
    .clk, .rst_n,
    .en       (1'b1),
    .in_valid (issue),
    .a        (old),
    .b        (in_val),
    .in_tag   (addr),
    .out_valid(a_valid),
    .sum      (a_sum),
    .out_tag  (a_row),
    .busy     (a_busy)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      clearing <= 1'b0;
      clr_q    <= '0;
    end else if (clear && !clearing) begin
      clearing <= 1'b1;
      clr_q    <= '0;
    end else if (clearing) begin
      clr_q <= clr_q + AW'(1);
      if (clr_q == AW'(DEPTH - 1)) clearing <= 1'b0;
    end
  end

  always_ff @(posedge clk) begin
    if (clearing)     mem[clr_q] <= FP_ZERO;
    else if (a_valid) mem[a_row] <= a_sum;
  end

  assign rd_data = mem[rd_addr];
  assign busy    = a_busy;
endmodule
