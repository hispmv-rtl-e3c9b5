// hispmv_top: HiSpMV sparse-matrix dense-vector multiplier,
// y = alpha * A * x + beta * y, for FP32 data.
//
// NG sparse-matrix channels each feed a PE group of P PEs (NG*P PEs in all).
// Rows are spread cyclically over all PEs: row r lives in PE r mod (NG*P), at
// address r / (NG*P) of that PE's y buffer. x is processed in tiles of up to
// XDEPTH words that arrive on one x channel and are broadcast to the groups
// through a chain of registers, one stage per group. The M y channels carry the
// old y values in and the results out, M rows per cycle.
//
// A run: pulse start with the configuration; the controller clears the y
// buffers, then alternates/overlaps x tile loads and matrix streaming (see
// spmv_controller and hybrid_buffer), waits for the pipelines to empty, and
// finally streams rows 0..num_rows-1 out: each cycle in which y_in_valid is
// high it reads M accumulated rows, takes M old y values and, LAT_MUL+LAT_ADD
// cycles later, presents y_out with y_out_row = index of its first row. done
// stays high until the next start. perf counts the events of the run.
//
// Matrix channel g, per beat: P COO elements (a_elem[g][l] for lane l) with a
// valid bit per lane (a_lane_valid), a_intra/a_owner for a dense-row beat and
// a_last on the final beat of each tile (a beat with no valid lane may carry
// a_last). Each group's stream of every tile must end with a beat marked last.
// num_rows must be a multiple of M and M must divide NG*P.
//
// Sizes: NG = 16 channels and 8 PEs per channel (128 PEs) are the published
// HiSpMV main configuration; the tile depth, y-buffer depth, latencies and M are this
// design's choices. ADDER_CHAIN and HYBRID_BUF (both 1 by default) build the
// engine without pre-accumulation or without ping-pong buffering, the two
// optional features of the published design generator.
module hispmv_top
  import hispmv_pkg::*;
#(
  parameter int NG      = 16,
  parameter int P       = 8,
  parameter int M       = 2,
  parameter int XDEPTH  = 4096,
  parameter int YDEPTH  = 4096,
  parameter int LAT_MUL = 3,
  parameter int LAT_ADD = 4,
  parameter int RW      = 24,
  parameter bit ADDER_CHAIN = 1'b1,
  parameter bit HYBRID_BUF  = 1'b1
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // configuration
  input  logic                    start,
  input  logic [15:0]             num_tiles,
  input  logic [$clog2(XDEPTH):0] tile_len,
  input  logic [RW-1:0]           num_rows,
  input  logic [31:0]             est_compute,
  input  fp32_t                   alpha,
  input  fp32_t                   beta,
  output logic                    done,
  output logic                    pingpong,
  output perf_t                   perf,
  // sparse matrix channels
  input  logic [NG-1:0]           a_valid,
  output logic [NG-1:0]           a_ready,
  input  coo_t                    a_elem [NG][P],
  input  logic [P-1:0]            a_lane_valid [NG],
  input  logic [NG-1:0]           a_intra,
  input  logic [$clog2(P)-1:0]    a_owner [NG],
  input  logic [NG-1:0]           a_last,
  // x channel
  input  logic                    x_valid,
  input  fp32_t                   x_data,
  output logic                    x_ready,
  // y channels
  input  logic                    y_in_valid,
  input  fp32_t                   y_in [M],
  output logic                    y_in_ready,
  output logic                    y_out_valid,
  output logic [RW-1:0]           y_out_row,
  output fp32_t                   y_out [M]
);
  localparam int XAW = $clog2(XDEPTH);
  localparam int YAW = $clog2(YDEPTH);
  localparam int NPE = NG * P;

  // x broadcast chain: stage g feeds group g
  logic           xc_valid [NG+1];
  logic [1:0]     xc_sel   [NG+1];
  logic [XAW-1:0] xc_addr  [NG+1];
  fp32_t          xc_data  [NG+1];

  logic [NG-1:0] go, tile_taken, tile_read, rd_bank, g_busy, g_clearing;
  logic [NG-1:0] ev_stall, ev_hazard, ev_conflict, ev_intra;
  logic [P-1:0]  ev_forward [NG];
  logic [P-1:0]  ev_merge   [NG];
  fp32_t         y_rd [NG][P];
  logic          clear;
  logic          st_valid;
  logic [RW-1:0] st_row;
  logic          upd_busy;
  logic [YAW-1:0] y_rd_addr;

  spmv_controller #(.NG(NG), .M(M), .XDEPTH(XDEPTH), .RW(RW), .HYBRID_BUF(HYBRID_BUF)) u_ctrl (
    .clk, .rst_n,
    .start, .num_tiles, .tile_len, .num_rows, .est_compute,
    .done, .pingpong,
    .x_valid, .x_data, .x_ready,
    .xw_valid   (xc_valid[0]),
    .xw_sel     (xc_sel[0]),
    .xw_addr    (xc_addr[0]),
    .xw_data    (xc_data[0]),
    .clear,
    .clearing   (|g_clearing),
    .go, .tile_taken, .tile_read, .rd_bank,
    .groups_busy(|g_busy),
    .y_in_valid, .y_in_ready,
    .st_valid, .st_row,
    .upd_busy
  );

  assign y_rd_addr = YAW'(st_row / RW'(NPE));

  for (genvar g = 0; g < NG; g++) begin : g_grp
    pe_group #(
      .P(P), .XDEPTH(XDEPTH), .YDEPTH(YDEPTH), .LAT_MUL(LAT_MUL), .LAT_ADD(LAT_ADD),
      .ADDER_CHAIN(ADDER_CHAIN)
    ) u_grp (
      .clk, .rst_n,
      .a_valid     (a_valid[g]),
      .a_ready     (a_ready[g]),
      .a_elem      (a_elem[g]),
      .a_lane_valid(a_lane_valid[g]),
      .a_intra     (a_intra[g]),
      .a_owner     (a_owner[g]),
      .a_last      (a_last[g]),
      .go          (go[g]),
      .tile_taken  (tile_taken[g]),
      .tile_read   (tile_read[g]),
      .pingpong    (pingpong),
      .rd_bank     (rd_bank[g]),
      .clear       (clear),
      .clearing    (g_clearing[g]),
      .busy        (g_busy[g]),
      .x_in_valid  (xc_valid[g]),
      .x_in_sel    (xc_sel[g]),
      .x_in_addr   (xc_addr[g]),
      .x_in_data   (xc_data[g]),
      .x_out_valid (xc_valid[g+1]),
      .x_out_sel   (xc_sel[g+1]),
      .x_out_addr  (xc_addr[g+1]),
      .x_out_data  (xc_data[g+1]),
      .y_rd_addr   (y_rd_addr),
      .y_rd_data   (y_rd[g]),
      .ev_stall    (ev_stall[g]),
      .ev_hazard   (ev_hazard[g]),
      .ev_conflict (ev_conflict[g]),
      .ev_intra    (ev_intra[g]),
      .ev_forward  (ev_forward[g]),
      .ev_merge    (ev_merge[g])
    );
  end

  // store phase: pick the M rows st_row .. st_row+M-1 from their owning PEs
  fp32_t acc [M];
  always_comb begin
    for (int m = 0; m < M; m++) begin
      int idx;
      idx    = (int'(st_row) + m) % NPE;
      acc[m] = y_rd[idx / P][idx % P];
    end
  end

  y_update #(.M(M), .LAT_MUL(LAT_MUL), .LAT_ADD(LAT_ADD), .TW(RW)) u_upd (
    .clk, .rst_n,
    .alpha, .beta,
    .in_valid (st_valid),
    .in_tag   (st_row),
    .acc      (acc),
    .y_in     (y_in),
    .out_valid(y_out_valid),
    .out_tag  (y_out_row),
    .y_out    (y_out),
    .busy     (upd_busy)
  );

  // event counters
  logic [31:0] n_fwd, n_merge;
  always_comb begin
    n_fwd   = '0;
    n_merge = '0;
    for (int g = 0; g < NG; g++) begin
      n_fwd   += 32'($countones(ev_forward[g]));
      n_merge += 32'($countones(ev_merge[g]));
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      perf <= '0;
    end else if (start) begin
      perf <= '0;
    end else begin
      if (!done) perf.cycles <= perf.cycles + 32'd1;
      perf.stall_cycles  <= perf.stall_cycles  + 32'($countones(ev_stall));
      perf.hazard_cycles <= perf.hazard_cycles + 32'($countones(ev_hazard));
      perf.xconflicts    <= perf.xconflicts    + 32'($countones(ev_conflict));
      perf.intra_beats   <= perf.intra_beats   + 32'($countones(ev_intra));
      perf.forwards      <= perf.forwards      + n_fwd;
      perf.merges        <= perf.merges        + n_merge;
    end
  end
endmodule
