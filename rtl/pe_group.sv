// pe_group: the P processing elements fed by one sparse-matrix channel.
//
// One channel beat carries P COO elements, one per lane, with side-band bits:
// a valid bit per lane, `intra` (the beat belongs to a dense row that all PEs
// share), `owner` (the lane whose PE holds that row) and `last` (final beat of
// the current x tile). Inside, per lane: a PE (x lookup and multiply), then the
// reduce-and-route stage common to all lanes, then a pre-accumulator and a y
// accumulator. Lanes 2i and 2i+1 share one hybrid x buffer.
//
// Rows are distributed cyclically: in inter-row beats, lane l only carries
// rows this PE owns, and the row field is the address in that PE's y buffer.
// Flow control: the whole group advances together (en). It stops for one
// cycle when any y accumulator sees a read-after-write hazard or any hybrid
// buffer has two reads for one port; the beat is then held (a_ready low). A
// beat is taken only while go is high (its x tile is loaded). tile_taken
// pulses when the last beat of a tile is taken, tile_read when that beat has
// read its x values, which frees the bank.
//
// The group also holds one stage of the x broadcast chain: the x load arriving
// on x_in_* is registered, written into this group's buffers and passed on to
// the next group on x_out_*.
//
// ADDER_CHAIN = 0 builds the group without pre-accumulators (as the design
// generator allows); back-to-back products of one row then stall on the y
// buffer's hazard check instead.
//
// Inter-row/intra-row operation, the shared buffers and the chain follow the
// published HiSpMV design; the side-band encoding and the group-wide stall are this design's.
module pe_group
  import hispmv_pkg::*;
#(
  parameter int P       = 8,
  parameter int XDEPTH  = 4096,
  parameter int YDEPTH  = 4096,
  parameter int LAT_MUL = 3,
  parameter int LAT_ADD = 4,
  parameter bit ADDER_CHAIN = 1'b1
) (
  input  logic                      clk,
  input  logic                      rst_n,
  // matrix channel
  input  logic                      a_valid,
  output logic                      a_ready,
  input  coo_t                      a_elem [P],
  input  logic [P-1:0]              a_lane_valid,
  input  logic                      a_intra,
  input  logic [$clog2(P)-1:0]      a_owner,
  input  logic                      a_last,
  // control
  input  logic                      go,
  output logic                      tile_taken,
  output logic                      tile_read,
  input  logic                      pingpong,
  input  logic                      rd_bank,
  input  logic                      clear,
  output logic                      clearing,
  output logic                      busy,
  // x broadcast chain
  input  logic                      x_in_valid,
  input  logic [1:0]                x_in_sel,
  input  logic [$clog2(XDEPTH)-1:0] x_in_addr,
  input  fp32_t                     x_in_data,
  output logic                      x_out_valid,
  output logic [1:0]                x_out_sel,
  output logic [$clog2(XDEPTH)-1:0] x_out_addr,
  output fp32_t                     x_out_data,
  // y read-out
  input  logic [$clog2(YDEPTH)-1:0] y_rd_addr,
  output fp32_t                     y_rd_data [P],
  // events, one bit per cycle
  output logic                      ev_stall,
  output logic                      ev_hazard,
  output logic                      ev_conflict,
  output logic                      ev_intra,
  output logic [P-1:0]              ev_forward,
  output logic [P-1:0]              ev_merge
);
  localparam int XAW = $clog2(XDEPTH);
  localparam int OW  = $clog2(P);
  localparam int NB  = P / 2;

  logic en;
  logic [P-1:0]  hazard;
  logic [NB-1:0] xstall;
  logic take;

  assign en      = !(|hazard) && !(|xstall);
  assign a_ready = en && go;
  assign take    = a_valid && a_ready;

  // x broadcast chain stage
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x_out_valid <= 1'b0;
      x_out_sel   <= '0;
      x_out_addr  <= '0;
      x_out_data  <= FP_ZERO;
    end else begin
      x_out_valid <= x_in_valid;
      x_out_sel   <= x_in_sel;
      x_out_addr  <= x_in_addr;
      x_out_data  <= x_in_data;
    end
  end

  // side band that travels with a beat through the PE stage and multiplier
  localparam int SD = 1 + LAT_MUL;
  logic          sb_last  [SD];
  logic          sb_intra [SD];
  logic [OW-1:0] sb_owner [SD];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < SD; s++) begin
        sb_last[s]  <= 1'b0;
        sb_intra[s] <= 1'b0;
        sb_owner[s] <= '0;
      end
    end else if (en) begin
      sb_last[0]  <= take && a_last;
      sb_intra[0] <= take && a_intra;
      sb_owner[0] <= a_owner;
      for (int s = 1; s < SD; s++) begin
        sb_last[s]  <= sb_last[s-1];
        sb_intra[s] <= sb_intra[s-1];
        sb_owner[s] <= sb_owner[s-1];
      end
    end
  end

  assign tile_taken = take && a_last;
  assign tile_read  = en && sb_last[0];
  assign ev_intra  = en && sb_intra[0];

  // PEs
  logic [P-1:0]     x_req;
  logic [XAW-1:0]   x_addr [P];
  fp32_t            x_data [P];
  logic [P-1:0]     m_valid;
  logic [ROW_W-1:0] m_row [P];
  fp32_t            m_val [P];
  logic [P-1:0]     pe_busy;

  for (genvar l = 0; l < P; l++) begin : g_pe
    pe #(.LAT_MUL(LAT_MUL), .XDEPTH(XDEPTH)) u_pe (
      .clk, .rst_n, .en,
      .in_valid (take && a_lane_valid[l]),
      .in_elem  (a_elem[l]),
      .x_req    (x_req[l]),
      .x_addr   (x_addr[l]),
      .x_data   (x_data[l]),
      .out_valid(m_valid[l]),
      .out_row  (m_row[l]),
      .out_prod (m_val[l]),
      .busy     (pe_busy[l])
    );
  end

  // hybrid x buffers, one per PE pair
  for (genvar b = 0; b < NB; b++) begin : g_xb
    logic [XAW-1:0] ra [2];
    fp32_t          rd [2];
    assign ra[0] = x_addr[2*b];
    assign ra[1] = x_addr[2*b+1];
    hybrid_buffer #(.DEPTH(XDEPTH)) u_xb (
      .clk, .rst_n,
      .pingpong (pingpong),
      .rd_bank  (rd_bank),
      .wr_en    (x_out_valid),
      .wr_sel   (x_out_sel),
      .wr_addr  (x_out_addr),
      .wr_data  (x_out_data),
      .en       (en),
      .rd_valid (x_req[2*b+1 -: 2]),
      .rd_addr  (ra),
      .rd_data  (rd),
      .stall    (xstall[b])
    );
    assign x_data[2*b]   = rd[0];
    assign x_data[2*b+1] = rd[1];
  end

  // reduce and route
  logic [P-1:0]     r_valid;
  logic [ROW_W-1:0] r_row [P];
  fp32_t            r_val [P];
  logic             rr_busy;

  reduce_route #(.P(P), .LAT_ADD(LAT_ADD)) u_rr (
    .clk, .rst_n, .en,
    .intra    (sb_intra[SD-1]),
    .owner    (sb_owner[SD-1]),
    .in_valid (m_valid),
    .in_row   (m_row),
    .in_val   (m_val),
    .out_valid(r_valid),
    .out_row  (r_row),
    .out_val  (r_val),
    .busy     (rr_busy)
  );

  // per-lane accumulation
  logic [P-1:0] pa_busy, ya_busy, ya_clearing;
  for (genvar l = 0; l < P; l++) begin : g_acc
    logic             p_valid;
    logic [ROW_W-1:0] p_row;
    fp32_t            p_val;
    if (ADDER_CHAIN) begin : g_pre
      pre_accumulator #(.LAT_ADD(LAT_ADD)) u_pre (
        .clk, .rst_n, .en,
        .in_valid (r_valid[l]),
        .in_row   (r_row[l]),
        .in_val   (r_val[l]),
        .out_valid(p_valid),
        .out_row  (p_row),
        .out_val  (p_val),
        .merged   (ev_merge[l]),
        .busy     (pa_busy[l])
      );
    end else begin : g_nopre
      // build without the adder chain: products go straight to the y buffer
      assign p_valid     = r_valid[l];
      assign p_row       = r_row[l];
      assign p_val       = r_val[l];
      assign ev_merge[l] = 1'b0;
      assign pa_busy[l]  = 1'b0;
    end
    y_accumulator #(.DEPTH(YDEPTH), .LAT_ADD(LAT_ADD)) u_yacc (
      .clk, .rst_n,
      .clear    (clear),
      .clearing (ya_clearing[l]),
      .in_valid (p_valid),
      .in_row   (p_row),
      .in_val   (p_val),
      .accept   (en),
      .hazard   (hazard[l]),
      .forwarded(ev_forward[l]),
      .rd_addr  (y_rd_addr),
      .rd_data  (y_rd_data[l]),
      .busy     (ya_busy[l])
    );
  end

  assign clearing    = |ya_clearing;
  assign busy        = (|pe_busy) | rr_busy | (|pa_busy) | (|ya_busy);
  assign ev_stall    = !en;
  assign ev_hazard   = |hazard;
  assign ev_conflict = |xstall;
endmodule
