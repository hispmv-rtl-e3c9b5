// spmv_controller: sequences one SpMV run, y = alpha*A*x + beta*y.
//
// Phases: CLEAR (zero every y buffer, "init y"), RUN (load x tiles and stream
// the matrix tile by tile), DRAIN (wait until no product is in flight), STORE
// (read the accumulated rows, M per cycle, and send them with the old y values
// through the alpha/beta update), FLUSH (wait for the update pipeline) and DONE.
//
// Buffering mode: at start the controller compares the time to load one x tile
// (tile_len cycles, one word per cycle) with the expected compute time of one
// tile (est_compute). If loading is slower it picks ping-pong mode, where tile
// t+1 is loaded into one bank while tile t is read from the other; otherwise it
// picks sequential mode, where each tile is written into both banks and the
// groups wait during the load. HYBRID_BUF = 0 builds a controller that always
// uses sequential mode (a design without the hybrid buffer).
//
// In RUN the loader writes tile t into the head of the x broadcast chain and
// counts it as loaded NG+1 cycles after its last word, when the word has passed
// every group. A group may take beats of tile t (go) once t is loaded. Loading
// of tile t may begin once every group has finished reading tile t-1
// (sequential) or tile t-2, the previous user of the same bank (ping-pong).
// Each group reads bank (tiles it has finished) mod 2 in ping-pong mode.
// The phase list and the mode rule follow the published HiSpMV design; the exact handshakes
// are this design's.
module spmv_controller
  import hispmv_pkg::*;
#(
  parameter int NG     = 16,
  parameter int M      = 2,
  parameter int XDEPTH = 4096,
  parameter int RW     = 24,
  parameter bit HYBRID_BUF = 1'b1
) (
  input  logic                      clk,
  input  logic                      rst_n,
  // configuration, sampled at start
  input  logic                      start,
  input  logic [15:0]               num_tiles,
  input  logic [$clog2(XDEPTH):0]   tile_len,
  input  logic [RW-1:0]             num_rows,
  input  logic [31:0]               est_compute,
  output logic                      done,
  output logic                      pingpong,
  // x channel
  input  logic                      x_valid,
  input  fp32_t                     x_data,
  output logic                      x_ready,
  // head of the x broadcast chain
  output logic                      xw_valid,
  output logic [1:0]                xw_sel,
  output logic [$clog2(XDEPTH)-1:0] xw_addr,
  output fp32_t                     xw_data,
  // PE groups
  output logic                      clear,
  input  logic                      clearing,
  output logic [NG-1:0]             go,
  input  logic [NG-1:0]             tile_taken,
  input  logic [NG-1:0]             tile_read,
  output logic [NG-1:0]             rd_bank,
  input  logic                      groups_busy,
  // store phase
  input  logic                      y_in_valid,
  output logic                      y_in_ready,
  output logic                      st_valid,
  output logic [RW-1:0]             st_row,
  input  logic                      upd_busy
);
  typedef enum logic [2:0] {S_IDLE, S_CLEAR, S_RUN, S_DRAIN, S_STORE, S_FLUSH, S_DONE} state_t;
  localparam int XAW = $clog2(XDEPTH);
  localparam int CW  = $clog2(NG + 2) + 1;

  state_t state_q;
  logic [15:0] ntiles_q;
  logic [XAW:0] tlen_q;
  logic [RW-1:0] nrows_q;
  logic clr_seen_q;

  // tile bookkeeping
  logic [15:0] loaded_q;               // tiles fully in the buffers
  logic [15:0] taken_q [NG];           // tiles whose last beat a group took
  logic [15:0] read_q  [NG];           // tiles whose x values a group has read
  logic [15:0] min_read;
  logic        ld_active_q;
  logic [XAW:0] ld_cnt_q;
  logic [CW-1:0] settle_q;
  logic        settling_q;
  logic        may_load;

  always_comb begin
    min_read = read_q[0];
    for (int g = 1; g < NG; g++) if (read_q[g] < min_read) min_read = read_q[g];
  end

  assign may_load = (state_q == S_RUN) && !ld_active_q && !settling_q &&
                    (loaded_q < ntiles_q) &&
                    (pingpong ? (loaded_q <= min_read + 16'd1) : (loaded_q == min_read));

  assign x_ready  = ld_active_q;
  assign xw_valid = ld_active_q && x_valid;
  assign xw_sel   = pingpong ? (loaded_q[0] ? 2'b10 : 2'b01) : 2'b11;
  assign xw_addr  = ld_cnt_q[XAW-1:0];
  assign xw_data  = x_data;

  for (genvar g = 0; g < NG; g++) begin : g_go
    assign go[g]      = (state_q == S_RUN) && (taken_q[g] < loaded_q);
    assign rd_bank[g] = read_q[g][0];
  end

  assign clear      = (state_q == S_CLEAR) && !clr_seen_q;
  assign y_in_ready = (state_q == S_STORE);
  assign st_valid   = (state_q == S_STORE) && y_in_valid;
  assign done       = (state_q == S_DONE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q     <= S_IDLE;
      ntiles_q    <= '0;
      tlen_q      <= '0;
      nrows_q     <= '0;
      pingpong    <= 1'b0;
      clr_seen_q  <= 1'b0;
      loaded_q    <= '0;
      ld_active_q <= 1'b0;
      ld_cnt_q    <= '0;
      settle_q    <= '0;
      settling_q  <= 1'b0;
      st_row      <= '0;
      for (int g = 0; g < NG; g++) begin
        taken_q[g] <= '0;
        read_q[g]  <= '0;
      end
    end else begin
      for (int g = 0; g < NG; g++) begin
        if (tile_taken[g]) taken_q[g] <= taken_q[g] + 16'd1;
        if (tile_read[g])  read_q[g]  <= read_q[g] + 16'd1;
      end
      unique case (state_q)
        S_IDLE, S_DONE: if (start) begin
          ntiles_q   <= num_tiles;
          tlen_q     <= tile_len;
          nrows_q    <= num_rows;
          pingpong   <= HYBRID_BUF && (32'(tile_len) > est_compute);
          clr_seen_q <= 1'b0;
          loaded_q   <= '0;
          st_row     <= '0;
          for (int g = 0; g < NG; g++) begin
            taken_q[g] <= '0;
            read_q[g]  <= '0;
          end
          state_q <= S_CLEAR;
        end
        S_CLEAR: begin
          if (clearing) clr_seen_q <= 1'b1;
          if (clr_seen_q && !clearing) state_q <= S_RUN;
        end
        S_RUN: begin
          if (may_load) begin
            ld_active_q <= 1'b1;
            ld_cnt_q    <= '0;
          end
          if (ld_active_q && x_valid) begin
            ld_cnt_q <= ld_cnt_q + 1'b1;
            if (ld_cnt_q + 1'b1 == tlen_q) begin
              ld_active_q <= 1'b0;
              settling_q  <= 1'b1;
              settle_q    <= '0;
            end
          end
          if (settling_q) begin
            settle_q <= settle_q + 1'b1;
            if (settle_q == CW'(NG + 1)) begin
              settling_q <= 1'b0;
              loaded_q   <= loaded_q + 16'd1;
            end
          end
          if (min_read == ntiles_q) state_q <= S_DRAIN;
        end
        S_DRAIN: if (!groups_busy) state_q <= S_STORE;
        S_STORE: if (y_in_valid) begin
          st_row <= st_row + RW'(M);
          if (st_row + RW'(M) >= nrows_q) state_q <= S_FLUSH;
        end
        S_FLUSH: if (!upd_busy) state_q <= S_DONE;
        default: state_q <= S_IDLE;
      endcase
    end
  end
endmodule
