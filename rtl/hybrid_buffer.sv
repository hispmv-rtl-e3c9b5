// hybrid_buffer: two-bank on-chip buffer for one tile of the dense vector x,
// shared by a pair of PEs.
//
// Each bank is a simple dual-port memory: one write port for loading and one
// read port for the PEs. The buffer works in one of two modes, chosen per run:
//  * sequential (pingpong = 0): a tile is written into both banks at once
//    (wr_sel = 2'b11) and then read from both, PE port 0 from bank 0 and PE
//    port 1 from bank 1, so both PEs get their x value in the same cycle. Load
//    and compute alternate.
//  * ping-pong (pingpong = 1): one tile is loaded into one bank while both PEs
//    read the other bank (rd_bank). The two PEs then share that bank's single
//    read port. When both ask in the same cycle, the buffer serves port 0 first,
//    keeps its value in a hold register and raises stall for one cycle, then
//    serves port 1; this is why compute time in ping-pong mode lies between
//    once and twice that of sequential mode.
// Reads are combinational (memory as an array); the PE registers the result.
// stall is combinational from the request and the phase register. The phase
// only moves on when en (the PE group advances) is high. The single read port
// per bank and the serve-port-0-first order are this design's choices.
module hybrid_buffer
  import hispmv_pkg::*;
#(
  parameter int DEPTH = 4096
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     pingpong,
  input  logic                     rd_bank,
  // load port
  input  logic                     wr_en,
  input  logic [1:0]               wr_sel,
  input  logic [$clog2(DEPTH)-1:0] wr_addr,
  input  fp32_t                    wr_data,
  // PE ports
  input  logic                     en,
  input  logic [1:0]               rd_valid,
  input  logic [$clog2(DEPTH)-1:0] rd_addr [2],
  output fp32_t                    rd_data [2],
  output logic                     stall
);
  fp32_t bank0 [DEPTH];
  fp32_t bank1 [DEPTH];
  logic  phase_q;
  fp32_t hold_q;
  fp32_t pp_word;

  always_ff @(posedge clk) begin
    if (wr_en && wr_sel[0]) bank0[wr_addr] <= wr_data;
    if (wr_en && wr_sel[1]) bank1[wr_addr] <= wr_data;
  end

  logic conflict;
  assign conflict = pingpong && rd_valid[0] && rd_valid[1];
  assign stall    = conflict && !phase_q;

  // the single read port of the bank being consumed in ping-pong mode
  always_comb begin
    logic [$clog2(DEPTH)-1:0] a;
    a       = (conflict && phase_q) ? rd_addr[1] :
              (rd_valid[0] ? rd_addr[0] : rd_addr[1]);
    pp_word = rd_bank ? bank1[a] : bank0[a];
  end

  always_comb begin
    if (!pingpong) begin
      rd_data[0] = bank0[rd_addr[0]];
      rd_data[1] = bank1[rd_addr[1]];
    end else if (conflict) begin
      rd_data[0] = hold_q;
      rd_data[1] = pp_word;
    end else begin
      rd_data[0] = pp_word;
      rd_data[1] = pp_word;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase_q <= 1'b0;
      hold_q  <= FP_ZERO;
    end else if (stall) begin
      phase_q <= 1'b1;
      hold_q  <= pp_word;
    end else if (en) begin
      phase_q <= 1'b0;
    end
  end
endmodule
