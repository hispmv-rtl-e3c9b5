// tb_spmv_controller: the controller with NG simple group models. Each model
// takes a random number of beats per tile while go is high, reports the last
// one (tile_taken) and, one cycle later, that its x values were read
// (tile_read). The testbench checks, for a run in each buffering mode:
// the mode chosen from tile_len against est_compute; the clearing phase;
// exactly tile_len x writes per tile to the right banks (both banks in
// sequential mode, alternating in ping-pong mode); that no group takes a beat
// of a tile before all of it has passed the chain; that a bank is never
// overwritten while a group may still read it; that loads overlap computation
// in ping-pong mode only, also when a tile computes longer than it loads
// (loads must then wait for the bank); and that the store phase issues rows 0, M, 2M, ...
// up to num_rows and then raises done.
module tb_spmv_controller;
  import hispmv_pkg::*;

  localparam int NG = 4, M = 2, XDEPTH = 64, RW = 24;
  logic clk = 0, rst_n = 0, start = 0;
  logic [15:0] num_tiles;
  logic [6:0] tile_len;
  logic [RW-1:0] num_rows;
  logic [31:0] est_compute;
  logic done, pingpong;
  logic x_valid = 0, x_ready;
  fp32_t x_data = 0;
  logic xw_valid;
  logic [1:0] xw_sel;
  logic [5:0] xw_addr;
  fp32_t xw_data;
  logic clear, clearing = 0;
  logic [NG-1:0] go, tile_taken, tile_read, rd_bank;
  logic groups_busy = 0;
  logic y_in_valid = 0, y_in_ready, st_valid;
  logic [RW-1:0] st_row;
  logic upd_busy = 0;
  int checks = 0, failures = 0, cyc = 0;

  spmv_controller #(.NG(NG), .M(M), .XDEPTH(XDEPTH), .RW(RW)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic fail(input string s);
    failures++;
    if (failures < 20) $display("FAIL %s", s);
  endtask

  // y-buffer clearing model
  int clr_cnt = 0;
  always @(posedge clk) begin
    if (clear && !clearing) begin clearing <= 1; clr_cnt <= 10; end
    else if (clearing) begin
      clr_cnt <= clr_cnt - 1;
      if (clr_cnt == 1) clearing <= 0;
    end
  end

  // group models
  int beats_left [NG];
  int gtile [NG];
  int readt [NG];
  logic [NG-1:0] rd_pend = 0;
  assign tile_read = rd_pend;
  always_comb for (int g = 0; g < NG; g++) tile_taken[g] = go[g] && beats_left[g] == 1;

  // the beat taken in the previous cycle reads x now: it must see its tile's bank
  bit s0_v [NG];
  int s0_t [NG];

  // x tile bookkeeping in the testbench
  int wr_tile = 0, wr_cnt = 0, complete_at [64];
  int overlap = 0, taking;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    rd_pend <= tile_taken;
    taking = 0;
    for (int g = 0; g < NG; g++) begin
      if (s0_v[g] && pingpong) begin
        checks++;
        if (rd_bank[g] != s0_t[g][0]) fail($sformatf("group %0d reads bank %0d for tile %0d", g, rd_bank[g], s0_t[g]));
      end
      s0_v[g] = go[g];
      s0_t[g] = gtile[g];
    end
    for (int g = 0; g < NG; g++) begin
      if (tile_read[g]) readt[g] = readt[g] + 1;
      if (go[g]) begin
        taking = 1;
        checks++;
        if (complete_at[gtile[g]] < 0 || cyc - complete_at[gtile[g]] < NG)
          fail($sformatf("group %0d takes tile %0d before it is loaded", g, gtile[g]));
        beats_left[g] = beats_left[g] - 1;
        if (beats_left[g] == 0) begin
          gtile[g] = gtile[g] + 1;
          beats_left[g] = int'($urandom_range(maxbeats / 2, maxbeats));
        end
      end
    end
    if (xw_valid) begin
      if (taking) overlap++;
      checks++;
      if (xw_addr != 6'(wr_cnt)) fail("x write address");
      if (xw_sel != (pingpong ? (wr_tile % 2 ? 2'b10 : 2'b01) : 2'b11)) fail("x write bank");
      for (int g = 0; g < NG; g++)
        if (readt[g] < wr_tile - (pingpong ? 1 : 0))
          fail($sformatf("tile %0d written while group %0d still reads tile %0d", wr_tile, g, readt[g]));
      wr_cnt = wr_cnt + 1;
      if (wr_cnt == int'(tile_len)) begin
        complete_at[wr_tile] = cyc;
        wr_tile = wr_tile + 1;
        wr_cnt = 0;
      end
    end
  end

  int maxbeats = 30;

  task automatic run(input int ntiles, input int tlen, input int est, input int nrows, input int mb);
    int next_row;
    maxbeats = mb;
    for (int g = 0; g < NG; g++) begin
      beats_left[g] = int'($urandom_range(1, maxbeats)); gtile[g] = 0; readt[g] = 0;
    end
    for (int t = 0; t < 64; t++) complete_at[t] = -1;
    wr_tile = 0; wr_cnt = 0; overlap = 0;
    num_tiles = 16'(ntiles); tile_len = 7'(tlen); est_compute = est; num_rows = RW'(nrows);
    start = 1; @(posedge clk); #1; start = 0;
    checks++;
    if (pingpong != (tlen > est)) fail("mode choice");
    x_valid = 1;
    groups_busy = 1;
    // run until all tiles are read
    while (!(wr_tile == ntiles && readt[0] == ntiles && readt[1] == ntiles &&
             readt[2] == ntiles && readt[3] == ntiles)) begin
      x_valid = ($urandom_range(0, 3) != 0);
      @(posedge clk); #1;
    end
    x_valid = 0;
    repeat (5) @(posedge clk); #1;
    checks++;
    if (y_in_ready) fail("store before the pipelines are empty");
    groups_busy = 0;
    next_row = 0;
    while (!done) begin
      y_in_valid = ($urandom_range(0, 2) != 0);
      #1;
      if (st_valid) begin
        checks++;
        if (int'(st_row) != next_row) fail("store row order");
        next_row += M;
      end
      @(posedge clk); #1;
    end
    y_in_valid = 0;
    checks++;
    if (next_row != nrows) fail($sformatf("stored %0d rows of %0d", next_row, nrows));
    checks++;
    if (pingpong ? overlap == 0 : overlap != 0) fail($sformatf("overlap %0d in mode %0d", overlap, pingpong));
    $display("run: mode %s, %0d tiles, load/compute overlap cycles %0d", pingpong ? "ping-pong" : "sequential", ntiles, overlap);
  endtask

  initial begin
    repeat (2) @(posedge clk); #1;
    rst_n = 1;
    run(5, 40, 100, 20, 30);   // compute estimated slower than loading: sequential
    run(6, 60, 10, 16, 30);    // loading slower than computing: ping-pong
    run(8, 30, 10, 16, 160);   // ping-pong chosen, but tiles compute longer than they load
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
