// tb_pe_group: one PE group of 8 PEs, run twice: with its x buffers in
// sequential mode and in ping-pong mode. The testbench loads an x tile
// through the group's chain input, then streams beats: inter-row beats with a
// random element per lane (rows drawn from a few addresses, so that back-to-
// back runs, y-buffer hazards and forwarding all occur) mixed with intra-row
// beats of a dense row. It keeps its own sums of value * x[col] per PE and row
// and compares every y-buffer word after the group is idle. It also checks
// that the x chain passes each load on one cycle later, and that every
// mechanism (stall, hazard, x-port conflict in ping-pong mode, intra-row beat,
// forwarding, pre-accumulation) happened.
module tb_pe_group;
  import hispmv_pkg::*;
  import tb_fp_pkg::*;

  localparam int P = 8, XDEPTH = 64, YDEPTH = 16, LAT_MUL = 3, LAT_ADD = 4;
  logic clk = 0, rst_n = 0;
  logic a_valid = 0, a_ready;
  coo_t a_elem [P];
  logic [P-1:0] a_lane_valid = 0;
  logic a_intra = 0, a_last = 0;
  logic [2:0] a_owner = 0;
  logic go = 1, tile_taken, tile_read, pingpong = 0, rd_bank = 0, clear = 0, clearing, busy;
  logic x_in_valid = 0, x_out_valid;
  logic [1:0] x_in_sel = 0, x_out_sel;
  logic [5:0] x_in_addr = 0, x_out_addr;
  fp32_t x_in_data = 0, x_out_data;
  logic [3:0] y_rd_addr = 0;
  fp32_t y_rd_data [P];
  logic ev_stall, ev_hazard, ev_conflict, ev_intra;
  logic [P-1:0] ev_forward, ev_merge;
  int checks = 0, failures = 0;
  int n_stall = 0, n_hazard = 0, n_conflict = 0, n_intra = 0, n_fwd = 0, n_merge = 0, n_taken = 0, n_read = 0;

  pe_group #(.P(P), .XDEPTH(XDEPTH), .YDEPTH(YDEPTH), .LAT_MUL(LAT_MUL), .LAT_ADD(LAT_ADD)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic x_prev_v = 0;
  logic [5:0] x_prev_a = 0;
  fp32_t x_prev_d = 0;
  always @(posedge clk) begin x_prev_v <= x_in_valid; x_prev_a <= x_in_addr; x_prev_d <= x_in_data; end

  always @(posedge clk) if (rst_n) begin
    n_stall += int'(ev_stall); n_hazard += int'(ev_hazard); n_conflict += int'(ev_conflict);
    n_intra += int'(ev_intra); n_fwd += $countones(ev_forward); n_merge += $countones(ev_merge);
    n_taken += int'(tile_taken); n_read += int'(tile_read);
    // chain stage: one cycle later, unchanged
    checks++;
    if (x_out_valid !== x_prev_v || (x_prev_v && (x_out_addr !== x_prev_a || x_out_data !== x_prev_d))) begin
      failures++; $display("FAIL x chain stage");
    end
  end

  int xv [XDEPTH];
  int ref_y [P][YDEPTH];

  task automatic run(input logic pp);
    pingpong = pp; rd_bank = 0;
    for (int l = 0; l < P; l++) for (int r = 0; r < YDEPTH; r++) ref_y[l][r] = 0;
    clear = 1; @(posedge clk); #1; clear = 0;
    while (clearing) begin @(posedge clk); #1; end
    // x tile: sequential writes both banks, ping-pong only bank 0
    for (int a = 0; a < XDEPTH; a++) begin
      xv[a] = int'($urandom_range(0, 8)) - 4;
      x_in_valid = 1; x_in_sel = pp ? 2'b01 : 2'b11; x_in_addr = 6'(a); x_in_data = int_f(xv[a]);
      @(posedge clk); #1;
    end
    x_in_valid = 0;
    @(posedge clk); #1;
    for (int b = 0; b < 600; b++) begin
      a_valid = 1;
      a_last  = (b == 599);
      a_intra = ($urandom_range(0, 5) == 0);
      a_owner = 3'($urandom);
      a_lane_valid = a_intra ? P'($urandom) | 8'h01 : P'($urandom) | P'($urandom);
      begin
        int drow;
        drow = int'($urandom_range(0, YDEPTH - 1));
        for (int l = 0; l < P; l++) begin
          a_elem[l].row = ROW_W'(a_intra ? drow : int'($urandom_range(0, 3)));
          a_elem[l].col = COL_W'($urandom_range(0, XDEPTH - 1));
          a_elem[l].val = int_f(int'($urandom_range(0, 16)) - 8);
        end
      end
      #1;
      while (!a_ready) begin @(posedge clk); #1; end
      for (int l = 0; l < P; l++) if (a_lane_valid[l]) begin
        int tgt;
        tgt = a_intra ? int'(a_owner) : l;
        ref_y[tgt][a_elem[l].row] += int'(f2r(a_elem[l].val)) * xv[a_elem[l].col];
      end
      @(posedge clk); #1;
    end
    a_valid = 0; a_last = 0;
    repeat (3) @(posedge clk); #1;
    while (busy) begin @(posedge clk); #1; end
    for (int l = 0; l < P; l++)
      for (int r = 0; r < YDEPTH; r++) begin
        y_rd_addr = 4'(r); #1;
        checks++;
        if (y_rd_data[l] !== int_f(ref_y[l][r])) begin
          failures++;
          $display("FAIL mode %0d PE %0d row %0d holds %h expected %0d", pp, l, r, y_rd_data[l], ref_y[l][r]);
        end
      end
  endtask

  initial begin
    for (int l = 0; l < P; l++) a_elem[l] = '0;
    repeat (2) @(posedge clk); #1;
    rst_n = 1;
    run(0);
    checks++;
    if (n_conflict != 0) begin failures++; $display("FAIL x-port conflict in sequential mode"); end
    run(1);
    checks++;
    if (n_stall == 0 || n_hazard == 0 || n_conflict == 0 || n_intra == 0 || n_fwd == 0 || n_merge == 0 ||
        n_taken != 2 || n_read != 2) begin
      failures++;
      $display("FAIL coverage: stall %0d hazard %0d conflict %0d intra %0d fwd %0d merge %0d taken %0d read %0d",
               n_stall, n_hazard, n_conflict, n_intra, n_fwd, n_merge, n_taken, n_read);
    end
    $display("pe_group: stall %0d hazard %0d conflict %0d intra %0d fwd %0d merge %0d",
             n_stall, n_hazard, n_conflict, n_intra, n_fwd, n_merge);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
