// tb_hispmv_balanced: end-to-end test of the accelerator on a balanced
// matrix, y = alpha*A*x + beta*y.
//
// Every row holds the same number of nonzeros (NZROW) in every x tile, at
// random columns, and no row is dense. The values of A, x and y are small
// integers so that every FP32 sum is exact whatever the order of additions.
// The matrix is encoded as in the imbalanced test: rows spread cyclically over
// the NG*P PEs, one stream of inter-row beats per group and tile, lane l
// carrying the rows of PE l, in row order in even tiles (runs of one row) and
// shuffled in odd tiles (y-buffer hazards). The operation runs once in
// sequential and once in ping-pong buffering. Every output row is compared
// with the reference. The intra-row mode must never be used, and the other
// mechanisms must all occur: group stall, y-buffer hazard, forwarding,
// pre-accumulation, x-port conflict and both buffering modes. Since all PEs
// of a group carry equal work, every beat should fill all P lanes; the test
// checks that the beat count equals the ideal one.
module tb_hispmv_balanced;
  import hispmv_pkg::*;
  import tb_fp_pkg::*;

  // design sizes
  localparam int NG = 4, P = 8, M = 2, XDEPTH = 256, YDEPTH = 16;
  // operation sizes
  localparam int NPE    = NG * P;
  localparam int NROWS  = NPE * 8;
  localparam int NTILES = 3;
  localparam int TLEN   = XDEPTH;
  localparam int NCOLS  = NTILES * TLEN;
  localparam int NZROW  = 6;
  localparam int WATCHDOG = 400000;
  localparam int RW = 24;

  logic clk = 0, rst_n = 0, start = 0;
  logic [15:0] num_tiles;
  logic [$clog2(XDEPTH):0] tile_len;
  logic [RW-1:0] num_rows;
  logic [31:0] est_compute;
  fp32_t alpha, beta;
  logic done, pingpong;
  perf_t perf;
  logic [NG-1:0] a_valid = 0, a_ready, a_intra = 0, a_last = 0;
  coo_t a_elem [NG][P];
  logic [P-1:0] a_lane_valid [NG];
  logic [$clog2(P)-1:0] a_owner [NG];
  logic x_valid = 0, x_ready;
  fp32_t x_data = 0;
  logic y_in_valid = 0, y_in_ready, y_out_valid;
  fp32_t y_in [M], y_out [M];
  logic [RW-1:0] y_out_row;

  hispmv_top #(.NG(NG), .P(P), .M(M), .XDEPTH(XDEPTH), .YDEPTH(YDEPTH)) dut (.*);

  int checks = 0, failures = 0;

  always #5 clk = ~clk;
  initial begin
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- workload ----------------
  int xv [NCOLS];
  int yv [NROWS];
  int ref_ax [NROWS];

  typedef struct {
    coo_t          e [P];
    logic [P-1:0]  lv;
    logic          intra;
    int            owner;
    logic          last;
  } beat_t;
  beat_t beats [NG][$];

  typedef struct { int row; int col; int val; } nz_t;

  task automatic build();
    nz_t lane_q [P][$];
    for (int c = 0; c < NCOLS; c++) xv[c] = int'($urandom_range(0, 6)) - 3;
    for (int r = 0; r < NROWS; r++) begin yv[r] = int'($urandom_range(0, 10)) - 5; ref_ax[r] = 0; end
    for (int g = 0; g < NG; g++) beats[g].delete();
    for (int t = 0; t < NTILES; t++) begin
      for (int g = 0; g < NG; g++) begin
        beat_t b;
        for (int l = 0; l < P; l++) lane_q[l].delete();
        // rows of this group's PEs, NZROW columns of tile t each
        for (int l = 0; l < P; l++)
          for (int r = g * P + l; r < NROWS; r += NPE) begin
            for (int k = 0; k < NZROW; k++) begin
              nz_t z;
              z.row = r; z.col = t * TLEN + int'($urandom_range(0, TLEN - 1));
              z.val = int'($urandom_range(1, 8)) * (($urandom_range(0, 1) != 0) ? 1 : -1);
              lane_q[l].push_back(z);
            end
          end
        if (t % 2 == 1) for (int l = 0; l < P; l++) lane_q[l].shuffle();
        // inter-row beats: one element of each lane per beat
        while (1) begin
          bit any;
          any = 0;
          b.lv = '0; b.intra = 0; b.owner = 0; b.last = 0;
          for (int l = 0; l < P; l++) begin
            b.e[l] = '0;
            if (lane_q[l].size() != 0) begin
              nz_t z;
              z = lane_q[l].pop_front();
              b.e[l].row = ROW_W'(z.row / NPE); b.e[l].col = COL_W'(z.col - t * TLEN);
              b.e[l].val = int_f(z.val); b.lv[l] = 1;
              ref_ax[z.row] += z.val * xv[z.col];
              any = 1;
            end
          end
          if (!any) break;
          beats[g].push_back(b);
        end
        if (beats[g].size() == 0 || beats[g][$].last) begin
          b.lv = '0; b.intra = 0; b.owner = 0;
          for (int l = 0; l < P; l++) b.e[l] = '0;
          beats[g].push_back(b);
        end
        beats[g][$].last = 1;
      end
    end
  endtask

  // ---------------- drivers ----------------
  int a_idx [NG];
  int x_idx, y_idx;
  bit feeding = 0;

  task automatic present();
    for (int g = 0; g < NG; g++) begin
      if (feeding && a_idx[g] < beats[g].size()) begin
        beat_t b;
        b = beats[g][a_idx[g]];
        a_valid[g] = ($urandom_range(0, 15) != 0);
        a_elem[g] = b.e; a_lane_valid[g] = b.lv; a_intra[g] = b.intra;
        a_owner[g] = ($clog2(P))'(b.owner); a_last[g] = b.last;
      end else begin
        a_valid[g] = 0; a_last[g] = 0; a_intra[g] = 0;
      end
    end
    x_valid = feeding && x_idx < NCOLS;
    x_data  = (x_idx < NCOLS) ? int_f(xv[x_idx]) : FP_ZERO;
    y_in_valid = feeding && y_idx < NROWS && ($urandom_range(0, 3) != 0);
    for (int m = 0; m < M; m++) y_in[m] = (y_idx + m < NROWS) ? int_f(yv[y_idx + m]) : FP_ZERO;
  endtask

  always begin
    bit fire_a [NG];
    bit fire_x, fire_y;
    @(negedge clk);
    for (int g = 0; g < NG; g++) fire_a[g] = a_valid[g] && a_ready[g];
    fire_x = x_valid && x_ready;
    fire_y = y_in_valid && y_in_ready;
    @(posedge clk); #1;
    for (int g = 0; g < NG; g++) if (fire_a[g]) a_idx[g]++;
    if (fire_x) x_idx++;
    if (fire_y) y_idx += M;
    present();
  end

  // ---------------- output check ----------------
  int seen [NROWS];
  int a_mul = 2, b_mul = -1;
  always @(negedge clk) if (rst_n && y_out_valid) begin
    for (int m = 0; m < M; m++) begin
      int r;
      r = int'(y_out_row) + m;
      checks++;
      if (r >= NROWS) begin
        failures++; $display("FAIL row %0d out of range", r);
      end else begin
        seen[r]++;
        if (y_out[m] !== int_f(a_mul * ref_ax[r] + b_mul * yv[r])) begin
          failures++;
          if (failures < 20)
            $display("FAIL row %0d: %h expected %0d", r, y_out[m], a_mul * ref_ax[r] + b_mul * yv[r]);
        end
      end
    end
  end

  // ---------------- runs ----------------
  int ev_stall = 0, ev_hazard = 0, ev_conflict = 0, ev_intra = 0, ev_fwd = 0, ev_merge = 0;
  int ev_seq = 0, ev_pp = 0;
  int cyc_seq = 0, cyc_pp = 0;

  task automatic run(input int est);
    for (int g = 0; g < NG; g++) a_idx[g] = 0;
    x_idx = 0; y_idx = 0;
    for (int r = 0; r < NROWS; r++) seen[r] = 0;
    num_tiles = 16'(NTILES); tile_len = ($clog2(XDEPTH) + 1)'(TLEN);
    num_rows = RW'(NROWS); est_compute = est;
    alpha = int_f(a_mul); beta = int_f(b_mul);
    start = 1; @(posedge clk); #1; start = 0;
    feeding = 1;
    while (!done) begin @(posedge clk); #1; end
    feeding = 0;
    checks++;
    for (int r = 0; r < NROWS; r++) if (seen[r] != 1) begin
      failures++; $display("FAIL row %0d seen %0d times", r, seen[r]); break;
    end
    checks++;
    if (perf.stall_cycles > perf.hazard_cycles + perf.xconflicts) begin
      failures++; $display("FAIL stalls without a cause");
    end
    ev_stall += perf.stall_cycles; ev_hazard += perf.hazard_cycles; ev_conflict += perf.xconflicts;
    ev_intra += perf.intra_beats; ev_fwd += perf.forwards; ev_merge += perf.merges;
    if (pingpong) begin ev_pp++; cyc_pp = perf.cycles; end
    else begin ev_seq++; cyc_seq = perf.cycles; end
    $display("run (%s): %0d cycles, stall %0d, hazard %0d, x conflicts %0d, intra beats %0d, forwards %0d, merges %0d",
             pingpong ? "ping-pong" : "sequential", perf.cycles, perf.stall_cycles, perf.hazard_cycles,
             perf.xconflicts, perf.intra_beats, perf.forwards, perf.merges);
  endtask

  initial begin
    int tot;
    for (int g = 0; g < NG; g++) begin
      a_lane_valid[g] = 0; a_owner[g] = 0;
      for (int l = 0; l < P; l++) a_elem[g][l] = '0;
    end
    for (int m = 0; m < M; m++) y_in[m] = 0;
    num_tiles = 0; tile_len = 0; num_rows = 0; est_compute = 0; alpha = 0; beta = 0;
    build();
    tot = 0;
    for (int g = 0; g < NG; g++) tot += beats[g].size();
    $display("workload: %0d rows, %0d columns in %0d tiles, %0d nonzeros per row and tile, %0d beats",
             NROWS, NCOLS, NTILES, NZROW, tot);
    checks++;
    if (tot != NG * NTILES * (NROWS / NPE) * NZROW) begin
      failures++; $display("FAIL %0d beats, ideal %0d", tot, NG * NTILES * (NROWS / NPE) * NZROW);
    end
    repeat (3) @(posedge clk); #1;
    rst_n = 1;
    @(posedge clk); #1;
    run(1 << 30);  // compute estimated slower than loading: sequential
    run(1);        // loading slower than computing: ping-pong
    checks++;
    if (ev_stall == 0 || ev_hazard == 0 || ev_conflict == 0 || ev_intra != 0 || ev_fwd == 0 ||
        ev_merge == 0 || ev_seq == 0 || ev_pp == 0) begin
      failures++;
      $display("FAIL a mechanism never occurred");
    end
    checks++;
    if (!(cyc_pp < cyc_seq)) begin
      failures++; $display("FAIL ping-pong (%0d cycles) not faster than sequential (%0d)", cyc_pp, cyc_seq);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
