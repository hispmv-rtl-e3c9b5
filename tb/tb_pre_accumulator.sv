// tb_pre_accumulator: a random stream of products in runs of 1 to 14 for the
// same row, with bubbles and freezes (en low), one product per enabled cycle.
// The testbench cuts the stream into runs itself and expects, in order, one
// (row, sum) per run; values are small integers so sums are exact. It also
// checks that every run leaves after the same number of enabled cycles and
// that long runs were actually folded (merged pulses).
module tb_pre_accumulator;
  import hispmv_pkg::*;
  import tb_fp_pkg::*;

  localparam int LAT_ADD = 4;
  logic clk = 0, rst_n = 0, en = 1, in_valid = 0;
  logic [ROW_W-1:0] in_row = 0, out_row;
  fp32_t in_val = 0, out_val;
  logic out_valid, merged, busy;
  int checks = 0, failures = 0, merges = 0, ecyc = 0, lat = -1;

  pre_accumulator #(.LAT_ADD(LAT_ADD)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct { int row; int sum; int ended; } run_t;
  run_t exp_q [$];
  logic cur_open = 0;
  int   cur_row, cur_sum;

  // build the expected runs from what the unit takes at each enabled edge
  always @(posedge clk) if (rst_n && en) begin
    ecyc <= ecyc + 1;
    if (cur_open && !(in_valid && int'(in_row) == cur_row)) begin
      exp_q.push_back('{cur_row, cur_sum, ecyc});
      cur_open = 0;
    end
    if (in_valid) begin
      if (!cur_open) begin
        cur_open = 1; cur_row = int'(in_row); cur_sum = 0;
      end
      cur_sum += int'(f2r(in_val));
    end
    if (merged) merges++;
  end

  always @(negedge clk) if (rst_n && en && out_valid) begin
    run_t e;
    checks++;
    if (exp_q.size() == 0) begin
      failures++;
      $display("FAIL unexpected output row %0d", out_row);
    end else begin
      e = exp_q.pop_front();
      if (int'(out_row) != e.row || out_val !== int_f(e.sum)) begin
        failures++;
        $display("FAIL row %0d sum %h expected row %0d sum %0d", out_row, out_val, e.row, e.sum);
      end
      if (lat < 0) lat = ecyc - e.ended;
      else if (ecyc - e.ended != lat) begin
        failures++;
        $display("FAIL latency %0d, earlier %0d", ecyc - e.ended, lat);
      end
    end
  end

  initial begin
    repeat (2) @(posedge clk); #1;
    rst_n = 1;
    for (int r = 0; r < 400; r++) begin
      int len, row;
      len = int'($urandom_range(1, 14));
      row = int'($urandom_range(0, 5));
      for (int k = 0; k < len; k++) begin
        in_valid = 1; in_row = ROW_W'(row);
        in_val = int_f(int'($urandom_range(0, 40)) - 20);
        en = ($urandom_range(0, 7) != 0);
        @(posedge clk); #1;
        while (!en) begin en = 1; @(posedge clk); #1; end
      end
      if ($urandom_range(0, 3) == 0) begin
        in_valid = 0; @(posedge clk); #1;
      end
    end
    in_valid = 0;
    repeat (40) @(posedge clk);
    checks++;
    if (exp_q.size() != 0 || merges == 0 || busy) begin
      failures++;
      $display("FAIL %0d runs missing, %0d merges, busy %b", exp_q.size(), merges, busy);
    end
    $display("pre_accumulator: latency %0d enabled cycles, %0d merges", lat, merges);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
