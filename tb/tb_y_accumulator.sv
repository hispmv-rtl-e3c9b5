// tb_y_accumulator: clears the buffer, then accumulates random (row, value)
// pairs into a few rows, holding each pair while hazard is high as the PE group
// does. Afterwards every row is read back and compared with sums kept by the
// testbench. Directed cases check the timing of forwarding: a row that comes
// back exactly LAT_ADD cycles later is taken without a stall (its operand is
// forwarded), one that comes back in the next cycle waits LAT_ADD-1 cycles.
module tb_y_accumulator;
  import hispmv_pkg::*;
  import tb_fp_pkg::*;

  localparam int DEPTH = 32, LAT_ADD = 4;
  logic clk = 0, rst_n = 0, clear = 0, clearing;
  logic in_valid = 0, accept, hazard, forwarded, busy;
  logic [ROW_W-1:0] in_row = 0;
  fp32_t in_val = 0, rd_data;
  logic [4:0] rd_addr = 0;
  int checks = 0, failures = 0, hazards = 0, fwds = 0;
  int ref_sum [DEPTH];

  y_accumulator #(.DEPTH(DEPTH), .LAT_ADD(LAT_ADD)) dut (.*);
  assign accept = 1'b1;

  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  always @(posedge clk) begin
    if (hazard) hazards++;
    if (forwarded) fwds++;
  end

  // present one pair; return the number of cycles it waited
  task automatic push(input int row, input int v, output int waited);
    in_valid = 1; in_row = ROW_W'(row); in_val = int_f(v);
    waited = 0;
    #1;
    while (hazard) begin
      waited++;
      @(posedge clk); #1;
    end
    ref_sum[row] += v;
    @(posedge clk); #1;
    in_valid = 0;
  endtask

  task automatic expect_wait(input int got, input int exp_w, input string what);
    checks++;
    if (got != exp_w) begin
      failures++;
      $display("FAIL %s: waited %0d expected %0d", what, got, exp_w);
    end
  endtask

  initial begin
    int w, f0;
    for (int r = 0; r < DEPTH; r++) ref_sum[r] = 0;
    repeat (2) @(posedge clk); #1;
    rst_n = 1;
    clear = 1; @(posedge clk); #1; clear = 0;
    while (clearing) begin @(posedge clk); #1; end
    // random accumulation
    for (int i = 0; i < 1500; i++) begin
      push(int'($urandom_range(0, 5)), int'($urandom_range(0, 60)) - 30, w);
      if ($urandom_range(0, 5) == 0) begin @(posedge clk); #1; end
    end
    // directed: same row at distance LAT_ADD: no wait, forwarded
    repeat (LAT_ADD + 1) @(posedge clk); #1;
    f0 = fwds;
    push(20, 3, w); expect_wait(w, 0, "first");
    for (int k = 1; k < LAT_ADD; k++) push(21 + k, 1, w);
    push(20, 4, w); expect_wait(w, 0, "distance LAT_ADD");
    checks++;
    if (fwds != f0 + 1) begin failures++; $display("FAIL no forwarding at distance LAT_ADD"); end
    // directed: same row at distance 1: waits LAT_ADD-1 cycles
    repeat (LAT_ADD + 1) @(posedge clk); #1;
    push(21, 5, w);
    push(21, 6, w); expect_wait(w, LAT_ADD - 1, "distance 1");
    repeat (LAT_ADD + 2) @(posedge clk); #1;
    for (int r = 0; r < DEPTH; r++) begin
      rd_addr = 5'(r); #1;
      checks++;
      if (rd_data !== int_f(ref_sum[r])) begin
        failures++;
        $display("FAIL row %0d holds %h expected %0d", r, rd_data, ref_sum[r]);
      end
    end
    // clear again
    clear = 1; @(posedge clk); #1; clear = 0;
    while (clearing) begin @(posedge clk); #1; end
    for (int r = 0; r < DEPTH; r++) begin
      rd_addr = 5'(r); #1;
      checks++;
      if (rd_data !== FP_ZERO) begin failures++; $display("FAIL row %0d not cleared", r); end
    end
    checks++;
    if (hazards == 0 || fwds == 0) begin failures++; $display("FAIL no hazard/forward seen"); end
    $display("y_accumulator: %0d hazard cycles, %0d forwards", hazards, fwds);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
