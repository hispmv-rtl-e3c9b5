// tb_fp_add: checks the pipelined FP32 adder against double-precision
// reference sums: random operands of similar and of distant magnitude, exact
// cancellations, zeros, and the pipeline latency (result exactly LAT cycles
// after the operands, with its tag, and held while en is low).
module tb_fp_add;
  import hispmv_pkg::*;
  import tb_fp_pkg::*;

  localparam int LAT = 4;
  logic clk = 0, rst_n = 0, en = 1, in_valid = 0;
  fp32_t a, b, sum;
  logic [15:0] in_tag, out_tag;
  logic out_valid, busy;
  int checks = 0, failures = 0;

  fp_add #(.LAT(LAT), .TW(16)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  fp32_t qa [$], qb [$];
  int    qt [$], qi [$];
  int    cyc = 0;

  always @(posedge clk) if (en) cyc <= cyc + 1;  // counts enabled cycles

  // scoreboard
  always @(negedge clk) if (rst_n && en && out_valid) begin
    fp32_t ea, eb, exp_s;
    int t, ic;
    ea = qa.pop_front(); eb = qb.pop_front(); t = qt.pop_front(); ic = qi.pop_front();
    exp_s = r2f(f2r(ea) + f2r(eb));
    checks++;
    if (sum !== exp_s || out_tag !== 16'(t) || cyc - ic != LAT) begin
      failures++;
      if (failures < 10)
        $display("FAIL %h + %h = %h expected %h (tag %0d/%0d, latency %0d)",
                 ea, eb, sum, exp_s, out_tag, t, cyc - ic);
    end
  end

  task automatic drive(input fp32_t x, input fp32_t y);
    a = x; b = y; in_valid = 1; in_tag = 16'($urandom);
    @(negedge clk);
    qa.push_back(x); qb.push_back(y); qt.push_back(int'(in_tag)); qi.push_back(cyc);
    @(posedge clk); #1;
    in_valid = 0;
  endtask

  initial begin
    a = 0; b = 0; in_tag = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk); #1;
    for (int i = 0; i < 3000; i++) begin
      fp32_t x, y;
      case (i % 6)
        0: begin x = rand_f(100, 150); y = rand_f(100, 150); end
        1: begin x = rand_f(120, 130); y = rand_f(120, 130); end
        2: begin x = rand_f(126, 127); y = {~x[31], x[30:0]}; end
        3: begin x = rand_f(126, 127); y = {~x[31], x[30:1], ~x[0]}; end
        4: begin x = rand_f(120, 121); y = {~x[31], x[30:23] - 8'(i % 3), 23'($urandom)}; end
        default: begin x = rand_f(100, 150); y = (i % 12 == 5) ? FP_ZERO : int_f(i); end
      endcase
      drive(x, y);
      // occasionally freeze the pipeline
      if (i % 97 == 0) begin
        en = 0; repeat (3) @(posedge clk); #1; en = 1;
      end
    end
    repeat (LAT + 2) @(posedge clk);
    if (qa.size() != 0) begin
      failures++;
      $display("FAIL %0d results missing", qa.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
