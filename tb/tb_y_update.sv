// tb_y_update: random rows of accumulated values and old y values with random
// alpha and beta; each output must equal alpha*acc + beta*y_in, rounded after
// each multiplication and after the addition, and come LAT_MUL + LAT_ADD
// cycles after its input together with its row tag.
module tb_y_update;
  import hispmv_pkg::*;
  import tb_fp_pkg::*;

  localparam int M = 2, LAT_MUL = 3, LAT_ADD = 4, TW = 24;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid, busy;
  fp32_t alpha, beta;
  logic [TW-1:0] in_tag = 0, out_tag;
  fp32_t acc [M], y_in [M], y_out [M];
  int checks = 0, failures = 0, cyc = 0;

  y_update #(.M(M), .LAT_MUL(LAT_MUL), .LAT_ADD(LAT_ADD), .TW(TW)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct { int tag; fp32_t y [M]; int t; } exp_t;
  exp_t q [$];

  always @(posedge clk) if (rst_n) begin
    cyc <= cyc + 1;
    if (in_valid) begin
      exp_t e;
      e.tag = int'(in_tag); e.t = cyc;
      for (int m = 0; m < M; m++)
        e.y[m] = r2f(f2r(r2f(f2r(alpha) * f2r(acc[m]))) + f2r(r2f(f2r(beta) * f2r(y_in[m]))));
      q.push_back(e);
    end
  end

  always @(negedge clk) if (rst_n && out_valid) begin
    exp_t e;
    e = q.pop_front();
    for (int m = 0; m < M; m++) begin
      checks++;
      if (y_out[m] !== e.y[m] || int'(out_tag) != e.tag || cyc - e.t != LAT_MUL + LAT_ADD) begin
        failures++;
        $display("FAIL lane %0d got %h expected %h (tag %0d/%0d latency %0d)", m, y_out[m], e.y[m], out_tag, e.tag, cyc - e.t);
      end
    end
  end

  initial begin
    alpha = rand_f(120, 130); beta = rand_f(120, 130);
    for (int m = 0; m < M; m++) begin acc[m] = 0; y_in[m] = 0; end
    repeat (2) @(posedge clk); #1;
    rst_n = 1;
    for (int i = 0; i < 800; i++) begin
      in_valid = ($urandom_range(0, 3) != 0);
      in_tag = TW'(i * M);
      for (int m = 0; m < M; m++) begin acc[m] = rand_f(110, 140); y_in[m] = rand_f(110, 140); end
      if (i == 400) begin alpha = FP_ZERO; beta = rand_f(120, 130); end
      if (i == 600) begin alpha = rand_f(120, 130); beta = FP_ZERO; end
      @(posedge clk); #1;
    end
    in_valid = 0;
    repeat (LAT_MUL + LAT_ADD + 3) @(posedge clk);
    checks++;
    if (q.size() != 0 || busy) begin failures++; $display("FAIL %0d rows missing", q.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
