// tb_reduce_route: random beats, each in inter-row or intra-row mode, with
// random lane valids, random owner lane and random freezes (en low). For every
// beat the expected outputs are worked out in the testbench: inter-row beats
// come out unchanged on their own lanes, intra-row beats as one sum of the
// valid lanes on the owner lane. Values are small integers, exact in FP32, so
// the sum does not depend on the order of additions. The outputs must appear
// exactly log2(P)*LAT_ADD enabled cycles after the beat.
module tb_reduce_route;
  import hispmv_pkg::*;
  import tb_fp_pkg::*;

  localparam int P = 8, LAT_ADD = 4, D = 3 * LAT_ADD;
  logic clk = 0, rst_n = 0, en = 1, intra = 0;
  logic [2:0] owner = 0;
  logic [P-1:0] in_valid = 0, out_valid;
  logic [ROW_W-1:0] in_row [P], out_row [P];
  fp32_t in_val [P], out_val [P];
  logic busy;
  int checks = 0, failures = 0, n_intra = 0, n_inter = 0;

  reduce_route #(.P(P), .LAT_ADD(LAT_ADD)) dut (.*);

  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct {
    logic [P-1:0]     v;
    logic [ROW_W-1:0] r [P];
    fp32_t            x [P];
  } exp_t;
  exp_t hist [$];

  always @(posedge clk) if (rst_n && en) begin
    exp_t e;
    // expected output for the beat now entering
    e.v = '0;
    for (int l = 0; l < P; l++) begin
      e.r[l] = 'x; e.x[l] = 'x;
    end
    if (intra && |in_valid) begin
      int s; logic [ROW_W-1:0] rr; logic found;
      s = 0; found = 0; rr = 0;
      for (int l = 0; l < P; l++) if (in_valid[l]) begin
        s += int'(f2r(in_val[l]));
        if (!found) begin rr = in_row[l]; found = 1; end
      end
      e.v[owner] = 1'b1; e.r[owner] = rr; e.x[owner] = int_f(s);
    end else if (!intra) begin
      e.v = in_valid;
      for (int l = 0; l < P; l++) begin e.r[l] = in_row[l]; e.x[l] = in_val[l]; end
    end
    hist.push_back(e);
  end

  // compare the output with the beat that entered D enabled cycles ago
  always @(negedge clk) if (rst_n && hist.size() >= D) begin
    exp_t e;
    e = hist[hist.size() - D];
    if (hist.size() > D) void'(hist.pop_front());
    checks++;
    if (out_valid !== e.v) begin
      failures++;
      $display("FAIL valid %b expected %b", out_valid, e.v);
    end else begin
      for (int l = 0; l < P; l++) if (e.v[l]) begin
        if (out_row[l] !== e.r[l] || out_val[l] !== e.x[l]) begin
          failures++;
          $display("FAIL lane %0d row %0d val %h expected %0d %h", l, out_row[l], out_val[l], e.r[l], e.x[l]);
        end
      end
    end
  end

  initial begin
    for (int l = 0; l < P; l++) begin in_row[l] = 0; in_val[l] = 0; end
    repeat (2) @(posedge clk); #1;
    rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      intra    = ($urandom_range(0, 2) == 0);
      owner    = 3'($urandom);
      in_valid = P'($urandom);
      for (int l = 0; l < P; l++) begin
        in_row[l] = ROW_W'($urandom);
        in_val[l] = int_f(int'($urandom_range(0, 200)) - 100);
      end
      if (intra) n_intra++; else n_inter++;
      en = ($urandom_range(0, 9) != 0);
      @(posedge clk); #1;
    end
    en = 1; in_valid = 0; intra = 0;
    repeat (D + 3) @(posedge clk);
    checks++;
    if (n_intra == 0 || n_inter == 0 || busy) begin
      failures++;
      $display("FAIL mode coverage %0d/%0d or still busy", n_intra, n_inter);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
