// tb_pe: feeds random COO elements (with gaps and freezes) to one PE whose x
// port is answered by a table in the testbench, and expects value * x[col]
// with the element's row, exactly 1 + LAT_MUL enabled cycles later.
module tb_pe;
  import hispmv_pkg::*;
  import tb_fp_pkg::*;

  localparam int LAT_MUL = 3, XDEPTH = 64;
  logic clk = 0, rst_n = 0, en = 1, in_valid = 0;
  coo_t in_elem = '0;
  logic x_req, out_valid, busy;
  logic [5:0] x_addr;
  fp32_t x_data, out_prod;
  logic [ROW_W-1:0] out_row;
  fp32_t xmem [XDEPTH];
  int checks = 0, failures = 0, ecyc = 0;

  pe #(.LAT_MUL(LAT_MUL), .XDEPTH(XDEPTH)) dut (.*);
  assign x_data = xmem[x_addr];

  always #5 clk = ~clk;
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct { int row; fp32_t p; int t; } exp_t;
  exp_t q [$];

  always @(posedge clk) if (rst_n && en) begin
    ecyc <= ecyc + 1;
    if (in_valid)
      q.push_back('{int'(in_elem.row), r2f(f2r(in_elem.val) * f2r(xmem[in_elem.col[5:0]])), ecyc});
  end

  always @(negedge clk) if (rst_n && en && out_valid) begin
    exp_t e;
    checks++;
    e = q.pop_front();
    if (int'(out_row) != e.row || out_prod !== e.p || ecyc - e.t != 1 + LAT_MUL) begin
      failures++;
      $display("FAIL row %0d prod %h expected row %0d prod %h latency %0d", out_row, out_prod, e.row, e.p, ecyc - e.t);
    end
  end

  initial begin
    for (int i = 0; i < XDEPTH; i++) xmem[i] = rand_f(110, 140);
    repeat (2) @(posedge clk); #1;
    rst_n = 1;
    for (int i = 0; i < 1000; i++) begin
      in_valid = ($urandom_range(0, 4) != 0);
      in_elem.row = ROW_W'($urandom);
      in_elem.col = COL_W'($urandom_range(0, XDEPTH - 1));
      in_elem.val = rand_f(110, 140);
      en = ($urandom_range(0, 6) != 0);
      @(posedge clk); #1;
    end
    in_valid = 0; en = 1;
    repeat (LAT_MUL + 3) @(posedge clk);
    checks++;
    if (q.size() != 0 || busy) begin failures++; $display("FAIL %0d products missing", q.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
