// tb_hybrid_buffer: sequential mode (one write fills both banks, both ports
// read in the same cycle without stall), ping-pong mode (loading one bank
// while reading the other, reads see only the other bank's tile; two requests
// in one cycle cost exactly one stall cycle and both get the right words; a
// single request never stalls).
module tb_hybrid_buffer;
  import hispmv_pkg::*;

  localparam int DEPTH = 64;
  logic clk = 0, rst_n = 0;
  logic pingpong = 0, rd_bank = 0, wr_en = 0, en;
  logic [1:0] wr_sel = 0, rd_valid = 0;
  logic [5:0] wr_addr = 0;
  fp32_t wr_data = 0;
  logic [5:0] rd_addr [2];
  fp32_t rd_data [2];
  logic stall;
  int checks = 0, failures = 0, stalls = 0;

  hybrid_buffer #(.DEPTH(DEPTH)) dut (.*);
  assign en = !stall;

  always #5 clk = ~clk;
  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  always @(posedge clk) if (stall) stalls++;

  function automatic fp32_t word(input int tile, input int a);
    return 32'(tile * 1000 + a + 1);
  endfunction

  task automatic check(input fp32_t got, input fp32_t exp_v, input string what);
    checks++;
    if (got !== exp_v) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp_v);
    end
  endtask

  task automatic load(input int tile, input logic [1:0] sel);
    for (int a = 0; a < DEPTH; a++) begin
      wr_en = 1; wr_sel = sel; wr_addr = 6'(a); wr_data = word(tile, a);
      @(posedge clk); #1;
    end
    wr_en = 0;
  endtask

  // one read cycle: sample the data when the group may advance
  task automatic read2(input logic v0, input int a0, input logic v1, input int a1,
                       input int tile, input int exp_stalls);
    int s0;
    rd_valid = {v1, v0}; rd_addr[0] = 6'(a0); rd_addr[1] = 6'(a1);
    s0 = stalls;
    #1;
    while (!en) begin
      @(posedge clk); #1;
    end
    if (v0) check(rd_data[0], word(tile, a0), "port 0");
    if (v1) check(rd_data[1], word(tile, a1), "port 1");
    @(posedge clk); #1;
    checks++;
    if (stalls - s0 != exp_stalls) begin
      failures++;
      $display("FAIL stall cycles %0d expected %0d", stalls - s0, exp_stalls);
    end
    rd_valid = 0;
  endtask

  initial begin
    rd_addr[0] = 0; rd_addr[1] = 0;
    repeat (2) @(posedge clk); #1;
    rst_n = 1;
    // sequential mode
    pingpong = 0;
    load(1, 2'b11);
    for (int i = 0; i < 40; i++)
      read2(1, int'($urandom_range(0, DEPTH-1)), 1, int'($urandom_range(0, DEPTH-1)), 1, 0);
    // ping-pong: tile 2 to bank 0, then read bank 0 while tile 3 loads bank 1
    pingpong = 1;
    load(2, 2'b01);
    rd_bank = 0;
    fork
      load(3, 2'b10);
      for (int i = 0; i < 20; i++) begin
        case (i % 3)
          0: read2(1, int'($urandom_range(0, DEPTH-1)), 1, int'($urandom_range(0, DEPTH-1)), 2, 1);
          1: read2(1, int'($urandom_range(0, DEPTH-1)), 0, 0, 2, 0);
          default: read2(0, 0, 1, int'($urandom_range(0, DEPTH-1)), 2, 0);
        endcase
      end
    join
    rd_bank = 1;
    for (int i = 0; i < 20; i++)
      read2(1, int'($urandom_range(0, DEPTH-1)), 1, int'($urandom_range(0, DEPTH-1)), 3, 1);
    // sequential again: bank contents now differ, each port reads its own bank
    pingpong = 0;
    read2(1, 5, 0, 0, 2, 0);
    read2(0, 0, 1, 7, 3, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
