// y_update: the final scaling step y_out = alpha * acc + beta * y_in for M rows
// per cycle, where acc is the accumulated A*x of a row (read from the owning
// PE's y buffer) and y_in is the old y value from the y channels.
//
// Per lane two pipelined FP32 multipliers (alpha*acc and beta*y_in) feed one
// pipelined FP32 adder; a set of M rows can enter every cycle and leaves
// LAT_MUL + LAT_ADD cycles later together with its first-row index (tag). The
// unit never stalls. The formula is the SpMV definition of the published design; the
// placement of the scaling after accumulation is this design's choice.
module y_update
  import hispmv_pkg::*;
#(
  parameter int M       = 2,
  parameter int LAT_MUL = 3,
  parameter int LAT_ADD = 4,
  parameter int TW      = 24
) (
  input  logic          clk,
  input  logic          rst_n,
  input  fp32_t         alpha,
  input  fp32_t         beta,
  input  logic          in_valid,
  input  logic [TW-1:0] in_tag,
  input  fp32_t         acc  [M],
  input  fp32_t         y_in [M],
  output logic          out_valid,
  output logic [TW-1:0] out_tag,
  output fp32_t         y_out [M],
  output logic          busy
);
  fp32_t         pa [M];
  fp32_t         pb [M];
  logic [M-1:0]  mv, nv, av, mb, nb, ab;
  logic [TW-1:0] mt [M];
  logic [TW-1:0] at [M];
  logic [TW-1:0] nt_unused [M];

  for (genvar m = 0; m < M; m++) begin : g_lane
    fp_mul #(.LAT(LAT_MUL), .TW(TW)) u_ma (
      .clk, .rst_n, .en(1'b1), .in_valid(in_valid), .a(alpha), .b(acc[m]),
      .in_tag(in_tag), .out_valid(mv[m]), .prod(pa[m]), .out_tag(mt[m]), .busy(mb[m])
    );
    fp_mul #(.LAT(LAT_MUL), .TW(TW)) u_mb (
      .clk, .rst_n, .en(1'b1), .in_valid(in_valid), .a(beta), .b(y_in[m]),
      .in_tag(in_tag), .out_valid(nv[m]), .prod(pb[m]), .out_tag(nt_unused[m]), .busy(nb[m])
    );
    fp_add #(.LAT(LAT_ADD), .TW(TW)) u_add (
      .clk, .rst_n, .en(1'b1), .in_valid(mv[m]), .a(pa[m]), .b(pb[m]),
      .in_tag(mt[m]), .out_valid(av[m]), .sum(y_out[m]), .out_tag(at[m]), .busy(ab[m])
    );
  end

  assign out_valid = av[0];
  assign out_tag   = at[0];
  assign busy      = |{mb, nb, ab};
endmodule
