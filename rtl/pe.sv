// pe: processing element front end: one sparse element times its x value.
//
// Each enabled cycle the PE takes one COO element (row, column, value) from its
// lane of the matrix channel into an input register. From that register it
// asks the hybrid x buffer for x[column]; the buffer answers in the same cycle
// and the value and x[column] enter a pipelined FP32 multiplier. The product
// leaves LAT_MUL enabled cycles later with the element's row field as tag, so
// the PE's latency is 1 + LAT_MUL cycles. Everything holds while en is low,
// which is how a stall anywhere in the PE group freezes this front end. The
// register-then-read arrangement is this design's choice.
module pe
  import hispmv_pkg::*;
#(
  parameter int LAT_MUL = 3,
  parameter int XDEPTH  = 4096
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      en,
  input  logic                      in_valid,
  input  coo_t                      in_elem,
  // x buffer port
  output logic                      x_req,
  output logic [$clog2(XDEPTH)-1:0] x_addr,
  input  fp32_t                     x_data,
  // product
  output logic                      out_valid,
  output logic [ROW_W-1:0]          out_row,
  output fp32_t                     out_prod,
  output logic                      busy
);
  logic v_q;
  coo_t e_q;
  logic mul_busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v_q <= 1'b0;
      e_q <= '0;
    end else if (en) begin
      v_q <= in_valid;
      e_q <= in_elem;
    end
  end

  assign x_req  = v_q;
  assign x_addr = e_q.col[$clog2(XDEPTH)-1:0];

  fp_mul #(.LAT(LAT_MUL), .TW(ROW_W)) u_mul (
    .clk, .rst_n, .en,
    .in_valid (v_q),
    .a        (e_q.val),
    .b        (x_data),
    .in_tag   (e_q.row),
    .out_valid(out_valid),
    .prod     (out_prod),
    .out_tag  (out_row),
    .busy     (mul_busy)
  );

  assign busy = v_q | mul_busy;
endmodule
