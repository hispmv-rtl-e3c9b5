// fp_mul: pipelined single-precision multiplier with a side tag.
//
// The product of a and b (round to nearest even, subnormals flushed to zero) is
// computed in the first stage and carried through LAT register stages, so a
// new pair can enter every cycle and its result appears LAT enabled cycles
// later. The multiplier has no feedback path, so its latency only adds to the
// pipeline depth of a PE. A tag of TW bits and a valid bit travel with each
// operation. The pipeline advances only while en is high; busy is high while any
// valid operation is inside. The latency value is this design's assumption.
module fp_mul
  import hispmv_pkg::*;
#(
  parameter int LAT = 3,
  parameter int TW  = 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          en,
  input  logic          in_valid,
  input  fp32_t         a,
  input  fp32_t         b,
  input  logic [TW-1:0] in_tag,
  output logic          out_valid,
  output fp32_t         prod,
  output logic [TW-1:0] out_tag,
  output logic          busy
);
  fp32_t         r_q [LAT];
  logic [TW-1:0] t_q [LAT];
  logic [LAT-1:0] v_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v_q <= '0;
      for (int i = 0; i < LAT; i++) begin
        r_q[i] <= FP_ZERO;
        t_q[i] <= '0;
      end
    end else if (en) begin
      v_q[0] <= in_valid;
      r_q[0] <= fp_mul_f(a, b);
      t_q[0] <= in_tag;
      for (int i = 1; i < LAT; i++) begin
        v_q[i] <= v_q[i-1];
        r_q[i] <= r_q[i-1];
        t_q[i] <= t_q[i-1];
      end
    end
  end

  assign out_valid = v_q[LAT-1];
  assign prod      = r_q[LAT-1];
  assign out_tag   = t_q[LAT-1];
  assign busy      = |v_q;
endmodule
