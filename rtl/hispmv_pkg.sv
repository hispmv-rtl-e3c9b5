// hispmv_pkg: types and arithmetic shared by the HiSpMV SpMV accelerator.
//
// The sparse matrix travels as 64-bit coordinate (COO) elements: a row field,
// a column field and an FP32 value. Here the row field is the row's address
// inside the y buffer of the PE that owns it (global row / number of PEs) and
// the column field is the column inside the current x tile; both are 16 bits.
// The split of the 64 bits into 16/16/32 is this design's choice.
//
// The two functions are combinational IEEE-754 single-precision operations with
// round-to-nearest-even. Subnormal inputs and results are flushed to zero,
// overflow gives infinity and an infinity or NaN input is passed on; the
// pipelined units fp_add and fp_mul wrap them in register stages.
package hispmv_pkg;

  typedef logic [31:0] fp32_t;

  localparam int ROW_W = 16;
  localparam int COL_W = 16;

  typedef struct packed {
    logic [ROW_W-1:0] row;
    logic [COL_W-1:0] col;
    fp32_t            val;
  } coo_t;

  localparam fp32_t FP_ZERO = 32'h0000_0000;

  // Event counters of one run, cleared at start.
  typedef struct packed {
    logic [31:0] cycles;        // cycles from start to done
    logic [31:0] stall_cycles;  // group-cycles in which a PE group was held
    logic [31:0] hazard_cycles; // group-cycles with a y-buffer read-after-write hazard
    logic [31:0] xconflicts;    // two reads for one x buffer port (ping-pong)
    logic [31:0] intra_beats;   // beats processed in intra-row mode
    logic [31:0] forwards;      // accumulations that used the forwarded sum
    logic [31:0] merges;        // products folded by a pre-accumulator
  } perf_t;

  // Single-precision product, round to nearest even.
  function automatic fp32_t fp_mul_f(input fp32_t a, input fp32_t b);
    logic        s;
    logic [7:0]  ea, eb;
    logic [47:0] p;
    logic [23:0] m;
    logic        g, st;
    int          e;
    s  = a[31] ^ b[31];
    ea = a[30:23];
    eb = b[30:23];
    if (ea == 8'hff) return {s, 8'hff, a[22:0]};
    if (eb == 8'hff) return {s, 8'hff, b[22:0]};
    if (ea == 8'h00 || eb == 8'h00) return {s, 31'b0};
    p = {24'b0, 1'b1, a[22:0]} * {24'b0, 1'b1, b[22:0]};
    e = int'(ea) + int'(eb) - 127;
    if (p[47]) begin
      m  = {1'b0, p[46:24]};
      g  = p[23];
      st = |p[22:0];
      e  = e + 1;
    end else begin
      m  = {1'b0, p[45:23]};
      g  = p[22];
      st = |p[21:0];
    end
    if (g && (st || m[0])) m = m + 24'd1;
    if (m[23]) begin
      m = 24'd0;
      e = e + 1;
    end
    if (e >= 255) return {s, 8'hff, 23'b0};
    if (e <= 0)   return {s, 31'b0};
    return {s, e[7:0], m[22:0]};
  endfunction

  // Single-precision sum, round to nearest even. Three extra bits (guard,
  // round, sticky) below the 24-bit significand.
  function automatic fp32_t fp_add_f(input fp32_t a, input fp32_t b);
    fp32_t       x, y;
    logic [26:0] mx, my, sh;
    logic [27:0] s;
    logic [22:0] f;
    logic        sticky, up;
    int          d, e, lz;
    if (a[30:23] == 8'hff) return a;
    if (b[30:23] == 8'hff) return b;
    if (a[30:23] == 8'h00) return (b[30:23] == 8'h00) ? FP_ZERO : b;
    if (b[30:23] == 8'h00) return a;
    if (a[30:0] >= b[30:0]) begin
      x = a; y = b;
    end else begin
      x = b; y = a;
    end
    mx = {1'b1, x[22:0], 3'b000};
    my = {1'b1, y[22:0], 3'b000};
    d  = int'(x[30:23]) - int'(y[30:23]);
    e  = int'(x[30:23]);
    if (d >= 27) begin
      sh = 27'd1;
    end else begin
      sh     = my >> d;
      sticky = |(my & ((27'd1 << d) - 27'd1));
      sh[0]  = sh[0] | sticky;
    end
    if (x[31] == y[31]) begin
      s = {1'b0, mx} + {1'b0, sh};
      if (s[27]) begin
        s = {1'b0, s[27:2], s[1] | s[0]};
        e = e + 1;
      end
    end else begin
      s = {1'b0, mx} - {1'b0, sh};
      if (s == 28'd0) return FP_ZERO;
      lz = 0;
      for (int i = 26; i >= 0; i--) begin
        if (s[i]) break;
        lz++;
      end
      s = s << lz;
      e = e - lz;
    end
    // s[26] is the hidden bit, s[25:3] the fraction, s[2:0] guard/round/sticky
    f  = s[25:3];
    up = s[2] && (s[1] || s[0] || s[3]);
    if (up) begin
      if (f == 23'h7f_ffff) begin
        f = 23'd0;
        e = e + 1;
      end else begin
        f = f + 23'd1;
      end
    end
    if (e >= 255) return {x[31], 8'hff, 23'b0};
    if (e <= 0)   return {x[31], 31'b0};
    return {x[31], e[7:0], f};
  endfunction

endpackage
