// fp_mul: single-precision (IEEE 754 binary32) multiplier.
//
// Computes y = a * b in one combinational step; the processing elements put
// a register after it. The 24x24-bit significand product (one DSP-block
// multiplication in an FPGA) is normalised by at most one place and rounded
// to nearest, ties to even. Subnormal inputs are read as zero and subnormal
// results are flushed to signed zero; infinities and NaNs follow IEEE 754
// (0 * inf gives the quiet NaN 0x7FC00000). Single precision follows the
// accelerator's specification; rounding, flush-to-zero and the
// combinational form are this design's choices.
module fp_mul
  import fdtd_pkg::*;
(
  input  float_t a,
  input  float_t b,
  output float_t y
);

  logic        s;
  logic [7:0]  ea, eb;
  logic [23:0] ma, mb;
  logic        a_nan, b_nan, a_inf, b_inf, a_zero, b_zero;
  logic [47:0] p;
  logic [24:0] m;        // 24 result bits + guard
  logic        sticky;
  logic        rnd_inc;
  logic [24:0] mant_r;
  logic signed [10:0] e;

  always_comb begin
    s      = a[31] ^ b[31];
    ea     = a[30:23];
    eb     = b[30:23];
    a_zero = (ea == 8'd0);
    b_zero = (eb == 8'd0);
    ma     = a_zero ? 24'd0 : {1'b1, a[22:0]};
    mb     = b_zero ? 24'd0 : {1'b1, b[22:0]};
    a_nan  = (ea == 8'hFF) && (a[22:0] != 23'd0);
    b_nan  = (eb == 8'hFF) && (b[22:0] != 23'd0);
    a_inf  = (ea == 8'hFF) && (a[22:0] == 23'd0);
    b_inf  = (eb == 8'hFF) && (b[22:0] == 23'd0);

    p = ma * mb;                      // in [2^46, 2^48) for normal inputs
    if (p[47]) begin
      m      = p[47:23];
      sticky = (p[22:0] != 23'd0);
      e      = $signed({3'b000, ea}) + $signed({3'b000, eb}) - 11'sd126;
    end else begin
      m      = p[46:22];
      sticky = (p[21:0] != 22'd0);
      e      = $signed({3'b000, ea}) + $signed({3'b000, eb}) - 11'sd127;
    end

    rnd_inc = m[0] & (sticky | m[1]);
    mant_r  = {1'b0, m[24:1]} + {24'd0, rnd_inc};
    if (mant_r[24]) begin
      mant_r = mant_r >> 1;
      e      = e + 11'sd1;
    end

    if (a_nan || b_nan || (a_inf && b_zero) || (b_inf && a_zero)) begin
      y = FP_QNAN;
    end else if (a_inf || b_inf) begin
      y = {s, 8'hFF, 23'd0};
    end else if (a_zero || b_zero) begin
      y = {s, 31'd0};
    end else if (e >= 11'sd255) begin
      y = {s, 8'hFF, 23'd0};
    end else if (e <= 11'sd0) begin
      y = {s, 31'd0};
    end else begin
      y = {s, e[7:0], mant_r[22:0]};
    end
  end

endmodule
