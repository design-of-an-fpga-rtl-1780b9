// fp_add: single-precision (IEEE 754 binary32) adder / subtractor.
//
// Computes y = a + b, or y = a - b when sub is set, in one combinational
// step; the processing elements put a register after it. The operands are
// aligned with three extra bits (guard, round, sticky), added or subtracted,
// normalised and rounded to nearest, ties to even. Subnormal inputs are read
// as zero and subnormal results are flushed to zero, as floating-point cores
// generated for FPGAs usually do; infinities and NaNs follow IEEE 754 (a NaN
// result is the quiet NaN 0x7FC00000). An exact zero difference is +0.
// Single precision follows the accelerator's specification; the rounding,
// flush-to-zero and the combinational form are this design's choices.
module fp_add
  import fdtd_pkg::*;
(
  input  float_t a,
  input  float_t b,
  input  logic   sub,
  output float_t y
);

  logic        sa, sb, sx, sy;
  logic [7:0]  ea, eb, ex, ey;
  logic [23:0] ma, mb, mx, my;
  logic        a_nan, b_nan, a_inf, b_inf;
  logic [7:0]  d;
  logic [26:0] mx_e, my_e, my_sh;
  logic        sticky;
  logic [27:0] sum;
  logic [4:0]  lz;
  logic        found;
  logic [26:0] norm;
  logic signed [9:0] e_n;
  logic        rnd_inc;
  logic [24:0] mant_r;
  logic signed [9:0] e_r;

  always_comb begin
    sa = a[31];
    sb = b[31] ^ sub;
    ea = a[30:23];
    eb = b[30:23];
    ma = (ea == 8'd0) ? 24'd0 : {1'b1, a[22:0]};
    mb = (eb == 8'd0) ? 24'd0 : {1'b1, b[22:0]};
    a_nan = (ea == 8'hFF) && (a[22:0] != 23'd0);
    b_nan = (eb == 8'hFF) && (b[22:0] != 23'd0);
    a_inf = (ea == 8'hFF) && (a[22:0] == 23'd0);
    b_inf = (eb == 8'hFF) && (b[22:0] == 23'd0);

    // order the operands by magnitude: x is the larger
    if ({ea, ma} >= {eb, mb}) begin
      sx = sa; ex = ea; mx = ma;
      sy = sb; ey = eb; my = mb;
    end else begin
      sx = sb; ex = eb; mx = mb;
      sy = sa; ey = ea; my = ma;
    end
    if (ey == 8'd0) ey = ex;         // a zero operand needs no alignment

    // align the smaller operand, keeping a sticky bit
    d      = ex - ey;
    mx_e   = {mx, 3'b000};
    my_e   = {my, 3'b000};
    if (d >= 8'd27) begin
      my_sh  = 27'd0;
      sticky = (my != 24'd0);
    end else begin
      my_sh  = my_e >> d;
      sticky = ((my_e & ((27'd1 << d) - 27'd1)) != 27'd0);
    end
    my_sh[0] = my_sh[0] | sticky;

    // add or subtract magnitudes
    if (sx == sy) sum = {1'b0, mx_e} + {1'b0, my_sh};
    else          sum = {1'b0, mx_e} - {1'b0, my_sh};

    // normalise
    lz    = 5'd0;
    found = 1'b0;
    for (int k = 26; k >= 0; k--) begin
      if (!found) begin
        if (sum[k]) found = 1'b1;
        else        lz    = lz + 5'd1;
      end
    end
    if (sum[27]) begin
      norm = sum[27:1] | {26'd0, sum[0]};
      e_n  = $signed({2'b00, ex}) + 10'sd1;
    end else begin
      norm = sum[26:0] << lz;
      e_n  = $signed({2'b00, ex}) - $signed({5'd0, lz});
    end

    // round to nearest, ties to even
    rnd_inc = norm[2] & (norm[1] | norm[0] | norm[3]);
    mant_r  = {1'b0, norm[26:3]} + {24'd0, rnd_inc};
    e_r     = e_n;
    if (mant_r[24]) begin
      mant_r = mant_r >> 1;
      e_r    = e_n + 10'sd1;
    end

    // pack, with the special cases
    if (a_nan || b_nan || (a_inf && b_inf && (sa != sb))) begin
      y = FP_QNAN;
    end else if (a_inf) begin
      y = {sa, 8'hFF, 23'd0};
    end else if (b_inf) begin
      y = {sb, 8'hFF, 23'd0};
    end else if (sum == 28'd0) begin
      y = (sa & sb) ? 32'h8000_0000 : FP_ZERO;
    end else if (e_r >= 10'sd255) begin
      y = {sx, 8'hFF, 23'd0};
    end else if (e_r <= 10'sd0) begin
      y = {sx, 31'd0};
    end else begin
      y = {sx, e_r[7:0], mant_r[22:0]};
    end
  end

endmodule
