// efield_pe: one lane of the electric-field update, Eq. (1) of the FDTD
// scheme for a 2-D TMz grid:
//   Ez' = Ez - Py * (Hx(j) - Hx(j-1)) + Px * (Hy(i) - Hy(i-1))
// evaluated in that order, as the kernel source writes it, in binary32.
//
// Four register stages, fully pipelined (a new cell every cycle, no stall):
//   1: the two H differences   2: the two products (two multipliers, the
//   lane's DSP blocks)   3: Ez - Py*dHx   4: + Px*dHy.
// out_valid follows in_valid LATENCY = 4 cycles later. The valid bits are
// reset; the data registers are not. The stage split is this design's choice.
module efield_pe
  import fdtd_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   in_valid,
  input  float_t ez,
  input  float_t px,
  input  float_t py,
  input  float_t hx,        // Hx at (i, j+1/2)
  input  float_t hx_jm1,    // Hx at (i, j-1/2)
  input  float_t hy,        // Hy at (i+1/2, j)
  input  float_t hy_im1,    // Hy at (i-1/2, j)
  output logic   out_valid,
  output float_t ez_new
);

  localparam int unsigned LATENCY = 4;

  logic [LATENCY-1:0] v;
  float_t d1_c, d2_c, p1_c, p2_c, t_c, y_c;
  float_t s1_ez, s1_px, s1_py, s1_d1, s1_d2;
  float_t s2_ez, s2_p1, s2_p2;
  float_t s3_t, s3_p2;

  fp_add u_d1 (.a(hx), .b(hx_jm1), .sub(1'b1), .y(d1_c));
  fp_add u_d2 (.a(hy), .b(hy_im1), .sub(1'b1), .y(d2_c));
  fp_mul u_p1 (.a(s1_py), .b(s1_d1), .y(p1_c));
  fp_mul u_p2 (.a(s1_px), .b(s1_d2), .y(p2_c));
  fp_add u_t  (.a(s2_ez), .b(s2_p1), .sub(1'b1), .y(t_c));
  fp_add u_y  (.a(s3_t),  .b(s3_p2), .sub(1'b0), .y(y_c));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) v <= '0;
    else        v <= {v[LATENCY-2:0], in_valid};
  end

  always_ff @(posedge clk) begin
    s1_ez <= ez;    s1_px <= px;    s1_py <= py;
    s1_d1 <= d1_c;  s1_d2 <= d2_c;
    s2_ez <= s1_ez; s2_p1 <= p1_c;  s2_p2 <= p2_c;
    s3_t  <= t_c;   s3_p2 <= s2_p2;
    ez_new <= y_c;
  end

  assign out_valid = v[LATENCY-1];

endmodule
