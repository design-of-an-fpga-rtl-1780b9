// hfield_pe: one lane of the magnetic-field update, Eqs. (2) and (3) of the
// FDTD scheme for a 2-D TMz grid, in binary32:
//   Hx' = Hx - Qy * (Ez(i, j+1) - Ez(i, j))
//   Hy' = Hy - Qx * (Ez(i+1, j) - Ez(i, j))
// Both signs are as the update equations give them; the physical sign of
// the Hy term is carried by the coefficient Qx that the host supplies.
//
// Three register stages, fully pipelined: 1: the two Ez differences,
// 2: the two products (two multipliers), 3: the two subtractions.
// out_valid follows in_valid LATENCY = 3 cycles later. The valid bits are
// reset; the data registers are not. The stage split is this design's choice.
module hfield_pe
  import fdtd_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   in_valid,
  input  float_t hx,        // Hx at (i, j+1/2)
  input  float_t hy,        // Hy at (i+1/2, j)
  input  float_t qx,
  input  float_t qy,
  input  float_t ez,        // Ez at (i, j)
  input  float_t ez_jp1,    // Ez at (i, j+1)
  input  float_t ez_ip1,    // Ez at (i+1, j)
  output logic   out_valid,
  output float_t hx_new,
  output float_t hy_new
);

  localparam int unsigned LATENCY = 3;

  logic [LATENCY-1:0] v;
  float_t dx_c, dy_c, px_c, py_c, hx_c, hy_c;
  float_t s1_hx, s1_hy, s1_qx, s1_qy, s1_dx, s1_dy;
  float_t s2_hx, s2_hy, s2_px, s2_py;

  fp_add u_dx (.a(ez_jp1), .b(ez), .sub(1'b1), .y(dx_c));
  fp_add u_dy (.a(ez_ip1), .b(ez), .sub(1'b1), .y(dy_c));
  fp_mul u_px (.a(s1_qy), .b(s1_dx), .y(px_c));
  fp_mul u_py (.a(s1_qx), .b(s1_dy), .y(py_c));
  fp_add u_hx (.a(s2_hx), .b(s2_px), .sub(1'b1), .y(hx_c));
  fp_add u_hy (.a(s2_hy), .b(s2_py), .sub(1'b1), .y(hy_c));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) v <= '0;
    else        v <= {v[LATENCY-2:0], in_valid};
  end

  always_ff @(posedge clk) begin
    s1_hx <= hx;    s1_hy <= hy;    s1_qx <= qx;   s1_qy <= qy;
    s1_dx <= dx_c;  s1_dy <= dy_c;
    s2_hx <= s1_hx; s2_hy <= s1_hy; s2_px <= px_c; s2_py <= py_c;
    hx_new <= hx_c;
    hy_new <= hy_c;
  end

  assign out_valid = v[LATENCY-1];

endmodule
