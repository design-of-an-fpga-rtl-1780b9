// fdtd_pkg: constants and types shared by the FDTD accelerator.
//
// The accelerator keeps every field and coefficient array of the 2-D TMz
// grid in one global memory. Each array is stored row by row, LANES
// single-precision values per memory word, with a fixed row stride of
// N_MAX/LANES words so that any grid size n <= N_MAX (a multiple of LANES)
// uses the same layout. The word address of vector v of row j in array a is
//   {a, j, v}  (3 bits | log2(N_MAX) bits | log2(N_MAX/LANES) bits).
// LANES = 16 is the widest kernel vectorisation of the design (16 lanes of
// 32-bit floats = one 512-bit memory word); N_MAX = 512 is the largest grid
// evaluated. The array numbering and the address layout are this design's own.
package fdtd_pkg;

  localparam int unsigned LANES = 16;
  localparam int unsigned N_MAX = 512;

  // single-precision (IEEE 754 binary32) bit pattern
  typedef logic [31:0] float_t;

  localparam float_t FP_ZERO = 32'h0000_0000;
  localparam float_t FP_QNAN = 32'h7FC0_0000;

  // arrays held in global memory
  typedef enum logic [2:0] {
    ARR_EZ = 3'd0,
    ARR_HX = 3'd1,
    ARR_HY = 3'd2,
    ARR_PX = 3'd3,
    ARR_PY = 3'd4,
    ARR_QX = 3'd5,
    ARR_QY = 3'd6
  } arr_e;

  // kernels the host can launch
  typedef enum logic [1:0] {
    K_EFIELD   = 2'd0,
    K_HFIELD   = 2'd1,
    K_BOUNDARY = 2'd2,
    K_EXCITE   = 2'd3
  } kernel_e;

endpackage
