// fdtd_accel: FDTD accelerator for a 2-D TMz electromagnetic grid (Ez, Hx,
// Hy on an n x n Yee grid) in single-precision floating point.
//
// The accelerator is a set of four kernels that the host launches one at a
// time, all working on arrays in the board's global memory:
//   efield_kernel    Ez update, Eq. (1)
//   boundary_kernel  perfect-conductor boundary, Ez = 0 on the outer ring
//   excite_kernel    hard source: Ez(n/2, n/2) = host-supplied value
//   hfield_kernel    Hx, Hy update, Eqs. (2), (3)
// The host counts the time steps and, for each one, launches efield,
// boundary, excite and hfield in turn; before the first step it writes the
// initial fields and the coefficient arrays Px, Py, Qx, Qy into global
// memory through the host data port, and after the last it reads Ez back.
// The kernels and the host data port reach global memory through one
// round-robin arbiter (gmem_arbiter).
//
// Interfaces:
//   launch_*   start kernel launch_kernel (for grid size cfg_n, and with
//              source value launch_value for the excitation kernel). Taken
//              when launch_valid and launch_ready are both high;
//              launch_ready is low while a kernel runs. kernel_done pulses
//              for one cycle when the running kernel has finished and all its
//              writes have been taken by global memory.
//   h_*        host data port (the PCIe DMA path), Avalon-MM style slave
//   g_*        global-memory master (to the DDR3 controller), Avalon-MM style
// Word address layout and sizes: see fdtd_pkg (16 lanes of binary32 per
// 512-bit word, grids up to 512 x 512, cfg_n a multiple of 16).
// The kernel set, the flow of a time step and the single-precision
// arithmetic follow the design's description; the launch handshake, the
// arbiter and the memory layout are this design's own.
module fdtd_accel
  import fdtd_pkg::*;
#(
  parameter int unsigned LANES_P = LANES,
  parameter int unsigned N_MAX_P = N_MAX,
  localparam int unsigned JW = $clog2(N_MAX_P),
  localparam int unsigned VW = $clog2(N_MAX_P / LANES_P),
  localparam int unsigned AW = 3 + JW + VW,
  localparam int unsigned NW = JW + 1,
  localparam int unsigned DW = 32 * LANES_P
)(
  input  logic               clk,
  input  logic               rst_n,
  // configuration and kernel launch
  input  logic [NW-1:0]      cfg_n,
  input  logic               launch_valid,
  input  kernel_e            launch_kernel,
  input  float_t             launch_value,
  output logic               launch_ready,
  output logic               kernel_done,
  // host data port
  input  logic               h_read,
  input  logic               h_write,
  input  logic [AW-1:0]      h_addr,
  input  logic [DW-1:0]      h_wdata,
  input  logic [LANES_P-1:0] h_be,
  output logic               h_waitreq,
  output logic               h_rvalid,
  output logic [DW-1:0]      h_rdata,
  // global memory
  output logic               g_read,
  output logic               g_write,
  output logic [AW-1:0]      g_addr,
  output logic [DW-1:0]      g_wdata,
  output logic [LANES_P-1:0] g_be,
  input  logic               g_waitreq,
  input  logic               g_rvalid,
  input  logic [DW-1:0]      g_rdata
);

  localparam int unsigned NM = 5;   // 4 kernels + host port

  logic [NM-1:0]              m_read, m_write, m_waitreq, m_rvalid;
  logic [NM-1:0][AW-1:0]      m_addr;
  logic [NM-1:0][DW-1:0]      m_wdata;
  logic [NM-1:0][LANES_P-1:0] m_be;
  logic [DW-1:0]              m_rdata;

  logic [3:0] start, kbusy, kdone;
  logic       running;

  // launch control
  assign launch_ready = !running;
  always_comb begin
    start = '0;
    if (launch_valid && launch_ready) start[launch_kernel] = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      running     <= 1'b0;
      kernel_done <= 1'b0;
    end else begin
      kernel_done <= |kdone;
      if (launch_valid && launch_ready) running <= 1'b1;
      else if (|kdone)                  running <= 1'b0;
    end
  end

  efield_kernel #(.LANES_P(LANES_P), .N_MAX_P(N_MAX_P)) u_efield (
    .clk(clk), .rst_n(rst_n), .start(start[K_EFIELD]), .n(cfg_n),
    .busy(kbusy[K_EFIELD]), .done(kdone[K_EFIELD]),
    .m_read(m_read[0]), .m_write(m_write[0]), .m_addr(m_addr[0]), .m_wdata(m_wdata[0]),
    .m_be(m_be[0]), .m_waitreq(m_waitreq[0]), .m_rvalid(m_rvalid[0]), .m_rdata(m_rdata));

  hfield_kernel #(.LANES_P(LANES_P), .N_MAX_P(N_MAX_P)) u_hfield (
    .clk(clk), .rst_n(rst_n), .start(start[K_HFIELD]), .n(cfg_n),
    .busy(kbusy[K_HFIELD]), .done(kdone[K_HFIELD]),
    .m_read(m_read[1]), .m_write(m_write[1]), .m_addr(m_addr[1]), .m_wdata(m_wdata[1]),
    .m_be(m_be[1]), .m_waitreq(m_waitreq[1]), .m_rvalid(m_rvalid[1]), .m_rdata(m_rdata));

  boundary_kernel #(.LANES_P(LANES_P), .N_MAX_P(N_MAX_P)) u_boundary (
    .clk(clk), .rst_n(rst_n), .start(start[K_BOUNDARY]), .n(cfg_n),
    .busy(kbusy[K_BOUNDARY]), .done(kdone[K_BOUNDARY]),
    .m_read(m_read[2]), .m_write(m_write[2]), .m_addr(m_addr[2]), .m_wdata(m_wdata[2]),
    .m_be(m_be[2]), .m_waitreq(m_waitreq[2]), .m_rvalid(m_rvalid[2]), .m_rdata(m_rdata));

  excite_kernel #(.LANES_P(LANES_P), .N_MAX_P(N_MAX_P)) u_excite (
    .clk(clk), .rst_n(rst_n), .start(start[K_EXCITE]), .n(cfg_n), .value(launch_value),
    .busy(kbusy[K_EXCITE]), .done(kdone[K_EXCITE]),
    .m_read(m_read[3]), .m_write(m_write[3]), .m_addr(m_addr[3]), .m_wdata(m_wdata[3]),
    .m_be(m_be[3]), .m_waitreq(m_waitreq[3]), .m_rvalid(m_rvalid[3]), .m_rdata(m_rdata));

  // host data port
  assign m_read[4]  = h_read;
  assign m_write[4] = h_write;
  assign m_addr[4]  = h_addr;
  assign m_wdata[4] = h_wdata;
  assign m_be[4]    = h_be;
  assign h_waitreq  = m_waitreq[4];
  assign h_rvalid   = m_rvalid[4];
  assign h_rdata    = m_rdata;

  gmem_arbiter #(.NM(NM), .AW(AW), .LANES_P(LANES_P)) u_arb (
    .clk(clk), .rst_n(rst_n),
    .m_read(m_read), .m_write(m_write), .m_addr(m_addr), .m_wdata(m_wdata), .m_be(m_be),
    .m_waitreq(m_waitreq), .m_rvalid(m_rvalid), .m_rdata(m_rdata),
    .s_read(g_read), .s_write(g_write), .s_addr(g_addr), .s_wdata(g_wdata), .s_be(g_be),
    .s_waitreq(g_waitreq), .s_rvalid(g_rvalid), .s_rdata(g_rdata));

  // one kernel at a time
  a_one_kernel: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(kbusy));

endmodule
