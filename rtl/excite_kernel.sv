// excite_kernel: the excitation kernel. Once per time step the host passes
// the source value for that step, and the kernel writes it into Ez at the
// centre of the grid, cell (n/2, n/2), replacing the value there (a hard
// source).
//
// One word write to vector (n/2)/LANES of row n/2 with only lane
// (n/2) mod LANES enabled; done pulses the cycle after the write is taken.
// Memory port and control as in efield_kernel, plus the source value `value`
// sampled with start. The source position follows the simulation model;
// replacing rather than adding to the field is this design's reading.
module excite_kernel
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
  input  logic               start,
  input  logic [NW-1:0]      n,
  input  float_t             value,
  output logic               busy,
  output logic               done,
  output logic               m_read,
  output logic               m_write,
  output logic [AW-1:0]      m_addr,
  output logic [DW-1:0]      m_wdata,
  output logic [LANES_P-1:0] m_be,
  input  logic               m_waitreq,
  input  logic               m_rvalid,
  input  logic [DW-1:0]      m_rdata
);

  localparam int unsigned LW = $clog2(LANES_P);

  logic          active;
  float_t        src;
  logic [JW-1:0] c;                 // n/2

  assign c       = JW'(n >> 1);
  assign m_read  = 1'b0;
  assign m_write = active;
  assign m_addr  = {ARR_EZ, c, c[JW-1:LW]};
  assign m_wdata = {LANES_P{src}};
  always_comb begin
    for (int l = 0; l < LANES_P; l++) m_be[l] = (c[LW-1:0] == LW'(l));
  end
  assign busy = active;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active <= 1'b0;
      src    <= FP_ZERO;
      done   <= 1'b0;
    end else begin
      done <= 1'b0;
      if (!active) begin
        if (start) begin
          active <= 1'b1;
          src    <= value;
        end
      end else if (!m_waitreq) begin
        active <= 1'b0;
        done   <= 1'b1;
      end
    end
  end

  a_hold: assert property (@(posedge clk) disable iff (!rst_n)
    m_write && m_waitreq |=> m_write && $stable(m_addr));

  logic unused;
  assign unused = ^{m_rvalid, m_rdata};

endmodule
