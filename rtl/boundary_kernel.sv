// boundary_kernel: applies the perfect-conductor boundary condition of the
// simulation model, Ez = 0 on the outer ring of the n x n grid (row 0,
// row n-1, column 0 and column n-1).
//
// It only writes: a zero word with all lane enables set for every vector of
// the first and last row, and for each row in between one word to vector 0
// with only lane 0 enabled and one to the last vector with only lane
// LANES-1 enabled (a single word with both lanes when a row is one vector
// wide). One write is offered per cycle, so the kernel takes
// 2*n/LANES + 2*(n-2) cycles (fewer vectors when n = LANES) plus stalls.
//
// Memory port and control as in efield_kernel; m_read is never raised and
// read data are ignored. The write pattern is this design's choice.
module boundary_kernel
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
  logic [JW-1:0] j, j_last;
  logic [VW-1:0] v, v_last;
  logic          full_row;

  always_comb begin
    v_last   = VW'(n[NW-1:LW] - 1'b1);
    j_last   = JW'(n - 1'b1);
    full_row = (j == '0) || (j == j_last);
  end

  assign m_read  = 1'b0;
  assign m_write = active;
  assign m_addr  = {ARR_EZ, j, v};
  assign m_wdata = '0;
  always_comb begin
    for (int l = 0; l < LANES_P; l++)
      m_be[l] = full_row || (v == '0 && l == 0) || (v == v_last && l == LANES_P - 1);
  end
  assign busy = active;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active <= 1'b0;
      j      <= '0;
      v      <= '0;
      done   <= 1'b0;
    end else begin
      done <= 1'b0;
      if (!active) begin
        if (start) begin
          active <= 1'b1;
          j      <= '0;
          v      <= '0;
        end
      end else if (!m_waitreq) begin
        if (v == v_last) begin
          v <= '0;
          j <= j + JW'(1);
          if (j == j_last) begin
            active <= 1'b0;
            done   <= 1'b1;
          end
        end else if (full_row) begin
          v <= v + VW'(1);
        end else begin
          v <= v_last;               // interior row: skip to the last vector
        end
      end
    end
  end

  a_hold: assert property (@(posedge clk) disable iff (!rst_n)
    m_write && m_waitreq |=> m_write && $stable(m_addr));

  // read data are not used by this kernel
  logic unused;
  assign unused = ^{m_rvalid, m_rdata};

endmodule
