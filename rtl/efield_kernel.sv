// efield_kernel: the electric-field kernel. For every cell (i, j) of an
// n x n grid with i >= 1 and j >= 1 it applies Eq. (1),
//   Ez(i,j) = Ez(i,j) - Py(i,j)*(Hx(i,j) - Hx(i,j-1)) + Px(i,j)*(Hy(i,j) - Hy(i-1,j)),
// reading and writing the arrays in global memory. Cells on row 0 and
// column 0 keep their value, as in the kernel's guard (i>=1)&&(j>=1).
//
// The kernel is vectorised: it works on LANES neighbouring cells of a row at
// once, with LANES copies of the lane datapath (efield_pe). For each vector
// it issues seven pipelined word reads (Ez, Px, Py, Hx, Hx of the row above,
// Hy, and the Hy vector to the left, whose last lane gives Hy(i-1) for
// lane 0), waits for the seven in-order replies, runs the lanes (4 cycles)
// and writes the Ez word back with a lane mask. Vectors are visited row by
// row, j = 1 .. n-1, v = 0 .. n/LANES-1, one at a time, so the kernel is
// bound by global-memory latency, like the original design it follows.
//
// Memory port: Avalon-MM style. A read or write is taken in a cycle where
// it is asserted and m_waitreq is low; read data return in request order
// with m_rvalid. m_be has one enable per 32-bit lane. Control: a start
// pulse launches the kernel for grid size n (a multiple of LANES, at most
// N_MAX, at least 2); done pulses for one cycle at the end; busy is high in
// between. Vectorisation and the memory layout (see fdtd_pkg) follow the
// design's description; the visiting order and one-vector-at-a-time
// schedule are this design's choices.
module efield_kernel
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

  localparam int unsigned NRD = 7;
  localparam int unsigned LW  = $clog2(LANES_P);

  typedef enum logic [2:0] {S_IDLE, S_READ, S_WAIT, S_CALC, S_WRITE} state_e;
  state_e state;

  logic [JW-1:0]    j;
  logic [VW-1:0]    v, v_last;
  logic [JW-1:0]    j_last;
  logic [2:0]       rd_issued, rd_back;
  logic [DW-1:0]    op [NRD];
  logic [LANES_P-1:0] pe_valid;
  logic             pe_go;
  logic [DW-1:0]    result;
  logic [DW-1:0]    ez_new;

  function automatic logic [AW-1:0] addr_of(arr_e a, logic [JW-1:0] row, logic [VW-1:0] vec);
    return {a, row, vec};
  endfunction

  always_comb begin
    v_last = VW'(n[NW-1:LW] - 1'b1);
    j_last = JW'(n - 1);
  end

  // read address of operand k for the current vector
  always_comb begin
    unique case (rd_issued)
      3'd0:    m_addr = addr_of(ARR_EZ, j, v);
      3'd1:    m_addr = addr_of(ARR_PX, j, v);
      3'd2:    m_addr = addr_of(ARR_PY, j, v);
      3'd3:    m_addr = addr_of(ARR_HX, j, v);
      3'd4:    m_addr = addr_of(ARR_HX, j - JW'(1), v);
      3'd5:    m_addr = addr_of(ARR_HY, j, v);
      default: m_addr = addr_of(ARR_HY, j, (v == '0) ? v : v - VW'(1));
    endcase
    if (state == S_WRITE) m_addr = addr_of(ARR_EZ, j, v);
  end

  assign m_read  = (state == S_READ);
  assign m_write = (state == S_WRITE);
  assign m_wdata = result;
  always_comb begin
    for (int l = 0; l < LANES_P; l++) m_be[l] = ({v, LW'(l)} != '0);   // i >= 1
  end
  assign busy  = (state != S_IDLE);
  assign pe_go = (state == S_WAIT) && (rd_back == 3'(NRD));

  // lanes
  for (genvar l = 0; l < LANES_P; l++) begin : g_lane
    logic [31:0] hy_left;
    if (l == 0) begin : g_edge
      assign hy_left = op[6][32*LANES_P-1 -: 32];
    end else begin : g_inner
      assign hy_left = op[5][32*(l-1) +: 32];
    end
    efield_pe u_pe (
      .clk      (clk),
      .rst_n    (rst_n),
      .in_valid (pe_go),
      .ez       (op[0][32*l +: 32]),
      .px       (op[1][32*l +: 32]),
      .py       (op[2][32*l +: 32]),
      .hx       (op[3][32*l +: 32]),
      .hx_jm1   (op[4][32*l +: 32]),
      .hy       (op[5][32*l +: 32]),
      .hy_im1   (hy_left),
      .out_valid(pe_valid[l]),
      .ez_new   (ez_new[32*l +: 32])
    );
  end

  always_ff @(posedge clk) begin
    if (m_rvalid) op[rd_back] <= m_rdata;
    if (&pe_valid) result <= ez_new;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      j         <= '0;
      v         <= '0;
      rd_issued <= '0;
      rd_back   <= '0;
      done      <= 1'b0;
    end else begin
      done <= 1'b0;
      if (m_rvalid) rd_back <= rd_back + 3'd1;
      unique case (state)
        S_IDLE: if (start) begin
          j         <= JW'(1);
          v         <= '0;
          rd_issued <= '0;
          rd_back   <= '0;
          state     <= S_READ;
        end
        S_READ: if (!m_waitreq) begin
          rd_issued <= rd_issued + 3'd1;
          if (rd_issued == 3'(NRD - 1)) state <= S_WAIT;
        end
        S_WAIT: if (pe_go) state <= S_CALC;
        S_CALC: if (&pe_valid) state <= S_WRITE;
        S_WRITE: if (!m_waitreq) begin
          rd_issued <= '0;
          rd_back   <= '0;
          if (v == v_last) begin
            v <= '0;
            j <= j + JW'(1);
            if (j == j_last) begin
              state <= S_IDLE;
              done  <= 1'b1;
            end else begin
              state <= S_READ;
            end
          end else begin
            v     <= v + VW'(1);
            state <= S_READ;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // Avalon rule: a request is held unchanged while waitrequest is high
  a_hold: assert property (@(posedge clk) disable iff (!rst_n)
    (m_read || m_write) && m_waitreq |=> (m_read || m_write) && $stable(m_addr));
  a_noreply: assert property (@(posedge clk) disable iff (!rst_n)
    m_rvalid |-> (state == S_READ || state == S_WAIT));

endmodule
