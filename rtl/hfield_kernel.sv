// hfield_kernel: the magnetic-field kernel. For every cell (i, j) of an
// n x n grid it applies Eqs. (2) and (3),
//   Hx(i,j) = Hx(i,j) - Qy(i,j)*(Ez(i,j+1) - Ez(i,j))   for j <= n-2
//   Hy(i,j) = Hy(i,j) - Qx(i,j)*(Ez(i+1,j) - Ez(i,j))   for i <= n-2
// reading and writing the arrays in global memory. Hx of the last row and
// Hy of the last column have no neighbour to difference with and keep their
// value.
//
// The kernel is vectorised like efield_kernel: LANES neighbouring cells of a
// row at once, LANES copies of hfield_pe. For each vector it issues seven
// pipelined word reads (Hx, Hy, Qx, Qy, Ez, Ez of the next row, and the Ez
// vector to the right, whose lane 0 gives Ez(i+1) for the last lane), waits
// for the in-order replies, runs the lanes (3 cycles) and writes the Hx word
// (skipped on the last row) and the Hy word (last column masked). Rows
// j = 0 .. n-1, vectors v = 0 .. n/LANES-1, one vector at a time.
//
// Memory port and control as in efield_kernel (Avalon-MM style, in-order
// read data, per-lane write enables; start / busy / done). Which edge cells
// the kernel leaves alone, the visiting order and the schedule are this
// design's choices.
module hfield_kernel
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

  typedef enum logic [2:0] {S_IDLE, S_READ, S_WAIT, S_CALC, S_WR_HX, S_WR_HY} state_e;
  state_e state;

  logic [JW-1:0]      j, j_last;
  logic [VW-1:0]      v, v_last;
  logic [2:0]         rd_issued, rd_back;
  logic [DW-1:0]      op [NRD];
  logic [LANES_P-1:0] pe_valid;
  logic               pe_go;
  logic [DW-1:0]      hx_res, hy_res, hx_new, hy_new;

  function automatic logic [AW-1:0] addr_of(arr_e a, logic [JW-1:0] row, logic [VW-1:0] vec);
    return {a, row, vec};
  endfunction

  always_comb begin
    v_last = VW'(n[NW-1:LW] - 1'b1);
    j_last = JW'(n - 1'b1);
  end

  always_comb begin
    unique case (state)
      S_WR_HX: m_addr = addr_of(ARR_HX, j, v);
      S_WR_HY: m_addr = addr_of(ARR_HY, j, v);
      default: begin
        unique case (rd_issued)
          3'd0:    m_addr = addr_of(ARR_HX, j, v);
          3'd1:    m_addr = addr_of(ARR_HY, j, v);
          3'd2:    m_addr = addr_of(ARR_QX, j, v);
          3'd3:    m_addr = addr_of(ARR_QY, j, v);
          3'd4:    m_addr = addr_of(ARR_EZ, j, v);
          3'd5:    m_addr = addr_of(ARR_EZ, (j == j_last) ? j : j + JW'(1), v);
          default: m_addr = addr_of(ARR_EZ, j, (v == v_last) ? v : v + VW'(1));
        endcase
      end
    endcase
  end

  assign m_read  = (state == S_READ);
  assign m_write = (state == S_WR_HX) || (state == S_WR_HY);
  assign m_wdata = (state == S_WR_HX) ? hx_res : hy_res;
  always_comb begin
    for (int l = 0; l < LANES_P; l++)
      m_be[l] = (state == S_WR_HX) || ({v, LW'(l)} != {j_last});   // Hy: i <= n-2
  end
  assign busy  = (state != S_IDLE);
  assign pe_go = (state == S_WAIT) && (rd_back == 3'(NRD));

  for (genvar l = 0; l < LANES_P; l++) begin : g_lane
    logic [31:0] ez_right;
    if (l == LANES_P - 1) begin : g_edge
      assign ez_right = op[6][31:0];
    end else begin : g_inner
      assign ez_right = op[4][32*(l+1) +: 32];
    end
    hfield_pe u_pe (
      .clk      (clk),
      .rst_n    (rst_n),
      .in_valid (pe_go),
      .hx       (op[0][32*l +: 32]),
      .hy       (op[1][32*l +: 32]),
      .qx       (op[2][32*l +: 32]),
      .qy       (op[3][32*l +: 32]),
      .ez       (op[4][32*l +: 32]),
      .ez_jp1   (op[5][32*l +: 32]),
      .ez_ip1   (ez_right),
      .out_valid(pe_valid[l]),
      .hx_new   (hx_new[32*l +: 32]),
      .hy_new   (hy_new[32*l +: 32])
    );
  end

  always_ff @(posedge clk) begin
    if (m_rvalid) op[rd_back] <= m_rdata;
    if (&pe_valid) begin
      hx_res <= hx_new;
      hy_res <= hy_new;
    end
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
          j         <= '0;
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
        S_CALC: if (&pe_valid) state <= (j == j_last) ? S_WR_HY : S_WR_HX;
        S_WR_HX: if (!m_waitreq) state <= S_WR_HY;
        S_WR_HY: if (!m_waitreq) begin
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

  a_hold: assert property (@(posedge clk) disable iff (!rst_n)
    (m_read || m_write) && m_waitreq |=> (m_read || m_write) && $stable(m_addr));
  a_noreply: assert property (@(posedge clk) disable iff (!rst_n)
    m_rvalid |-> (state == S_READ || state == S_WAIT));

endmodule
