// gmem_model: behavioural model of the board's global memory (DDR3 SDRAM
// behind its controller) as seen from the accelerator: one Avalon-MM style
// slave port of LANES 32-bit lanes per word. Reads are served in order
// LAT cycles after they are taken; data are sampled when the read is taken.
// Writes update the lanes whose m_be bit is set. waitrequest is raised at
// random in STALL_PCT percent of cycles to exercise back-pressure. The
// storage array `mem` is reached hierarchically by testbenches to load and
// inspect the grids. Not synthesizable.
module gmem_model #(
  parameter int unsigned AW        = 17,
  parameter int unsigned LANES     = 16,
  parameter int unsigned LAT       = 8,
  parameter int unsigned STALL_PCT = 20
)(
  input  logic                clk,
  input  logic                m_read,
  input  logic                m_write,
  input  logic [AW-1:0]       m_addr,
  input  logic [32*LANES-1:0] m_wdata,
  input  logic [LANES-1:0]    m_be,
  output logic                m_waitreq,
  output logic                m_rvalid,
  output logic [32*LANES-1:0] m_rdata
);

  logic [32*LANES-1:0] mem [2**AW];
  logic [32*LANES-1:0] data_q[$];
  longint              due_q[$];
  longint              cyc = 0;
  int unsigned         reads = 0, writes = 0, stalls = 0;

  initial begin
    m_waitreq = 1'b0;
    m_rvalid  = 1'b0;
    m_rdata   = '0;
  end

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if ((m_read || m_write) && !m_waitreq) begin
      if (m_read) begin
        data_q.push_back(mem[m_addr]);
        due_q.push_back(cyc + LAT);
        reads++;
      end else begin
        for (int l = 0; l < LANES; l++)
          if (m_be[l]) mem[m_addr][32*l +: 32] <= m_wdata[32*l +: 32];
        writes++;
      end
    end else if ((m_read || m_write) && m_waitreq) begin
      stalls++;
    end
    if (due_q.size() != 0 && due_q[0] <= cyc) begin
      m_rvalid <= 1'b1;
      m_rdata  <= data_q.pop_front();
      void'(due_q.pop_front());
    end else begin
      m_rvalid <= 1'b0;
    end
    m_waitreq <= ($urandom_range(99, 0) < STALL_PCT);
  end

endmodule
