// gmem_arbiter: the global-memory interconnect. NM masters (the four
// kernels and the host's data-transfer port) share the single port to the
// board's global memory.
//
// Arbitration is round-robin: each cycle the first requesting master at or
// after the pointer is connected to the memory, and the pointer moves past
// it once its request is taken. A read is taken only if the response
// tracker has room; the tracker is a FIFO of master numbers, one per read
// in flight, that steers each in-order read reply (s_rvalid) to the master
// that asked for it. Read data are broadcast to all masters; only the owner
// sees m_rvalid. Masters that are not granted see m_waitreq high.
// All ports are Avalon-MM style (request held while waitrequest is high,
// in-order read replies). The arbiter adds no cycle of latency: requests and
// replies pass combinationally. Round-robin and the tracker depth are this
// design's choices.
module gmem_arbiter
  import fdtd_pkg::*;
#(
  parameter int unsigned NM      = 5,
  parameter int unsigned AW      = 17,
  parameter int unsigned LANES_P = LANES,
  parameter int unsigned MAX_OUT = 32,
  localparam int unsigned DW = 32 * LANES_P,
  localparam int unsigned IW = (NM > 1) ? $clog2(NM) : 1,
  localparam int unsigned PW = $clog2(MAX_OUT)
)(
  input  logic                          clk,
  input  logic                          rst_n,
  // masters
  input  logic [NM-1:0]                 m_read,
  input  logic [NM-1:0]                 m_write,
  input  logic [NM-1:0][AW-1:0]         m_addr,
  input  logic [NM-1:0][DW-1:0]         m_wdata,
  input  logic [NM-1:0][LANES_P-1:0]    m_be,
  output logic [NM-1:0]                 m_waitreq,
  output logic [NM-1:0]                 m_rvalid,
  output logic [DW-1:0]                 m_rdata,
  // global memory
  output logic                          s_read,
  output logic                          s_write,
  output logic [AW-1:0]                 s_addr,
  output logic [DW-1:0]                 s_wdata,
  output logic [LANES_P-1:0]            s_be,
  input  logic                          s_waitreq,
  input  logic                          s_rvalid,
  input  logic [DW-1:0]                 s_rdata
);

  logic [IW-1:0] ptr, grant;
  logic          any;
  logic [IW-1:0] id_q [MAX_OUT];
  logic [PW:0]   count;
  logic [PW-1:0] wr_p, rd_p;
  logic          full, rd_ok, take;

  // round-robin pick
  always_comb begin
    grant = ptr;
    any   = 1'b0;
    for (int k = NM - 1; k >= 0; k--) begin
      automatic logic [IW-1:0] idx = IW'((int'(ptr) + k) % NM);
      if (m_read[idx] || m_write[idx]) begin
        grant = idx;
        any   = 1'b1;
      end
    end
  end

  assign full    = (count == (PW+1)'(MAX_OUT));
  assign rd_ok   = !full;
  assign s_read  = any && m_read[grant] && rd_ok;
  assign s_write = any && m_write[grant];
  assign s_addr  = m_addr[grant];
  assign s_wdata = m_wdata[grant];
  assign s_be    = m_be[grant];
  assign take    = (s_read || s_write) && !s_waitreq;

  always_comb begin
    for (int k = 0; k < NM; k++)
      m_waitreq[k] = !(any && grant == IW'(k) && (s_write || s_read) && !s_waitreq);
  end

  // reply steering
  assign m_rdata = s_rdata;
  always_comb begin
    m_rvalid = '0;
    if (s_rvalid) m_rvalid[id_q[rd_p]] = 1'b1;
  end

  always_ff @(posedge clk) begin
    if (s_read && !s_waitreq) id_q[wr_p] <= grant;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ptr   <= '0;
      wr_p  <= '0;
      rd_p  <= '0;
      count <= '0;
    end else begin
      if (take) ptr <= (grant == IW'(NM - 1)) ? '0 : grant + IW'(1);
      if (s_read && !s_waitreq) wr_p <= wr_p + PW'(1);
      if (s_rvalid) rd_p <= rd_p + PW'(1);
      count <= count + (PW+1)'(s_read && !s_waitreq) - (PW+1)'(s_rvalid);
    end
  end

  a_reply_expected: assert property (@(posedge clk) disable iff (!rst_n)
    s_rvalid |-> count != '0);
  a_one_cmd: assert property (@(posedge clk) disable iff (!rst_n)
    !(s_read && s_write));

endmodule
