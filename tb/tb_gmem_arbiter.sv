// tb_gmem_arbiter: five random masters, each reading and writing its own
// region of the global-memory model with random back-pressure, share the
// memory through the arbiter. Every read reply is checked against the
// master's own record of what it wrote, and must reach that master only;
// every master must complete its operations (no starvation), and the
// tracker must fill at least once (a small MAX_OUT and long latency make
// it do so).
module tb_gmem_arbiter;
  localparam int NM = 5, AW = 8, L = 16, DW = 32 * L, OPS = 300;

  logic clk = 0, rst_n = 1;
  logic [NM-1:0] m_read, m_write, m_waitreq, m_rvalid;
  logic [NM-1:0][AW-1:0] m_addr;
  logic [NM-1:0][DW-1:0] m_wdata;
  logic [NM-1:0][L-1:0] m_be;
  logic [DW-1:0] m_rdata;
  logic s_read, s_write, s_waitreq, s_rvalid;
  logic [AW-1:0] s_addr;
  logic [DW-1:0] s_wdata, s_rdata;
  logic [L-1:0] s_be;
  int checks = 0, failures = 0, full_seen = 0;

  gmem_arbiter #(.NM(NM), .AW(AW), .LANES_P(L), .MAX_OUT(4)) dut (.*);
  gmem_model #(.AW(AW), .LANES(L), .LAT(12), .STALL_PCT(20)) mem (
    .clk(clk), .m_read(s_read), .m_write(s_write), .m_addr(s_addr), .m_wdata(s_wdata),
    .m_be(s_be), .m_waitreq(s_waitreq), .m_rvalid(s_rvalid), .m_rdata(s_rdata));

  always #5 clk = ~clk;

  logic [DW-1:0] shadow [NM][32];
  logic [DW-1:0] exp_q [NM][$];
  int done_ops [NM];

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) if (rst_n) begin
    if (dut.full) full_seen++;
    for (int k = 0; k < NM; k++) begin
      if (m_rvalid[k]) begin
        checks++;
        if (exp_q[k].size() == 0 || m_rdata !== exp_q[k][0]) begin
          failures++;
          if (failures < 10) $display("FAIL master %0d read reply wrong", k);
        end
        if (exp_q[k].size() != 0) void'(exp_q[k].pop_front());
      end
      if ((m_read[k] || m_write[k]) && !m_waitreq[k]) begin
        automatic int a = int'(m_addr[k][4:0]);
        if (m_write[k]) begin
          for (int l = 0; l < L; l++)
            if (m_be[k][l]) shadow[k][a][32*l +: 32] = m_wdata[k][32*l +: 32];
        end else begin
          exp_q[k].push_back(shadow[k][a]);
        end
        done_ops[k]++;
        m_read[k]  <= 1'b0;
        m_write[k] <= 1'b0;
      end
    end
  end

  always @(negedge clk) if (rst_n) begin
    for (int k = 0; k < NM; k++)
      if (!m_read[k] && !m_write[k] && done_ops[k] < OPS && $urandom_range(1, 0) == 1) begin
        m_addr[k]  = {3'(k), 5'($urandom)};
        m_wdata[k] = {16{$urandom}};
        m_be[k]    = 16'($urandom);
        if ($urandom_range(1, 0) == 1) m_write[k] = 1'b1;
        else                           m_read[k]  = 1'b1;
      end
  end

  initial begin
    m_read = '0; m_write = '0; m_addr = '0; m_wdata = '0; m_be = '0;
    for (int k = 0; k < NM; k++) begin
      done_ops[k] = 0;
      for (int a = 0; a < 32; a++) begin
        shadow[k][a] = {16{$urandom}};
        mem.mem[{3'(k), 5'(a)}] = shadow[k][a];
      end
    end
    #1 rst_n = 0;        // a real reset edge
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (done_ops[0] == OPS && done_ops[1] == OPS && done_ops[2] == OPS &&
          done_ops[3] == OPS && done_ops[4] == OPS);
    repeat (30) @(posedge clk);
    for (int k = 0; k < NM; k++) begin
      checks++;
      if (exp_q[k].size() != 0) begin failures++; $display("FAIL master %0d: replies missing", k); end
    end
    checks++;
    if (full_seen == 0) begin failures++; $display("FAIL tracker never filled"); end
    $display("tracker full in %0d cycles", full_seen);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
