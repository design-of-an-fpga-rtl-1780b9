// tb_excite_kernel: launches the excitation kernel with random source values
// on grids of several sizes and checks that only Ez at (n/2, n/2) changes,
// to the value given, with one write per launch.
module tb_excite_kernel;
  import fdtd_pkg::*;
  import fp_ref_pkg::*;

  localparam int unsigned JW = $clog2(N_MAX);
  localparam int unsigned VW = $clog2(N_MAX / LANES);
  localparam int unsigned AW = 3 + JW + VW;
  localparam int unsigned DW = 32 * LANES;

  logic clk = 0, rst_n = 1, start = 0, busy, done;
  logic [JW:0] n;
  logic [31:0] value;
  logic m_read, m_write, m_waitreq, m_rvalid;
  logic [AW-1:0] m_addr;
  logic [DW-1:0] m_wdata, m_rdata;
  logic [LANES-1:0] m_be;
  int checks = 0, failures = 0;

  excite_kernel dut (.*);
  gmem_model #(.AW(AW), .LANES(LANES), .STALL_PCT(50)) mem (.*);

  always #5 clk = ~clk;

  function automatic logic [AW-1:0] wa(int a, int j, int i);
    return {3'(a), JW'(j), VW'(i / LANES)};
  endfunction
  function automatic logic [31:0] rd(int a, int j, int i);
    return mem.mem[wa(a, j, i)][32*(i % LANES) +: 32];
  endfunction

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(int nn);
    logic [31:0] g [][];
    logic [31:0] e, src;
    int w0;
    g = new[nn];
    for (int j = 0; j < nn; j++) begin
      g[j] = new[nn];
      for (int i = 0; i < nn; i++) begin
        g[j][i] = frand(8);
        mem.mem[wa(ARR_EZ, j, i)][32*(i % LANES) +: 32] = g[j][i];
      end
    end
    src = frand(8);
    w0 = mem.writes;
    @(negedge clk);
    n = (JW+1)'(nn);
    value = src;
    start = 1;
    @(negedge clk);
    start = 0;
    value = 32'hDEAD_BEEF;
    while (!done) @(negedge clk);
    checks++;
    if (mem.writes - w0 != 1) begin failures++; $display("FAIL %0d writes", mem.writes - w0); end
    for (int j = 0; j < nn; j++)
      for (int i = 0; i < nn; i++) begin
        e = (i == nn / 2 && j == nn / 2) ? src : g[j][i];
        checks++;
        if (rd(ARR_EZ, j, i) !== e) begin
          failures++;
          if (failures < 10) $display("FAIL n=%0d (%0d,%0d): %h expected %h", nn, i, j, rd(ARR_EZ, j, i), e);
        end
      end
  endtask

  initial begin
    n = '0;
    value = '0;
    #1 rst_n = 0;        // a real reset edge
    repeat (3) @(posedge clk);
    rst_n = 1;
    run(32);
    run(48);
    run(16);
    run(64);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
