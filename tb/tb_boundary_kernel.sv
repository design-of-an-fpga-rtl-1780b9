// tb_boundary_kernel: fills every array with random values, runs the
// boundary kernel for several grid sizes with random back-pressure and
// checks that exactly the outer ring of Ez is zero afterwards, every other
// value is unchanged, and the number of writes is 2*n/LANES + 2*(n-2)
// (n/LANES*2 + n-2 when a row is a single vector).
module tb_boundary_kernel;
  import fdtd_pkg::*;
  import fp_ref_pkg::*;

  localparam int unsigned JW = $clog2(N_MAX);
  localparam int unsigned VW = $clog2(N_MAX / LANES);
  localparam int unsigned AW = 3 + JW + VW;
  localparam int unsigned DW = 32 * LANES;

  logic clk = 0, rst_n = 1, start = 0, busy, done;
  logic [JW:0] n;
  logic m_read, m_write, m_waitreq, m_rvalid;
  logic [AW-1:0] m_addr;
  logic [DW-1:0] m_wdata, m_rdata;
  logic [LANES-1:0] m_be;
  int checks = 0, failures = 0;

  boundary_kernel dut (.*);
  gmem_model #(.AW(AW), .LANES(LANES)) mem (.*);

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
    logic [31:0] g [3][][];
    logic [31:0] e;
    int w0, nw, nv;
    for (int a = 0; a < 3; a++) begin
      g[a] = new[nn];
      for (int j = 0; j < nn; j++) begin
        g[a][j] = new[nn];
        for (int i = 0; i < nn; i++) begin
          g[a][j][i] = frand(8);
          mem.mem[wa(a, j, i)][32*(i % LANES) +: 32] = g[a][j][i];
        end
      end
    end
    w0 = mem.writes;
    @(negedge clk);
    n = (JW+1)'(nn);
    start = 1;
    @(negedge clk);
    start = 0;
    while (!done) @(negedge clk);
    nv = nn / LANES;
    nw = 2 * nv + (nn - 2) * ((nv == 1) ? 1 : 2);
    checks++;
    if (mem.writes - w0 != nw) begin
      failures++; $display("FAIL n=%0d: %0d writes, expected %0d", nn, mem.writes - w0, nw);
    end
    for (int a = 0; a < 3; a++)
      for (int j = 0; j < nn; j++)
        for (int i = 0; i < nn; i++) begin
          e = g[a][j][i];
          if (a == ARR_EZ && (i == 0 || j == 0 || i == nn - 1 || j == nn - 1)) e = 32'd0;
          checks++;
          if (rd(a, j, i) !== e) begin
            failures++;
            if (failures < 10) $display("FAIL n=%0d arr %0d (%0d,%0d): %h expected %h", nn, a, i, j, rd(a, j, i), e);
          end
        end
  endtask

  initial begin
    n = '0;
    #1 rst_n = 0;        // a real reset edge
    repeat (3) @(posedge clk);
    rst_n = 1;
    run(32);
    run(48);
    run(16);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
