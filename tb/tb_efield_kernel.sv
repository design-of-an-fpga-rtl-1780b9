// tb_efield_kernel: runs the electric-field kernel on random grids of
// several sizes (one, two and three vectors per row) held in the global
// memory model, with random back-pressure, and compares every cell of every
// array afterwards with Eq. (1) evaluated by the binary32 reference: updated
// cells where i >= 1 and j >= 1, untouched cells elsewhere and in the
// arrays the kernel only reads.
module tb_efield_kernel;
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

  efield_kernel dut (.*);
  gmem_model #(.AW(AW), .LANES(LANES)) mem (.*);

  always #5 clk = ~clk;

  function automatic logic [AW-1:0] wa(int a, int j, int i);
    return {3'(a), JW'(j), VW'(i / LANES)};
  endfunction
  function automatic logic [31:0] rd(int a, int j, int i);
    return mem.mem[wa(a, j, i)][32*(i % LANES) +: 32];
  endfunction

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(int nn);
    logic [31:0] g [7][][];
    logic [31:0] e;
    int cyc = 0;
    for (int a = 0; a < 7; a++) begin
      g[a] = new[nn];
      for (int j = 0; j < nn; j++) begin
        g[a][j] = new[nn];
        for (int i = 0; i < nn; i++) begin
          g[a][j][i] = frand(8);
          mem.mem[wa(a, j, i)][32*(i % LANES) +: 32] = g[a][j][i];
        end
      end
    end
    @(negedge clk);
    n = (JW+1)'(nn);
    start = 1;
    @(negedge clk);
    start = 0;
    while (!done) begin @(negedge clk); cyc++; end
    $display("n=%0d: %0d cycles, %0d cycles per vector", nn, cyc, cyc / ((nn - 1) * nn / LANES));
    for (int a = 0; a < 7; a++)
      for (int j = 0; j < nn; j++)
        for (int i = 0; i < nn; i++) begin
          e = g[a][j][i];
          if (a == ARR_EZ && i >= 1 && j >= 1)
            e = fadd(fsub(g[ARR_EZ][j][i], fmul(g[ARR_PY][j][i], fsub(g[ARR_HX][j][i], g[ARR_HX][j-1][i]))),
                     fmul(g[ARR_PX][j][i], fsub(g[ARR_HY][j][i], g[ARR_HY][j][i-1])));
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
    checks++;
    if (busy) begin failures++; $display("FAIL busy after done"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
