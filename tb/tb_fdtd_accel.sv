// tb_fdtd_accel: end-to-end test of the accelerator with its default
// parameters. A host model writes the initial fields (zero) and the
// coefficient arrays into global memory through the host data port, then
// runs STEPS time steps of the simulation model: for each step it launches
// the electric-field, boundary, excitation and magnetic-field kernels in
// turn, the source at the grid centre following a sampled sine. It then
// reads Ez, Hx and Hy back through the host port and compares every cell
// with the same scheme computed by the binary32 reference model.
// During one efield run the host also reads global memory, so that the
// arbiter has to share the port. Every mechanism (each kernel, host
// transfers both ways, memory back-pressure, arbitration between two
// requesters) is counted and must have happened at least once.
module tb_fdtd_accel;
  import fdtd_pkg::*;
  import fp_ref_pkg::*;

  localparam int NN    = 32;     // grid size of this run
  localparam int STEPS = 24;     // time steps of this run

  localparam int unsigned JW = $clog2(N_MAX);
  localparam int unsigned VW = $clog2(N_MAX / LANES);
  localparam int unsigned AW = 3 + JW + VW;
  localparam int unsigned DW = 32 * LANES;

  logic clk = 0, rst_n = 1;
  logic [JW:0] cfg_n;
  logic launch_valid = 0, launch_ready, kernel_done;
  kernel_e launch_kernel;
  logic [31:0] launch_value;
  logic h_read = 0, h_write = 0, h_waitreq, h_rvalid;
  logic [AW-1:0] h_addr;
  logic [DW-1:0] h_wdata, h_rdata;
  logic [LANES-1:0] h_be;
  logic g_read, g_write, g_waitreq, g_rvalid;
  logic [AW-1:0] g_addr;
  logic [DW-1:0] g_wdata, g_rdata;
  logic [LANES-1:0] g_be;

  int checks = 0, failures = 0;
  int n_launch [4];
  int n_host_wr = 0, n_host_rd = 0, n_stall = 0, n_conflict = 0;
  longint cyc = 0;

  fdtd_accel dut (.*);
  gmem_model #(.AW(AW), .LANES(LANES), .LAT(10), .STALL_PCT(10)) mem (
    .clk(clk), .m_read(g_read), .m_write(g_write), .m_addr(g_addr), .m_wdata(g_wdata),
    .m_be(g_be), .m_waitreq(g_waitreq), .m_rvalid(g_rvalid), .m_rdata(g_rdata));

  always #5 clk = ~clk;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if ((g_read || g_write) && g_waitreq) n_stall++;
    if ($countones(dut.m_read | dut.m_write) > 1) n_conflict++;
  end

  initial begin
    repeat (20_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- host model ----------------
  function automatic logic [AW-1:0] wa(int a, int j, int v);
    return {3'(a), JW'(j), VW'(v)};
  endfunction

  task automatic host_write(logic [AW-1:0] a, logic [DW-1:0] d);
    @(negedge clk);
    h_addr = a; h_wdata = d; h_be = '1; h_write = 1;
    @(posedge clk);
    while (h_waitreq) @(posedge clk);
    #1 h_write = 0;
    n_host_wr++;
  endtask

  task automatic host_read(logic [AW-1:0] a, output logic [DW-1:0] d);
    @(negedge clk);
    h_addr = a; h_read = 1;
    @(posedge clk);
    while (h_waitreq) @(posedge clk);
    #1 h_read = 0;
    while (!h_rvalid) @(posedge clk);
    d = h_rdata;
    n_host_rd++;
  endtask

  task automatic launch(kernel_e k, logic [31:0] val, output longint cycles);
    longint t0;
    @(negedge clk);
    while (!launch_ready) @(negedge clk);
    launch_kernel = k; launch_value = val; launch_valid = 1;
    t0 = cyc;
    @(negedge clk);
    launch_valid = 0;
    while (!kernel_done) @(negedge clk);
    cycles = cyc - t0;
    n_launch[k]++;
  endtask

  // ---------------- reference model ----------------
  logic [31:0] ez [NN][NN], hx [NN][NN], hy [NN][NN];
  logic [31:0] px [NN][NN], py [NN][NN], qx [NN][NN], qy [NN][NN];

  function automatic logic [31:0] source(int t);
    return r2f($sin(0.3 * real'(t + 1)));
  endfunction

  task automatic ref_step(int t);
    for (int j = 1; j < NN; j++)
      for (int i = 1; i < NN; i++)
        ez[j][i] = fadd(fsub(ez[j][i], fmul(py[j][i], fsub(hx[j][i], hx[j-1][i]))),
                        fmul(px[j][i], fsub(hy[j][i], hy[j][i-1])));
    for (int k = 0; k < NN; k++) begin
      ez[0][k] = 0; ez[NN-1][k] = 0; ez[k][0] = 0; ez[k][NN-1] = 0;
    end
    ez[NN/2][NN/2] = source(t);
    for (int j = 0; j < NN; j++)
      for (int i = 0; i < NN; i++) begin
        if (j < NN - 1) hx[j][i] = fsub(hx[j][i], fmul(qy[j][i], fsub(ez[j+1][i], ez[j][i])));
        if (i < NN - 1) hy[j][i] = fsub(hy[j][i], fmul(qx[j][i], fsub(ez[j][i+1], ez[j][i])));
      end
  endtask

  task automatic compare(int a, logic [31:0] g [NN][NN], string nm);
    logic [DW-1:0] w;
    int bad = 0;
    for (int j = 0; j < NN; j++)
      for (int v = 0; v < NN / LANES; v++) begin
        host_read(wa(a, j, v), w);
        for (int l = 0; l < LANES; l++) begin
          checks++;
          if (w[32*l +: 32] !== g[j][v*LANES+l]) begin
            failures++; bad++;
            if (bad < 5) $display("FAIL %s(%0d,%0d) = %h, expected %h", nm, v*LANES+l, j,
                                  w[32*l +: 32], g[j][v*LANES+l]);
          end
        end
      end
  endtask

  initial begin
    logic [DW-1:0] w;
    longint c_e, c_b, c_x, c_h;
    int nz;
    cfg_n = (JW+1)'(NN);
    launch_kernel = K_EFIELD; launch_value = '0;
    h_addr = '0; h_wdata = '0; h_be = '0;
    for (int k = 0; k < 4; k++) n_launch[k] = 0;
    // a lossless free-space grid with a slightly varying medium
    for (int j = 0; j < NN; j++)
      for (int i = 0; i < NN; i++) begin
        ez[j][i] = 0; hx[j][i] = 0; hy[j][i] = 0;
        px[j][i] = r2f(0.5 - 0.1 * real'((i + j) % 3) / 3.0);
        py[j][i] = px[j][i];
        qx[j][i] = r2f(-0.5);            // the sign of the Hy term rides on Qx
        qy[j][i] = r2f(0.5);
      end
    #1 rst_n = 0;        // a real reset edge
    repeat (3) @(posedge clk);
    rst_n = 1;

    // initial transfer: fields and coefficients
    for (int j = 0; j < NN; j++)
      for (int v = 0; v < NN / LANES; v++) begin
        for (int l = 0; l < LANES; l++) w[32*l +: 32] = 32'd0;
        host_write(wa(ARR_EZ, j, v), w);
        host_write(wa(ARR_HX, j, v), w);
        host_write(wa(ARR_HY, j, v), w);
        for (int l = 0; l < LANES; l++) w[32*l +: 32] = px[j][v*LANES+l];
        host_write(wa(ARR_PX, j, v), w);
        for (int l = 0; l < LANES; l++) w[32*l +: 32] = py[j][v*LANES+l];
        host_write(wa(ARR_PY, j, v), w);
        for (int l = 0; l < LANES; l++) w[32*l +: 32] = qx[j][v*LANES+l];
        host_write(wa(ARR_QX, j, v), w);
        for (int l = 0; l < LANES; l++) w[32*l +: 32] = qy[j][v*LANES+l];
        host_write(wa(ARR_QY, j, v), w);
      end

    // time steps
    for (int t = 0; t < STEPS; t++) begin
      if (t == 0) begin
        // the host touches global memory while the first efield run is busy
        fork
          launch(K_EFIELD, '0, c_e);
          begin
            repeat (40) @(posedge clk);
            for (int r = 0; r < 40; r++) begin
              host_read(wa(ARR_PX, r % NN, 0), w);
              checks++;
              if (w[31:0] !== px[r % NN][0]) begin failures++; $display("FAIL concurrent host read"); end
            end
          end
        join
      end else begin
        launch(K_EFIELD, '0, c_e);
      end
      launch(K_BOUNDARY, '0, c_b);
      launch(K_EXCITE, source(t), c_x);
      launch(K_HFIELD, '0, c_h);
      ref_step(t);
      if (t == 0)
        $display("n=%0d step cycles: efield %0d boundary %0d excite %0d hfield %0d",
                 NN, c_e, c_b, c_x, c_h);
    end

    // final transfer back and comparison
    compare(ARR_EZ, ez, "Ez");
    compare(ARR_HX, hx, "Hx");
    compare(ARR_HY, hy, "Hy");
    nz = 0;
    for (int j = 0; j < NN; j++) for (int i = 0; i < NN; i++) if (ez[j][i] != 0) nz++;
    $display("%0d nonzero Ez cells after %0d steps", nz, STEPS);
    checks++;
    if (nz < 10) begin failures++; $display("FAIL the wave did not spread"); end

    $display("launches efield %0d hfield %0d boundary %0d excite %0d; host writes %0d reads %0d; stalls %0d; conflicts %0d",
             n_launch[K_EFIELD], n_launch[K_HFIELD], n_launch[K_BOUNDARY], n_launch[K_EXCITE],
             n_host_wr, n_host_rd, n_stall, n_conflict);
    for (int k = 0; k < 4; k++) begin
      checks++;
      if (n_launch[k] != STEPS) begin failures++; $display("FAIL kernel %0d launched %0d times", k, n_launch[k]); end
    end
    checks++; if (n_host_wr == 0) failures++;
    checks++; if (n_host_rd == 0) failures++;
    checks++; if (n_stall == 0) begin failures++; $display("FAIL no memory stall"); end
    checks++; if (n_conflict == 0) begin failures++; $display("FAIL no arbitration conflict"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
