// tb_efield_pe: streams random cells, one per cycle with random gaps, into
// the Ez lane datapath and compares every result with Eq. (1) computed by
// the binary32 reference, checking that each result appears exactly
// 4 cycles after its inputs.
module tb_efield_pe;
  import fp_ref_pkg::*;

  logic clk = 0, rst_n = 1, in_valid = 0, out_valid;
  logic [31:0] ez, px, py, hx, hx_jm1, hy, hy_im1, ez_new;
  int checks = 0, failures = 0, cycle = 0;
  logic [31:0] exp_q[$];
  int          t_q[$];

  efield_pe dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(negedge clk) if (rst_n && out_valid) begin
    checks++;
    if (exp_q.size() == 0) begin
      failures++; $display("FAIL unexpected output");
    end else begin
      automatic logic [31:0] e = exp_q.pop_front();
      automatic int t0 = t_q.pop_front();
      if (ez_new !== e || cycle - t0 != 4) begin
        failures++;
        if (failures < 10) $display("FAIL got %h exp %h latency %0d", ez_new, e, cycle - t0);
      end
    end
  end

  initial begin
    #1 rst_n = 0;        // a real reset edge
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      in_valid = 1'($urandom_range(3, 0) != 0);
      ez = frand(10); px = frand(10); py = frand(10);
      hx = frand(10); hx_jm1 = frand(10); hy = frand(10); hy_im1 = frand(10);
      if (in_valid) begin
        exp_q.push_back(fadd(fsub(ez, fmul(py, fsub(hx, hx_jm1))), fmul(px, fsub(hy, hy_im1))));
        t_q.push_back(cycle);
      end
    end
    @(negedge clk) in_valid = 0;
    repeat (10) @(negedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("FAIL %0d results missing", exp_q.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
