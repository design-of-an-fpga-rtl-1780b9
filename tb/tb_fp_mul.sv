// tb_fp_mul: self-checking test of the binary32 multiplier.
// Random operands compared with a double-precision reference rounded to
// binary32, plus zero, infinity, NaN, overflow and underflow cases.
module tb_fp_mul;
  import fp_ref_pkg::*;

  logic [31:0] a, b, y;
  int checks = 0, failures = 0;

  fp_mul dut (.a(a), .b(b), .y(y));

  task automatic check(input logic [31:0] ta, input logic [31:0] tb_, input logic [31:0] exp_y);
    a = ta; b = tb_;
    #1;
    checks++;
    if (y !== exp_y) begin
      failures++;
      if (failures < 10) $display("FAIL %h * %h = %h, expected %h", ta, tb_, y, exp_y);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] x, z;
    for (int i = 0; i < 8000; i++) begin
      x = frand(50); z = frand(50);
      check(x, z, fmul(x, z));
    end
    check(32'h3F80_0000, 32'h4040_0000, 32'h4040_0000);
    // exact ties: (1+2^-12)^2 = 1 + 2^-11 + 2^-24 rounds to even (down);
    // (1+2^-12)(1+2^-12+2^-23) = 1 + 2^-11 + 2^-23 + 2^-24 (+2^-35) rounds up
    check(32'h3F80_0800, 32'h3F80_0800, 32'h3F80_1000);
    check(32'h3F80_0800, 32'h3F80_0801, 32'h3F80_1002);
    check(32'h4000_0800, 32'hBF80_0800, 32'hC000_1000);
    check(32'h0000_0000, 32'hC040_0000, 32'h8000_0000);
    check(32'h7F80_0000, 32'h0000_0000, 32'h7FC0_0000);
    check(32'h7F80_0000, 32'hBF80_0000, 32'hFF80_0000);
    check(32'h7F00_0000, 32'h7F00_0000, 32'h7F80_0000);
    check(32'h0100_0000, 32'h0100_0000, 32'h0000_0000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
