// tb_fp_add: self-checking test of the binary32 adder/subtractor.
// Random operands over a wide and a narrow exponent range (the narrow range
// exercises cancellation), exact-cancellation, zero, infinity and NaN cases,
// all compared with a double-precision reference rounded to binary32.
module tb_fp_add;
  import fp_ref_pkg::*;

  logic [31:0] a, b, y;
  logic        sub;
  int checks = 0, failures = 0;

  fp_add dut (.a(a), .b(b), .sub(sub), .y(y));

  task automatic check(input logic [31:0] ta, input logic [31:0] tb_, input logic s,
                       input logic [31:0] exp_y);
    a = ta; b = tb_; sub = s;
    #1;
    checks++;
    if (y !== exp_y) begin
      failures++;
      if (failures < 10)
        $display("FAIL %h %s %h = %h, expected %h", ta, s ? "-" : "+", tb_, y, exp_y);
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
    logic s;
    for (int i = 0; i < 4000; i++) begin
      x = frand(40); z = frand(40); s = 1'($urandom);
      check(x, z, s, s ? fsub(x, z) : fadd(x, z));
    end
    for (int i = 0; i < 4000; i++) begin
      x = frand(2); z = {x[31:23] ^ {8'd0, 1'($urandom)}, x[22:0] ^ 23'($urandom_range(255, 0))};
      s = 1'($urandom);
      check(x, z, s, s ? fsub(x, z) : fadd(x, z));
    end
    // exact cancellation and zeros
    check(32'h3FC0_0000, 32'h3FC0_0000, 1'b1, 32'h0000_0000);
    check(32'h0000_0000, 32'h4000_0000, 1'b1, 32'hC000_0000);
    check(32'h4000_0000, 32'h0000_0000, 1'b0, 32'h4000_0000);
    check(32'h8000_0000, 32'h8000_0000, 1'b0, 32'h8000_0000);
    // ties to even: 1 + 2^-24 -> 1, (1+2^-23) + 2^-24 -> 1+2^-22
    check(32'h3F80_0000, 32'h3380_0000, 1'b0, 32'h3F80_0000);
    check(32'h3F80_0001, 32'h3380_0000, 1'b0, 32'h3F80_0002);
    // specials
    check(32'h7F80_0000, 32'h3F80_0000, 1'b0, 32'h7F80_0000);
    check(32'h7F80_0000, 32'h7F80_0000, 1'b1, 32'h7FC0_0000);
    check(32'h7F7F_FFFF, 32'h7F7F_FFFF, 1'b0, 32'h7F80_0000);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
