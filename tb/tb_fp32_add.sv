// tb_fp32_add: random and corner-case check of the single-precision adder
// against a double-precision reference rounded once to single precision.
// Covers carries, cancellation, far-apart exponents, zeros, infinities, NaN,
// overflow and underflow to zero.
module tb_fp32_add;
  import hsu_tb_pkg::*;
  logic [31:0] a, b, y;
  logic        sub;
  int checks = 0, failures = 0;

  fp32_add dut (.a, .b, .sub, .y);

  task automatic check(logic [31:0] x, logic [31:0] z, logic s);
    logic [31:0] exp_y;
    a = x; b = z; sub = s;
    #1;
    exp_y = s ? fsub(x, z) : fadd(x, z);
    checks++;
    if (is_nan(exp_y) ? !is_nan(y) : (y != exp_y)) begin
      failures++;
      if (failures < 10) $display("FAIL add %h %s %h: got %h expected %h", x, s ? "-" : "+", z, y, exp_y);
    end
  endtask

  initial begin
    // corner cases
    check(32'h3F80_0000, 32'h3F80_0000, 1'b0);   // 1 + 1
    check(32'h3F80_0000, 32'h3F80_0000, 1'b1);   // 1 - 1 = +0
    check(32'h8000_0000, 32'h8000_0000, 1'b0);   // -0 + -0
    check(32'h7F80_0000, 32'hFF80_0000, 1'b0);   // inf - inf = NaN
    check(32'h7F80_0000, 32'h3F80_0000, 1'b1);   // inf - 1
    check(32'h7F7F_FFFF, 32'h7F7F_FFFF, 1'b0);   // overflow
    check(32'h0080_0001, 32'h0080_0000, 1'b1);   // underflow to zero
    check(32'h4B80_0000, 32'h3F80_0000, 1'b0);   // 2^24 + 1 tie to even
    check(32'h3F80_0000, 32'h3380_0000, 1'b1);   // 1 - 2^-24
    check(32'h7FC0_0000, 32'h3F80_0000, 1'b0);   // NaN
    // random: near exponents (cancellation) and wide ones
    for (int i = 0; i < 20000; i++) begin
      check(frand(-8, 8), frand(-8, 8), 1'($urandom));
      check(frand(-40, 40), frand(-40, 40), 1'($urandom));
    end
    for (int i = 0; i < 5000; i++) begin
      logic [31:0] x;
      x = frand(-20, 20);
      check(x, {x[31:8], 8'($urandom)}, 1'b1);      // massive cancellation
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
