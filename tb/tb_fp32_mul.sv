// tb_fp32_mul: random and corner-case check of the single-precision
// multiplier against a double-precision reference rounded once.
module tb_fp32_mul;
  import hsu_tb_pkg::*;
  logic [31:0] a, b, y;
  int checks = 0, failures = 0;

  fp32_mul dut (.a, .b, .y);

  task automatic check(logic [31:0] x, logic [31:0] z);
    logic [31:0] exp_y;
    a = x; b = z;
    #1;
    exp_y = fmul(x, z);
    checks++;
    if (is_nan(exp_y) ? !is_nan(y) : (y != exp_y)) begin
      failures++;
      if (failures < 10) $display("FAIL mul %h * %h: got %h expected %h", x, z, y, exp_y);
    end
  endtask

  initial begin
    check(32'h3F80_0000, 32'h4000_0000);   // 1 * 2
    check(32'h7F80_0000, 32'h0000_0000);   // inf * 0 = NaN
    check(32'hFF80_0000, 32'h4000_0000);   // -inf * 2
    check(32'h7F00_0000, 32'h7F00_0000);   // overflow
    check(32'h0100_0000, 32'h0100_0000);   // underflow to zero
    check(32'h8000_0000, 32'h3F80_0000);   // -0 * 1
    check(32'h3FFF_FFFF, 32'h3FFF_FFFF);   // rounding carry
    for (int i = 0; i < 40000; i++) begin
      check(frand(-60, 60), frand(-60, 60));
      check(frand(-70, -55), frand(-70, -55));   // near underflow
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
