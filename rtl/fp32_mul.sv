// fp32_mul: combinational IEEE-754 single-precision multiplier, a * b. One of
// the shared multiplier functional units of the HSU datapath.
//
// How it works: denormal inputs are flushed to zero, the 24x24-bit
// significand product is normalised by at most one place and rounded to
// nearest-even from its guard and sticky bits. Results below the normal range
// flush to a signed zero, overflow gives infinity, 0 * inf and NaN inputs
// give the canonical quiet NaN.
//
// Timing: purely combinational, registered by the enclosing pipeline stage.
// Flushing denormals is this design's simplification.
module fp32_mul (
  input  logic [31:0] a,
  input  logic [31:0] b,
  output logic [31:0] y
);
  logic        s;
  logic [7:0]  ea, eb;
  logic        a_zero, b_zero, a_inf, b_inf, a_nan, b_nan;
  logic [47:0] p;
  logic [23:0] m;
  logic        g, st, up;
  logic [24:0] rm;
  logic signed [9:0] re;

  always_comb begin
    s  = a[31] ^ b[31];
    ea = a[30:23];
    eb = b[30:23];
    a_zero = (ea == 8'd0);
    b_zero = (eb == 8'd0);
    a_inf  = (ea == 8'hFF) && (a[22:0] == 23'd0);
    b_inf  = (eb == 8'hFF) && (b[22:0] == 23'd0);
    a_nan  = (ea == 8'hFF) && (a[22:0] != 23'd0);
    b_nan  = (eb == 8'hFF) && (b[22:0] != 23'd0);
    p  = {1'b1, a[22:0]} * {1'b1, b[22:0]};
    re = $signed({2'b00, ea}) + $signed({2'b00, eb}) - 10'sd127;
    if (p[47]) begin
      m  = p[47:24];
      g  = p[23];
      st = |p[22:0];
      re = re + 10'sd1;
    end else begin
      m  = p[46:23];
      g  = p[22];
      st = |p[21:0];
    end
    up = g & (st | m[0]);
    rm = {1'b0, m} + {24'd0, up};
    if (rm[24]) begin
      rm = rm >> 1;
      re = re + 10'sd1;
    end

    if (a_nan || b_nan || (a_inf && b_zero) || (b_inf && a_zero))
      y = 32'h7FC0_0000;
    else if (a_inf || b_inf)
      y = {s, 8'hFF, 23'd0};
    else if (a_zero || b_zero)
      y = {s, 31'd0};
    else if (re >= 10'sd255)
      y = {s, 8'hFF, 23'd0};
    else if (re <= 10'sd0)
      y = {s, 31'd0};
    else
      y = {s, re[7:0], rm[22:0]};
  end
endmodule
