// fp32_add: combinational IEEE-754 single-precision adder, a + b (or a - b
// with sub = 1). One of the shared adder functional units of the HSU
// datapath; every stage that lists "Adds" instantiates a bank of these.
//
// How it works: operands are unpacked with denormal inputs flushed to zero,
// ordered by magnitude, the smaller significand is aligned with guard, round
// and sticky bits, added or subtracted, normalised with a leading-zero count
// and rounded to nearest-even. A result whose exponent falls below the normal
// range is flushed to a signed zero, an overflow gives infinity and any
// invalid operation gives the canonical quiet NaN 0x7FC00000.
//
// Timing: purely combinational; the datapath registers the result at the end
// of the stage, so every intermediate value is rounded to single precision.
// Rounding per stage follows the description of the datapath; flushing
// denormals is this design's simplification.
module fp32_add (
  input  logic [31:0] a,
  input  logic [31:0] b,
  input  logic        sub,
  output logic [31:0] y
);
  logic        sa, sb, sx, sy, eff_sub, rs;
  logic [7:0]  ea, eb, ex, ey;
  logic [23:0] ma, mb, mx, my;
  logic        a_zero, b_zero, a_inf, b_inf, a_nan, b_nan;
  logic [7:0]  d;
  logic [26:0] ax, bx, bsh;
  logic [27:0] sum;
  logic [26:0] nrm;
  logic [4:0]  lz;
  logic signed [9:0] re;
  logic [24:0] rm;
  logic        g, r, s, up;

  always_comb begin
    sa = a[31];
    sb = b[31] ^ sub;
    ea = a[30:23];
    eb = b[30:23];
    a_zero = (ea == 8'd0);
    b_zero = (eb == 8'd0);
    a_inf  = (ea == 8'hFF) && (a[22:0] == 23'd0);
    b_inf  = (eb == 8'hFF) && (b[22:0] == 23'd0);
    a_nan  = (ea == 8'hFF) && (a[22:0] != 23'd0);
    b_nan  = (eb == 8'hFF) && (b[22:0] != 23'd0);
    ma = {1'b1, a[22:0]};
    mb = {1'b1, b[22:0]};

    // order by magnitude: x is the larger operand
    if ({ea, a[22:0]} >= {eb, b[22:0]}) begin
      sx = sa; ex = ea; mx = ma; sy = sb; ey = eb; my = mb;
    end else begin
      sx = sb; ex = eb; mx = mb; sy = sa; ey = ea; my = ma;
    end
    eff_sub = sx ^ sy;
    d  = ex - ey;
    ax = {mx, 3'b000};
    bx = {my, 3'b000};
    if (d >= 8'd27) bsh = 27'd1;                       // all sticky
    else            bsh = (bx >> d) | {26'd0, |(bx & ~(27'h7FFFFFF << d))};
    sum = eff_sub ? ({1'b0, ax} - {1'b0, bsh}) : ({1'b0, ax} + {1'b0, bsh});

    // normalise
    lz = 5'd0;
    for (int i = 0; i <= 26; i++) if (sum[i]) lz = 5'(26 - i);
    if (sum[27]) begin
      nrm = {sum[27:2], sum[1] | sum[0]};
      re  = $signed({2'b00, ex}) + 10'sd1;
    end else begin
      nrm = sum[26:0] << lz;
      re  = $signed({2'b00, ex}) - $signed({5'd0, lz});
    end
    g = nrm[2]; r = nrm[1]; s = nrm[0];
    up = g & (r | s | nrm[3]);
    rm = {1'b0, nrm[26:3]} + {24'd0, up};
    if (rm[24]) begin
      rm = rm >> 1;
      re = re + 10'sd1;
    end
    rs = sx;

    // result selection
    if (a_nan || b_nan || (a_inf && b_inf && (sa != sb)))
      y = 32'h7FC0_0000;
    else if (a_inf)
      y = {sa, 8'hFF, 23'd0};
    else if (b_inf)
      y = {sb, 8'hFF, 23'd0};
    else if (a_zero && b_zero)
      y = {sa & sb, 31'd0};
    else if (a_zero)
      y = {sb, b[30:0]};
    else if (b_zero)
      y = {sa, a[30:0]};
    else if (sum == 28'd0)
      y = 32'd0;
    else if (re >= 10'sd255)
      y = {rs, 8'hFF, 23'd0};
    else if (re <= 10'sd0)
      y = {rs, 31'd0};
    else
      y = {rs, re[7:0], rm[22:0]};
  end
endmodule
