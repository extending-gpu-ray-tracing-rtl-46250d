// fp32_cmp: combinational single-precision comparator, the shared compare
// functional unit of the HSU datapath (slab tests, hit tests, sorting, key
// comparison and the triangle edge tests all use it).
//
// How it works: denormals compare as zero and +0 equals -0. For two numbers
// lt = (a < b) and eq = (a == b); with a NaN operand both are 0 (unordered).
// Equal signs compare magnitudes, reversed for negative numbers.
//
// Timing: purely combinational.
module fp32_cmp (
  input  logic [31:0] a,
  input  logic [31:0] b,
  output logic        lt,
  output logic        eq
);
  logic [30:0] ma, mb;
  logic        a_nan, b_nan, az, bz, an, bn;
  always_comb begin
    a_nan = (a[30:23] == 8'hFF) && (a[22:0] != 23'd0);
    b_nan = (b[30:23] == 8'hFF) && (b[22:0] != 23'd0);
    az = (a[30:23] == 8'd0);
    bz = (b[30:23] == 8'd0);
    ma = az ? 31'd0 : a[30:0];
    mb = bz ? 31'd0 : b[30:0];
    an = a[31] && !az;
    bn = b[31] && !bz;
    if (a_nan || b_nan) begin
      lt = 1'b0; eq = 1'b0;
    end else if (az && bz) begin
      lt = 1'b0; eq = 1'b1;
    end else if (a[31] != b[31] && !(az || bz)) begin
      lt = a[31]; eq = 1'b0;
    end else begin
      // same sign, or one side zero: compare as signed magnitudes
      eq = (ma == mb) && (an == bn);
      if (an != bn)      lt = an;
      else if (an)       lt = ma > mb;
      else               lt = ma < mb;
    end
  end
endmodule
