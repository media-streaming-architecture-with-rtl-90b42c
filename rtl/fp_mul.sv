// fp_mul: IEEE 754 single-precision multiplier, combinational.
//
// Multiplies the two 24-bit significands, adds the exponents less the bias,
// normalises by at most one place and rounds to nearest-even. Special
// values: NaN or infinity times zero give the quiet NaN, infinity times a
// number gives infinity, zero times a number gives zero; denormals are read
// as zero (this design's choice). Purely combinational.
module fp_mul
  import fp_pkg::*;
(
  input  logic [31:0] a,
  input  logic [31:0] b,
  output logic [31:0] y
);

  logic        s;
  logic [47:0] p;
  logic signed [11:0] e;

  always_comb begin
    s = a[31] ^ b[31];
    p = {1'b1, a[22:0]} * {1'b1, b[22:0]};
    e = $signed({4'd0, a[30:23]}) + $signed({4'd0, b[30:23]}) - 12'sd127;
    if (is_nan(a) || is_nan(b)) y = QNAN;
    else if ((is_inf(a) && is_zero(b)) || (is_inf(b) && is_zero(a))) y = QNAN;
    else if (is_inf(a) || is_inf(b)) y = {s, 8'hFF, 23'd0};
    else if (is_zero(a) || is_zero(b)) y = {s, 31'd0};
    else if (p[47]) y = round_pack(s, e + 12'sd1, p[47:24], p[23], |p[22:0]);
    else            y = round_pack(s, e, p[46:23], p[22], |p[21:0]);
  end

endmodule
