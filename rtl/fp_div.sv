// fp_div: IEEE 754 single-precision divider, combinational.
//
// Divides the dividend significand, shifted left by 26 places, by the
// divisor significand; the 27-bit quotient holds the 24 result bits, a
// guard bit and one more bit, the remainder feeds the sticky bit. The
// result is rounded to nearest-even. Special values follow IEEE 754
// (x/0 = infinity, 0/0 and inf/inf = NaN, x/inf = 0); denormals are read as
// zero (this design's choice). Purely combinational.
module fp_div
  import fp_pkg::*;
(
  input  logic [31:0] a,
  input  logic [31:0] b,
  output logic [31:0] y
);

  logic        s;
  logic [49:0] num;
  logic [49:0] den;
  logic [49:0] q;
  logic [49:0] r;
  logic signed [11:0] e;

  always_comb begin
    s   = a[31] ^ b[31];
    num = {1'b1, a[22:0], 26'd0};
    den = {26'd0, 1'b1, b[22:0]};
    q   = num / den;
    r   = num % den;
    e   = $signed({4'd0, a[30:23]}) - $signed({4'd0, b[30:23]}) + 12'sd127;
    if (is_nan(a) || is_nan(b)) y = QNAN;
    else if (is_inf(a) && is_inf(b)) y = QNAN;
    else if (is_zero(a) && is_zero(b)) y = QNAN;
    else if (is_inf(a) || is_zero(b)) y = {s, 8'hFF, 23'd0};
    else if (is_zero(a) || is_inf(b)) y = {s, 31'd0};
    else if (q[26]) y = round_pack(s, e, q[26:3], q[2], (|q[1:0]) | (|r));
    else            y = round_pack(s, e - 12'sd1, q[25:2], q[1], q[0] | (|r));
  end

endmodule
