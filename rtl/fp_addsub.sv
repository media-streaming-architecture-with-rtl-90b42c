// fp_addsub: IEEE 754 single-precision adder/subtractor, combinational.
//
// Computes a + b (sub = 0) or a - b (sub = 1). The operand with the larger
// magnitude is taken as the reference, the other significand is shifted
// right to align it (with guard, round and sticky bits), the two are added
// or subtracted, the result is normalised with a leading-zero count and
// rounded to nearest-even. The addition/subtraction function and the
// single-precision format are the document's; the alignment/normalisation
// structure, flush-to-zero of denormals and the single quiet NaN are this
// design's choices. Purely combinational: the FPU wrappers and the ALU
// pipeline register its result.
module fp_addsub
  import fp_pkg::*;
(
  input  logic [31:0] a,
  input  logic [31:0] b,
  input  logic        sub,
  output logic [31:0] y
);

  logic [31:0] bb;
  logic        swap;
  logic [31:0] x, z;           // |x| >= |z|
  logic [26:0] mx, mz, mzs;
  logic [7:0]  d;
  logic        st;
  logic [27:0] sum;
  logic [26:0] m;
  logic signed [11:0] e;
  logic [4:0]  lz;
  logic        found;

  always_comb begin
    bb   = {b[31] ^ sub, b[30:0]};
    swap = (bb[30:0] > a[30:0]);
    x    = swap ? bb : a;
    z    = swap ? a  : bb;
    mx   = is_zero(x) ? 27'd0 : {1'b1, x[22:0], 3'b000};
    mz   = is_zero(z) ? 27'd0 : {1'b1, z[22:0], 3'b000};
    d    = x[30:23] - z[30:23];
    if (d >= 8'd27) begin
      mzs = 27'd0;
      st  = |mz;
    end else begin
      mzs = mz >> d;
      st  = |(mz & ((27'd1 << d) - 27'd1));
    end
    mzs[0] = mzs[0] | st;
    e   = $signed({4'd0, x[30:23]});
    m   = '0;
    lz  = '0;
    sum = '0;
    found = 1'b0;
    if (x[31] == z[31]) begin
      sum = {1'b0, mx} + {1'b0, mzs};
      if (sum[27]) begin
        m = sum[27:1];
        m[0] = m[0] | sum[0];
        e = e + 12'sd1;
      end else begin
        m = sum[26:0];
      end
    end else begin
      m = mx - mzs;
      for (int i = 26; i >= 0; i--) begin
        if (!found && m[i]) begin
          lz = 5'(26 - i);
          found = 1'b1;
        end
      end
      m = m << lz;
      e = e - $signed({7'd0, lz});
    end

    if (is_nan(a) || is_nan(b)) y = QNAN;
    else if (is_inf(a) && is_inf(bb)) y = (a[31] == bb[31]) ? a : QNAN;
    else if (is_inf(a)) y = a;
    else if (is_inf(bb)) y = bb;
    else if (is_zero(x)) y = {x[31] & z[31], 31'd0};   // both zero
    else if (m == 27'd0) y = 32'd0;                     // exact cancellation
    else y = round_pack(x[31], e, m[26:3], m[2], |m[1:0]);
  end

endmodule
