// fp_pkg: helpers shared by the IEEE 754 single-precision units.
//
// All FP units of this design handle the single-precision format (1 sign,
// 8 exponent, 23 fraction bits, bias 127). Choices of this design, not of a
// standard: denormal inputs are read as zero and results that would be
// denormal are flushed to a signed zero; every NaN result is the quiet NaN
// 0x7FC00000; rounding is round-to-nearest-even.
package fp_pkg;

  localparam logic [31:0] QNAN = 32'h7FC0_0000;

  function automatic logic is_nan(input logic [31:0] x);
    return (x[30:23] == 8'hFF) && (x[22:0] != 23'd0);
  endfunction

  function automatic logic is_inf(input logic [31:0] x);
    return (x[30:23] == 8'hFF) && (x[22:0] == 23'd0);
  endfunction

  // zero or denormal (denormals are flushed)
  function automatic logic is_zero(input logic [31:0] x);
    return x[30:23] == 8'd0;
  endfunction

  // Round a normalised 24-bit significand (hidden bit set) with guard bit g
  // and sticky bit st to nearest-even, then pack with the signed biased
  // exponent e. Overflow gives infinity, underflow gives zero.
  function automatic logic [31:0] round_pack(input logic s,
                                              input logic signed [11:0] e,
                                              input logic [23:0] m,
                                              input logic g,
                                              input logic st);
    logic [24:0] mr;
    logic signed [11:0] er;
    logic up;
    up = g & (st | m[0]);
    mr = {1'b0, m} + {24'd0, up};
    er = e;
    if (mr[24]) begin
      mr = mr >> 1;
      er = e + 12'sd1;
    end
    if (er >= 12'sd255) return {s, 8'hFF, 23'd0};
    else if (er <= 12'sd0) return {s, 31'd0};
    else return {s, er[7:0], mr[22:0]};
  endfunction

endpackage
