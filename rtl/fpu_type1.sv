// fpu_type1: floating point unit type 1 - single-precision ADD, SUB, MUL.
//
// The fast FPU of the three variants: addition, subtraction and
// multiplication only, so that these frequent operations can run at a
// higher clock than division. Two 32-bit operands and a 3-bit operation code
// come in; the 32-bit result is registered, so it appears on data_out one
// clock after the operands (one result per clock).
// Operation codes (as in the published simulation waveforms):
//   0 = ADD, 1 = SUB, 3 = MUL; any other code gives +0.
// The set of operations, the port names and the opcode values follow the
// document; the one-cycle registered timing, the active-high synchronous
// reset and the result for unused codes are this design's choices.
module fpu_type1
  import mscp_pkg::*;
(
  input  logic        clk,
  input  logic        reset,
  input  logic [31:0] data_in1,
  input  logic [31:0] data_in2,
  input  logic [2:0]  ops,
  output logic [31:0] data_out
);

  logic [31:0] add_y, mul_y, res;

  fp_addsub u_add (.a(data_in1), .b(data_in2), .sub(ops == FOP_SUB), .y(add_y));
  fp_mul    u_mul (.a(data_in1), .b(data_in2), .y(mul_y));

  always_comb begin
    unique case (ops)
      FOP_ADD, FOP_SUB: res = add_y;
      FOP_MUL:          res = mul_y;
      default:          res = 32'd0;
    endcase
  end

  always_ff @(posedge clk) begin
    if (reset) data_out <= 32'd0;
    else       data_out <= res;
  end

endmodule
