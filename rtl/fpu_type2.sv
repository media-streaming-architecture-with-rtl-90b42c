// fpu_type2: floating point unit type 2 - single-precision ADD, SUB, MUL, DIV.
//
// The general-purpose FPU variant that holds all four operations in one
// unit, for workloads whose operations are evenly spread. Two 32-bit
// operands and a 3-bit operation code come in; the result is registered and
// appears on data_out one clock later (one result per clock).
// Operation codes (as in the published simulation waveforms):
//   0 = ADD, 1 = SUB, 3 = MUL, 7 = DIV; any other code gives +0.
// The operation set, port names and codes follow the document; the timing,
// reset and unused-code result are this design's choices.
module fpu_type2
  import mscp_pkg::*;
(
  input  logic        clk,
  input  logic        reset,
  input  logic [31:0] data_in1,
  input  logic [31:0] data_in2,
  input  logic [2:0]  ops,
  output logic [31:0] data_out
);

  logic [31:0] add_y, mul_y, div_y, res;

  fp_addsub u_add (.a(data_in1), .b(data_in2), .sub(ops == FOP_SUB), .y(add_y));
  fp_mul    u_mul (.a(data_in1), .b(data_in2), .y(mul_y));
  fp_div    u_div (.a(data_in1), .b(data_in2), .y(div_y));

  always_comb begin
    unique case (ops)
      FOP_ADD, FOP_SUB: res = add_y;
      FOP_MUL:          res = mul_y;
      FOP_DIV:          res = div_y;
      default:          res = 32'd0;
    endcase
  end

  always_ff @(posedge clk) begin
    if (reset) data_out <= 32'd0;
    else       data_out <= res;
  end

endmodule
