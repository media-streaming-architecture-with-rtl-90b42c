// alu_unit: two-stage pipelined ALU of the cluster.
//
// Executes the thirteen integer operations ADD, SUB, ABS, AND, OR, XOR,
// NOT, SLL, SRL, SRA, LT, GT, EQ on 32-bit operands, plus single-precision
// FADD/FSUB when FP_EN is set (the floating-point extension of the cluster).
// ABS and NOT use operand a only; shifts take the amount from b[4:0];
// LT/GT/EQ compare as signed numbers and return 1 or 0.
// Timing: operands, opcode and a destination tag enter with in_valid; the
// result leaves two clocks later with out_valid and the same tag, one new
// operation may start every clock. The operation list and the two-stage
// pipeline follow the document. The document's ALU uses a two-stage
// carry-lookahead adder; here stage 1 computes the result (the adder is
// left to synthesis) and stage 2 is a plain register, which keeps the
// document's latency. Opcode values, signed comparisons and NOP (no
// out_valid) are this design's choices.
module alu_unit
  import mscp_pkg::*;
#(
  parameter int unsigned TAG_W = 11,
  parameter bit          FP_EN = 1'b1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  alu_op_e          op,
  input  logic [31:0]      a,
  input  logic [31:0]      b,
  input  logic [TAG_W-1:0] in_tag,
  output logic             out_valid,
  output logic [31:0]      result,
  output logic [TAG_W-1:0] out_tag
);

  logic [31:0]      res_c, fp_y;
  logic             v1;
  logic [31:0]      r1;
  logic [TAG_W-1:0] t1;

  fp_addsub u_fadd (.a(a), .b(b), .sub(op == ALU_FSUB), .y(fp_y));

  always_comb begin
    unique case (op)
      ALU_ADD:  res_c = a + b;
      ALU_SUB:  res_c = a - b;
      ALU_ABS:  res_c = a[31] ? (32'd0 - a) : a;
      ALU_AND:  res_c = a & b;
      ALU_OR:   res_c = a | b;
      ALU_XOR:  res_c = a ^ b;
      ALU_NOT:  res_c = ~a;
      ALU_SLL:  res_c = a << b[4:0];
      ALU_SRL:  res_c = a >> b[4:0];
      ALU_SRA:  res_c = $unsigned($signed(a) >>> b[4:0]);
      ALU_LT:   res_c = {31'd0, $signed(a) < $signed(b)};
      ALU_GT:   res_c = {31'd0, $signed(a) > $signed(b)};
      ALU_EQ:   res_c = {31'd0, a == b};
      ALU_FADD, ALU_FSUB: res_c = FP_EN ? fp_y : 32'd0;
      default:  res_c = 32'd0;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v1 <= 1'b0;
      out_valid <= 1'b0;
    end else begin
      v1 <= in_valid && (op != ALU_NOP);
      out_valid <= v1;
    end
  end

  always_ff @(posedge clk) begin
    r1 <= res_c;
    t1 <= in_tag;
    result <= r1;
    out_tag <= t1;
  end

endmodule
