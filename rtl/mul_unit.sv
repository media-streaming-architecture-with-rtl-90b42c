// mul_unit: four-stage pipelined radix-4 Booth multiplier of the cluster.
//
// Multiplies two signed 32-bit operands. MUL_LO returns bits [31:0] of the
// 64-bit product, MUL_HI bits [63:32]; MUL_FMUL (with FP_EN) returns the
// single-precision product of the operands.
// Stage 1 recodes the multiplier into 16 radix-4 Booth digits (-2..+2) and
// registers the 16 partial products; stage 2 adds them in two groups of
// eight; stage 3 adds the two group sums; stage 4 selects and registers the
// result. A result leaves four clocks after its operands with out_valid and
// the destination tag; a new multiplication may start every clock.
// Booth encoding and the four-stage pipeline follow the document; the
// partial-product grouping, signed operands and the MUL_HI output are this
// design's choices.
module mul_unit
  import mscp_pkg::*;
#(
  parameter int unsigned TAG_W = 11,
  parameter bit          FP_EN = 1'b1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  mul_op_e          op,
  input  logic [31:0]      a,
  input  logic [31:0]      b,
  input  logic [TAG_W-1:0] in_tag,
  output logic             out_valid,
  output logic [31:0]      result,
  output logic [TAG_W-1:0] out_tag
);

  typedef logic [63:0] pp_t;

  // pipeline registers
  logic [3:0]       v;
  mul_op_e          op1, op2, op3;
  logic [TAG_W-1:0] t1, t2, t3;
  logic [31:0]      f1, f2, f3;
  pp_t              pp1 [16];
  pp_t              s2a, s2b;
  pp_t              s3;

  logic [31:0] fp_y;
  pp_t         pp_c [16];
  logic [32:0] bx;
  pp_t         ax;

  fp_mul u_fmul (.a(a), .b(b), .y(fp_y));

  // Booth recoding: digit i looks at b[2i+1], b[2i], b[2i-1]
  always_comb begin
    bx = {b, 1'b0};
    ax = {{32{a[31]}}, a};
    for (int i = 0; i < 16; i++) begin
      unique case (bx[2*i +: 3])
        3'b001, 3'b010: pp_c[i] = ax << (2*i);
        3'b011:         pp_c[i] = ax << (2*i + 1);
        3'b100:         pp_c[i] = (64'd0 - ax) << (2*i + 1);
        3'b101, 3'b110: pp_c[i] = (64'd0 - ax) << (2*i);
        default:        pp_c[i] = 64'd0;
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) v <= '0;
    else        v <= {v[2:0], in_valid && (op != MUL_NOP)};
  end

  always_ff @(posedge clk) begin
    // stage 1
    pp1 <= pp_c;
    op1 <= op;
    t1  <= in_tag;
    f1  <= fp_y;
    // stage 2
    s2a <= pp1[0] + pp1[1] + pp1[2] + pp1[3] + pp1[4] + pp1[5] + pp1[6] + pp1[7];
    s2b <= pp1[8] + pp1[9] + pp1[10] + pp1[11] + pp1[12] + pp1[13] + pp1[14] + pp1[15];
    op2 <= op1;
    t2  <= t1;
    f2  <= f1;
    // stage 3
    s3  <= s2a + s2b;
    op3 <= op2;
    t3  <= t2;
    f3  <= f2;
    // stage 4
    unique case (op3)
      MUL_HI:   result <= s3[63:32];
      MUL_FMUL: result <= FP_EN ? f3 : 32'd0;
      default:  result <= s3[31:0];
    endcase
    out_tag <= t3;
  end

  assign out_valid = v[3];

endmodule
