// tb_alu_unit: self-checking test of alu_unit.
//
// Issues one random operation per clock (all thirteen integer operations,
// FADD/FSUB and NOPs) and checks that each result and its tag come out
// exactly two clocks later, and that a NOP produces no out_valid.
module tb_alu_unit;
  import mscp_pkg::*;
  import tb_fp_pkg::*;

  logic clk = 1'b0, rst_n;
  logic in_valid, out_valid;
  alu_op_e op;
  logic [31:0] a, b, result;
  logic [10:0] in_tag, out_tag;
  int checks = 0, failures = 0;

  alu_unit dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] model(alu_op_e o, logic [31:0] x, logic [31:0] y);
    case (o)
      ALU_ADD: return x + y;
      ALU_SUB: return x - y;
      ALU_ABS: return ($signed(x) < 0) ? -x : x;
      ALU_AND: return x & y;
      ALU_OR:  return x | y;
      ALU_XOR: return x ^ y;
      ALU_NOT: return ~x;
      ALU_SLL: return x << (y % 32);
      ALU_SRL: return x >> (y % 32);
      ALU_SRA: return 32'($signed(x) >>> (y % 32));
      ALU_LT:  return ($signed(x) < $signed(y)) ? 1 : 0;
      ALU_GT:  return ($signed(x) > $signed(y)) ? 1 : 0;
      ALU_EQ:  return (x == y) ? 1 : 0;
      ALU_FADD: return r2f(f2r(x) + f2r(y));
      ALU_FSUB: return r2f(f2r(x) - f2r(y));
      default: return 0;
    endcase
  endfunction

  // expected results in flight: index = clocks since issue
  logic        ev [3];
  logic [31:0] er [3];
  logic [10:0] et [3];

  initial begin
    rst_n = 1'b0; in_valid = 1'b0; op = ALU_NOP; a = '0; b = '0; in_tag = '0;
    for (int i = 0; i < 3; i++) ev[i] = 1'b0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      // check the operation issued two clocks ago
      checks++;
      if (out_valid !== ev[1] || (ev[1] && (result !== er[1] || out_tag !== et[1]))) begin
        failures++;
        if (failures < 10) $display("MISMATCH v=%b/%b r=%h/%h", out_valid, ev[1], result, er[1]);
      end
      ev[1] = ev[0]; er[1] = er[0]; et[1] = et[0];
      op = alu_op_e'($urandom_range(15));
      if (op == ALU_FADD || op == ALU_FSUB) begin
        a = rand_f(120, 130); b = rand_f(120, 130);
      end else begin
        a = $urandom; b = ($urandom_range(3) == 0) ? a : $urandom;
      end
      in_valid = ($urandom_range(7) != 0);
      in_tag = 11'($urandom);
      ev[0] = in_valid && op != ALU_NOP;
      er[0] = model(op, a, b);
      et[0] = in_tag;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
