// tb_mul_unit: self-checking test of mul_unit.
//
// Issues one random multiplication per clock (MUL_LO, MUL_HI, FMUL, NOP)
// with signed operands including extremes, and checks each result and tag
// exactly four clocks later against a 64-bit signed product or a
// double-precision FP reference.
module tb_mul_unit;
  import mscp_pkg::*;
  import tb_fp_pkg::*;

  logic clk = 1'b0, rst_n;
  logic in_valid, out_valid;
  mul_op_e op;
  logic [31:0] a, b, result;
  logic [10:0] in_tag, out_tag;
  int checks = 0, failures = 0;

  mul_unit dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic        ev [5];
  logic [31:0] er [5];
  logic [10:0] et [5];

  function automatic logic [31:0] pick();
    case ($urandom_range(5))
      0: return 32'h8000_0000;
      1: return 32'h7FFF_FFFF;
      2: return 32'hFFFF_FFFF;
      default: return $urandom;
    endcase
  endfunction

  initial begin
    longint p;
    rst_n = 1'b0; in_valid = 1'b0; op = MUL_NOP; a = '0; b = '0; in_tag = '0;
    for (int i = 0; i < 5; i++) ev[i] = 1'b0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      checks++;
      if (out_valid !== ev[3] || (ev[3] && (result !== er[3] || out_tag !== et[3]))) begin
        failures++;
        if (failures < 10) $display("MISMATCH v=%b/%b r=%h/%h", out_valid, ev[3], result, er[3]);
      end
      for (int k = 3; k > 0; k--) begin ev[k] = ev[k-1]; er[k] = er[k-1]; et[k] = et[k-1]; end
      op = mul_op_e'($urandom_range(3));
      if (op == MUL_FMUL) begin a = rand_f(110, 140); b = rand_f(110, 140); end
      else begin a = pick(); b = pick(); end
      in_valid = ($urandom_range(7) != 0);
      in_tag = 11'($urandom);
      p = longint'($signed(a)) * longint'($signed(b));
      ev[0] = in_valid && op != MUL_NOP;
      er[0] = (op == MUL_HI) ? p[63:32] : (op == MUL_FMUL) ? r2f(f2r(a) * f2r(b)) : p[31:0];
      et[0] = in_tag;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
