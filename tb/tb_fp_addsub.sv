// tb_fp_addsub: self-checking test of fp_addsub.
//
// Drives random normal single-precision operands (exponents kept close so
// the double-precision reference is exact before its final rounding) and a
// few special cases, and compares every result bit for bit with a reference
// computed in double precision and rounded to single to nearest-even.
module tb_fp_addsub;
  import tb_fp_pkg::*;

  logic [31:0] a, b, y;
  logic sub;
  int checks = 0, failures = 0;

  fp_addsub dut (.a(a), .b(b), .sub(sub), .y(y));

  task automatic chk(input logic [31:0] exp);
    checks++;
    if (y !== exp) begin
      failures++;
      if (failures < 10) $display("MISMATCH a=%h b=%h y=%h exp=%h", a, b, y, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 3000; i++) begin
      a = rand_f(118, 136);
      b = rand_f(118, 136);
      sub = 1'($urandom);
      #1 chk(r2f(sub ? f2r(a) - f2r(b) : f2r(a) + f2r(b)));
    end
    
    // exact cancellation and infinities
    a = 32'h3F80_0000; b = 32'h3F80_0000; sub = 1'b1; #1 chk(32'h0000_0000);
    a = 32'h7F80_0000; b = 32'h7F80_0000; sub = 1'b1; #1 chk(32'h7FC0_0000);
    a = 32'h7F80_0000; b = 32'h3F80_0000; sub = 1'b0; #1 chk(32'h7F80_0000);
    a = 32'h7F7F_FFFF; b = 32'h7F7F_FFFF; sub = 1'b0; #1 chk(32'h7F80_0000);
    a = 32'h4380_0000; b = 32'hBE47_AE14; sub = 1'b1; #1 chk(r2f(256.0 - f2r(32'hBE47_AE14)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
