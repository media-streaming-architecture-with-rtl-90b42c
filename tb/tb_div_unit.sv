// tb_div_unit: self-checking test of div_unit.
//
// Runs random unsigned divisions (quotient and remainder, including
// division by zero), integer square roots and FP divisions one after the
// other and checks the result, the tag and that out_valid rises exactly 16
// clocks after the operation was issued, with busy high in between.
module tb_div_unit;
  import mscp_pkg::*;
  import tb_fp_pkg::*;

  logic clk = 1'b0, rst_n;
  logic in_valid, out_valid, busy;
  div_op_e op;
  logic [31:0] a, b, result;
  logic [10:0] in_tag, out_tag;
  int checks = 0, failures = 0;

  div_unit dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] isqrt(logic [31:0] x);
    longint unsigned r = 0;
    while ((r + 1) * (r + 1) <= longint'(x)) r++;
    return 32'(r);
  endfunction

  initial begin
    logic [31:0] exp_r;
    int lat;
    rst_n = 1'b0; in_valid = 1'b0; op = DIV_NOP; a = '0; b = '0; in_tag = '0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 1500; i++) begin
      @(negedge clk);
      op = div_op_e'(1 + $urandom_range(3));
      case (op)
        DIV_FDIV: begin a = rand_f(110, 140); b = rand_f(110, 140); end
        DIV_SQRT: begin a = (i % 3 == 0) ? 32'hFFFF_FFFF : $urandom; b = $urandom; end
        default: begin
          a = $urandom;
          case ($urandom_range(3))
            0: b = 0;
            1: b = $urandom_range(1000);
            default: b = $urandom >> $urandom_range(31);
          endcase
        end
      endcase
      case (op)
        DIV_QUO:  exp_r = (b == 0) ? 32'hFFFF_FFFF : a / b;
        DIV_REM:  exp_r = (b == 0) ? a : a % b;
        DIV_SQRT: exp_r = isqrt(a);
        default:  exp_r = r2f(f2r(a) / f2r(b));
      endcase
      in_valid = 1'b1;
      in_tag = 11'(i);
      lat = 0;
      @(negedge clk);
      in_valid = 1'b0;
      op = DIV_NOP;
      lat = 1;
      while (!out_valid && lat < 40) begin
        if (!busy) begin failures++; $display("busy low while working"); end
        @(negedge clk);
        lat++;
      end
      checks++;
      if (lat != 16 || result !== exp_r || out_tag !== 11'(i)) begin
        failures++;
        if (failures < 10) $display("MISMATCH op=%0d a=%h b=%h r=%h exp=%h lat=%0d", op, a, b, result, exp_r, lat);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
