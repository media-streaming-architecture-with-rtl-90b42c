// tb_fpu_type3: self-checking test of fpu_type3.
//
// Applies one operation per clock (random operands and the operand pairs of
// the published simulation: 256*256, 256-(-0.195), 161.33+161.33,
// -177/-0.707 ...) and checks that each result appears on data_out exactly
// one clock later, bit for bit equal to a double-precision reference rounded
// to single precision.
module tb_fpu_type3;
  import tb_fp_pkg::*;

  logic clk = 1'b0, reset;
  logic [31:0] data_in1, data_in2, data_out;
  
  int checks = 0, failures = 0;

  fpu_type3 dut (.clk, .reset, .data_in1, .data_in2,  .data_out);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] model(input logic [31:0] x, input logic [31:0] y, input logic [2:0] o);
    if (3 == 3) return r2f(f2r(x) / f2r(y));
    case (o)
      3'd0: return r2f(f2r(x) + f2r(y));
      3'd1: return r2f(f2r(x) - f2r(y));
      3'd3: return r2f(f2r(x) * f2r(y));
      3'd7: return (3 == 2) ? r2f(f2r(x) / f2r(y)) : 32'd0;
      default: return 32'd0;
    endcase
  endfunction

  logic [31:0] exp_q;
  logic        exp_v;
  logic [2:0]  o;

  // figure operand pairs: 256, 256 / 256, -0.195 / 161.33, 161.33 / -177, -0.707
  logic [31:0] fa [4] = '{32'h4380_0000, 32'h4380_0000, 32'h4321_547B, 32'hC331_0000};
  logic [31:0] fb [4] = '{32'h4380_0000, 32'hBE47_AE14, 32'h4321_547B, 32'hBF34_FDF4};
  logic [2:0]  fo [4] = '{3'd3, 3'd1, 3'd0, 3'd7};

  initial begin
    reset = 1'b1; exp_v = 1'b0;
    data_in1 = '0; data_in2 = '0; o = '0;
    repeat (2) @(posedge clk);
    reset <= 1'b0;
    for (int i = 0; i < 2004; i++) begin
      @(negedge clk);
      if (exp_v) begin
        checks++;
        if (data_out !== exp_q) begin
          failures++;
          if (failures < 10) $display("MISMATCH out=%h exp=%h", data_out, exp_q);
        end
      end
      if (i < 4) begin
        data_in1 = fa[i]; data_in2 = fb[i]; o = fo[i];
      end else begin
        data_in1 = rand_f(118, 136); data_in2 = rand_f(118, 136);
        case ($urandom_range(4))
          0: o = 3'd0; 1: o = 3'd1; 2: o = 3'd3; 3: o = 3'd7; default: o = 3'd2;
        endcase
      end
      
      exp_q = model(data_in1, data_in2, o);
      exp_v = 1'b1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
