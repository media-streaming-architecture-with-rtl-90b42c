// fpu_type3: floating point unit type 3 - single-precision DIV only.
//
// The division-only FPU, meant to sit beside a type 1 unit so that the pair
// offers the operations of type 2 while the rare division runs on its own,
// slower clock. It computes data_in1 / data_in2; the result is registered
// and appears on data_out one clock after the operands (one result per
// clock). There is no operation code. The function and port names follow
// the document; timing and reset are this design's choices.
module fpu_type3 (
  input  logic        clk,
  input  logic        reset,
  input  logic [31:0] data_in1,
  input  logic [31:0] data_in2,
  output logic [31:0] data_out
);

  logic [31:0] div_y;

  fp_div u_div (.a(data_in1), .b(data_in2), .y(div_y));

  always_ff @(posedge clk) begin
    if (reset) data_out <= 32'd0;
    else       data_out <= div_y;
  end

endmodule
