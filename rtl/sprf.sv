// sprf: scratch pad register file of the cluster.
//
// Holds values shared by all functional units, typically the coefficients
// of a kernel such as the taps of a FIR filter. It has NRD synchronous read
// ports, one per functional-unit input, so that every operand may come from
// the scratch pad in the same clock, and one byte-enabled write port.
// rdata[i] is valid the clock after re[i] and holds while re[i] is low.
// The purpose is the document's; depth (32), the number of read ports and
// the port structure are this design's choices.
module sprf #(
  parameter int unsigned DEPTH = 32,
  parameter int unsigned NRD   = 10,
  localparam int unsigned AW = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [3:0]    wbe,
  input  logic [AW-1:0] waddr,
  input  logic [31:0]   wdata,
  input  logic          re    [NRD],
  input  logic [AW-1:0] raddr [NRD],
  output logic [31:0]   rdata [NRD]
);

  logic [31:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    for (int p = 0; p < NRD; p++)
      if (re[p]) rdata[p] <= mem[raddr[p]];
    for (int i = 0; i < 4; i++)
      if (we && wbe[i]) mem[waddr][8*i +: 8] <= wdata[8*i +: 8];
  end

endmodule
