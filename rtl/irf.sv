// irf: one bank of the intra register file (IRF).
//
// Every functional-unit input of the cluster has its own IRF bank, so the
// units get their operand bandwidth locally instead of from global memory.
// A bank has one synchronous read port (rdata is valid the clock after re
// and holds while re is low) and one write port with byte enables (byte
// lane i is bits 8i+7..8i, little endian). A read and a write of the same
// word in one clock return the old word.
// The bank's role is the document's; its depth (32 words, matching the
// 5-bit operand address field of the instruction) and the port structure
// are this design's choices.
module irf #(
  parameter int unsigned DEPTH = 32,
  localparam int unsigned AW = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          we,
  input  logic [3:0]    wbe,
  input  logic [AW-1:0] waddr,
  input  logic [31:0]   wdata,
  input  logic          re,
  input  logic [AW-1:0] raddr,
  output logic [31:0]   rdata
);

  logic [31:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (re) rdata <= mem[raddr];
    for (int i = 0; i < 4; i++)
      if (we && wbe[i]) mem[waddr][8*i +: 8] <= wdata[8*i +: 8];
  end

endmodule
