// data_mem: banked data memory of the ALU cluster IP.
//
// BANKS independent banks of DEPTH 32-bit words (ten banks of 32 words, as
// in the document's ALU cluster: ten 32-bit banks give 320 bits per clock).
// Bank b pairs with IRF bank b: functional unit u reads banks 2u and 2u+1
// for its two operands. Each bank has a synchronous read port (rdata valid
// the clock after re, held while re is low) and a byte-enabled write port.
// The document builds the banks from single-port SRAM macros; this model
// gives each bank a separate read and a write port so that an operand read
// and a result write-back may fall in the same clock (this design's
// choice; a read and a write of one word in one clock return the old word).
module data_mem #(
  parameter int unsigned BANKS = 10,
  parameter int unsigned DEPTH = 32,
  localparam int unsigned AW = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          we    [BANKS],
  input  logic [3:0]    wbe   [BANKS],
  input  logic [AW-1:0] waddr [BANKS],
  input  logic [31:0]   wdata [BANKS],
  input  logic          re    [BANKS],
  input  logic [AW-1:0] raddr [BANKS],
  output logic [31:0]   rdata [BANKS]
);

  logic [31:0] mem [BANKS][DEPTH];

  always_ff @(posedge clk) begin
    for (int b = 0; b < BANKS; b++) begin
      if (re[b]) rdata[b] <= mem[b][raddr[b]];
      for (int i = 0; i < 4; i++)
        if (we[b] && wbe[b][i]) mem[b][waddr[b]][8*i +: 8] <= wdata[b][8*i +: 8];
    end
  end

endmodule
