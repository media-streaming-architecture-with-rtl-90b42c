// instr_mem: VLIW instruction memory of the ALU cluster IP.
//
// DEPTH words of INSTR_W bits (128 x 142 in the document: four 32-bit and
// one 14-bit segment per word). The cluster reads a whole word per clock
// through the synchronous read port (rdata valid the clock after re, held
// while re is low). The bus writes one segment at a time: wseg selects the
// segment (0..4, segment s is bits 32s+31..32s), wbe the byte lanes of it.
// A read of one segment for the bus is taken from rdata by the caller.
// Size and segmentation follow the document; the port structure is this
// design's choice.
module instr_mem #(
  parameter int unsigned DEPTH   = 128,
  parameter int unsigned INSTR_W = 142,
  localparam int unsigned AW   = $clog2(DEPTH),
  localparam int unsigned NSEG = (INSTR_W + 31) / 32
) (
  input  logic               clk,
  input  logic               we,
  input  logic [2:0]         wseg,
  input  logic [3:0]         wbe,
  input  logic [AW-1:0]      waddr,
  input  logic [31:0]        wdata,
  input  logic               re,
  input  logic [AW-1:0]      raddr,
  output logic [INSTR_W-1:0] rdata
);

  logic [INSTR_W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (re) rdata <= mem[raddr];
    for (int s = 0; s < NSEG; s++)
      for (int i = 0; i < 4; i++)
        if (we && wseg == 3'(s) && wbe[i] && (32*s + 8*i < INSTR_W))
          for (int k = 0; k < 8; k++)
            if (32*s + 8*i + k < INSTR_W)
              mem[waddr][32*s + 8*i + k] <= wdata[8*i + k];
  end

endmodule
