// ahb_agu: address generation unit of the AHB wrapper.
//
// Holds the address of the next memory access of a burst and advances it
// without waiting for the master, so that burst reads can be prefetched.
// load takes the start address, transfer size and burst type of a NONSEQ
// transfer; every step moves addr to the next beat: addr + 2^size for
// incrementing bursts (SINGLE, INCR, INCR4/8/16), and for wrapping bursts
// (WRAP4/8/16) the same increment wrapped inside the block of
// beats * 2^size bytes (a 4-beat word wrap starting at 0x34 gives 0x34,
// 0x38, 0x3C, 0x30). next_addr shows the value the next step will give.
// The burst encodings and the wrap rule are those of AMBA AHB as the
// document lists them; the register interface is this design's.
module ahb_agu
  import mscp_pkg::*;
#(
  parameter int unsigned AW = 14
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          load,
  input  logic [AW-1:0] load_addr,
  input  logic [2:0]    load_size,
  input  hburst_e       load_burst,
  input  logic          step,
  output logic [AW-1:0] addr,
  output logic [AW-1:0] next_addr
);

  logic [2:0] size_q;
  hburst_e    burst_q;
  logic [AW-1:0] incr, mask, sum;

  always_comb begin
    incr = AW'(1) << size_q;
    unique case (burst_q)
      HB_WRAP4:  mask = (AW'(4)  << size_q) - AW'(1);
      HB_WRAP8:  mask = (AW'(8)  << size_q) - AW'(1);
      HB_WRAP16: mask = (AW'(16) << size_q) - AW'(1);
      default:   mask = '1;
    endcase
    sum       = addr + incr;
    next_addr = (addr & ~mask) | (sum & mask);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      addr    <= '0;
      size_q  <= 3'd2;
      burst_q <= HB_SINGLE;
    end else if (load) begin
      addr    <= load_addr;
      size_q  <= load_size;
      burst_q <= load_burst;
    end else if (step) begin
      addr <= next_addr;
    end
  end

endmodule
