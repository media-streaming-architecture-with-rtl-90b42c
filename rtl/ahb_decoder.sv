// ahb_decoder: central AHB address decoder and slave response multiplexer.
//
// In the AHB interconnect every slave sees the same address and control
// signals; this block decodes the high-order address bits into one select
// line per slave (HSELx) and routes the response (HREADY, HRESP, HRDATA) of
// the slave that owns the current data phase back to the master. Slave i
// owns the WINDOW-byte region starting at BASE + i*WINDOW. The select of the
// data phase is registered when HREADY is high, i.e. when an address phase
// completes. Addresses outside all regions go to a built-in default slave
// that answers NONSEQ/SEQ transfers with a two-clock ERROR response and
// IDLE/BUSY with a zero-wait OKAY.
// The decoder and multiplexer roles come from the AMBA AHB overview in the
// document; BASE, WINDOW (16 KB, the reach of the IP's 14-bit address) and
// the default slave are this design's choices.
module ahb_decoder
  import mscp_pkg::*;
#(
  parameter int unsigned NUM_SLAVES = 8,
  parameter logic [31:0] BASE       = 32'h4000_0000,
  parameter int unsigned WIN_BITS   = 14,
  localparam int unsigned SW = (NUM_SLAVES > 1) ? $clog2(NUM_SLAVES) : 1
) (
  input  logic        HCLK,
  input  logic        HRESETn,
  input  logic [31:0] HADDR,
  input  htrans_e     HTRANS,
  output logic        HSEL     [NUM_SLAVES],
  input  logic        S_HREADY [NUM_SLAVES],
  input  hresp_e      S_HRESP  [NUM_SLAVES],
  input  logic [31:0] S_HRDATA [NUM_SLAVES],
  output logic        HREADY,
  output hresp_e      HRESP,
  output logic [31:0] HRDATA
);

  logic [31:0] off;
  logic        hit;
  logic [SW-1:0] idx;
  logic        dp_hit;
  logic [SW-1:0] dp_idx;
  logic [1:0]  def_ph;   // default slave ERROR phases

  always_comb begin
    off = HADDR - BASE;
    hit = (HADDR >= BASE) && ((off >> WIN_BITS) < NUM_SLAVES);
    idx = SW'(off >> WIN_BITS);
    for (int i = 0; i < NUM_SLAVES; i++) HSEL[i] = hit && (idx == SW'(i));
  end

  always_ff @(posedge HCLK or negedge HRESETn) begin
    if (!HRESETn) begin
      dp_hit <= 1'b0;
      dp_idx <= '0;
      def_ph <= 2'd0;
    end else begin
      if (def_ph == 2'd1) def_ph <= 2'd2;
      else if (def_ph == 2'd2) def_ph <= 2'd0;
      if (HREADY) begin
        dp_hit <= hit;
        dp_idx <= idx;
        if (!hit && (HTRANS == HT_NONSEQ || HTRANS == HT_SEQ)) def_ph <= 2'd1;
      end
    end
  end

  always_comb begin
    if (dp_hit) begin
      HREADY = S_HREADY[dp_idx];
      HRESP  = S_HRESP[dp_idx];
      HRDATA = S_HRDATA[dp_idx];
    end else begin
      HREADY = (def_ph != 2'd1);
      HRESP  = (def_ph != 2'd0) ? HR_ERROR : HR_OKAY;
      HRDATA = 32'd0;
    end
  end

endmodule
