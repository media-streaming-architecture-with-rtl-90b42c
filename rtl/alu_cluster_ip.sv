// alu_cluster_ip: one processing element of the media streaming system.
//
// An AHB slave that holds a five-unit VLIW ALU cluster, its 128 x 142-bit
// instruction memory and its ten-bank data memory. The host loads program,
// data, IRF contents and scratch-pad coefficients over the bus, writes the
// end PC to START, and the cluster then runs on its own while the bus is
// free for other work; accesses during the run get RETRY, an ABORT write
// stops it. When the cluster is done the results are read back over the bus.
// The floating point extension (FP_EN) adds single-precision FADD/FSUB to
// the ALUs, FMUL to the multipliers and FDIV to the divider.
//
// Bus interface: AHB slave signals as in the AMBA 2.0 specification with a
// 14-bit byte address (see mscp_pkg for the address map); HREADY_in is the
// bus-wide HREADY, HREADY/HRESP/HRDATA are this slave's response. Reads cost
// two wait states for the first beat of a burst and none for the following
// SEQ beats; writes have no wait states.
//
// Structure (wrapper, cluster, instruction memory, data memory) follows the
// document. Between wrapper and memories this module decodes the bus byte
// address into region, bank and word and hands each memory to the cluster
// while it runs and to the bus otherwise. The taped-out chip used an
// external MRAM as data memory with a load/store unit; this module holds the
// on-chip banked data memory of the cluster instead.
module alu_cluster_ip
  import mscp_pkg::*;
#(
  parameter bit FP_EN = 1'b1
) (
  input  logic        HCLK,
  input  logic        HRESETn,
  input  logic        HSEL,
  input  logic [13:0] HADDR,
  input  logic        HWRITE,
  input  htrans_e     HTRANS,
  input  logic [2:0]  HSIZE,
  input  hburst_e     HBURST,
  input  logic [31:0] HWDATA,
  input  logic        HREADY_in,
  output logic        HREADY,
  output hresp_e      HRESP,
  output logic [31:0] HRDATA,
  output logic        alu_work
);

  // wrapper <-> memories
  logic        mem_re, mem_we;
  logic [13:0] mem_raddr, mem_waddr;
  logic [3:0]  mem_wbe;
  logic [31:0] mem_wdata, mem_rdata;
  logic        start, abort_req, running;
  logic [7:0]  end_val;

  ahb_wrapper u_wrap (
    .HCLK, .HRESETn, .HSEL, .HADDR, .HWRITE, .HTRANS, .HSIZE, .HBURST,
    .HWDATA, .HREADY_in, .HREADY, .HRESP, .HRDATA,
    .mem_re, .mem_raddr, .mem_rdata, .mem_we, .mem_waddr, .mem_wbe, .mem_wdata,
    .start, .end_val, .abort_req, .alu_work
  );

  // cluster
  logic        c_imem_re;
  logic [6:0]  c_imem_addr;
  instr_t      imem_rdata;
  logic        c_dm_re    [NUM_BANKS];
  logic [4:0]  c_dm_raddr [NUM_BANKS];
  logic        c_dm_we    [NUM_BANKS];
  logic [4:0]  c_dm_waddr [NUM_BANKS];
  logic [31:0] c_dm_wdata [NUM_BANKS];
  logic [31:0] dm_rdata   [NUM_BANKS];
  logic        rfb_re, rfb_we, rfb_sprf;
  logic [3:0]  rfb_bank;
  logic [4:0]  rfb_addr;
  logic [31:0] rfb_rdata;

  alu_cluster #(.FP_EN(FP_EN)) u_cluster (
    .clk(HCLK), .rst_n(HRESETn), .start, .end_val, .abort_req, .alu_work,
    .running,
    .imem_re(c_imem_re), .imem_addr(c_imem_addr), .imem_rdata,
    .dmem_re(c_dm_re), .dmem_raddr(c_dm_raddr), .dmem_rdata(dm_rdata),
    .dmem_we(c_dm_we), .dmem_waddr(c_dm_waddr), .dmem_wdata(c_dm_wdata),
    .rfb_re, .rfb_we, .rfb_sprf, .rfb_bank, .rfb_addr,
    .rfb_wbe(mem_wbe), .rfb_wdata(mem_wdata), .rfb_rdata
  );

  // bus address decode
  region_e rgn_r, rgn_w, rgn_q;
  logic [2:0] seg_q;
  logic [3:0] bank_q;

  assign rgn_r = mem_re ? decode_region(mem_raddr) : RGN_BAD;
  assign rgn_w = mem_we ? decode_region(mem_waddr) : RGN_BAD;

  // instruction memory
  logic       im_re, im_we;
  logic [6:0] im_raddr;
  logic [INSTR_W-1:0] im_rdata;

  assign im_re    = c_imem_re || (rgn_r == RGN_IMEM);
  assign im_raddr = c_imem_re ? c_imem_addr : mem_raddr[11:5];
  assign im_we    = (rgn_w == RGN_IMEM);
  assign imem_rdata = instr_t'(im_rdata);

  instr_mem #(.DEPTH(IMEM_DEPTH), .INSTR_W(INSTR_W)) u_imem (
    .clk(HCLK), .we(im_we), .wseg(mem_waddr[4:2]), .wbe(mem_wbe),
    .waddr(mem_waddr[11:5]), .wdata(mem_wdata),
    .re(im_re), .raddr(im_raddr), .rdata(im_rdata)
  );

  // data memory
  logic        dm_re    [NUM_BANKS];
  logic [4:0]  dm_raddr [NUM_BANKS];
  logic        dm_we    [NUM_BANKS];
  logic [3:0]  dm_wbe   [NUM_BANKS];
  logic [4:0]  dm_waddr [NUM_BANKS];
  logic [31:0] dm_wdata [NUM_BANKS];

  always_comb begin
    for (int b = 0; b < NUM_BANKS; b++) begin
      dm_re[b]    = c_dm_re[b];
      dm_raddr[b] = c_dm_raddr[b];
      dm_we[b]    = c_dm_we[b];
      dm_wbe[b]   = 4'hF;
      dm_waddr[b] = c_dm_waddr[b];
      dm_wdata[b] = c_dm_wdata[b];
      if (rgn_r == RGN_DMEM && mem_raddr[10:7] == 4'(b)) begin
        dm_re[b]    = 1'b1;
        dm_raddr[b] = mem_raddr[6:2];
      end
      if (rgn_w == RGN_DMEM && mem_waddr[10:7] == 4'(b)) begin
        dm_we[b]    = 1'b1;
        dm_wbe[b]   = mem_wbe;
        dm_waddr[b] = mem_waddr[6:2];
        dm_wdata[b] = mem_wdata;
      end
    end
  end

  data_mem #(.BANKS(NUM_BANKS), .DEPTH(BANK_DEPTH)) u_dmem (
    .clk(HCLK), .we(dm_we), .wbe(dm_wbe), .waddr(dm_waddr), .wdata(dm_wdata),
    .re(dm_re), .raddr(dm_raddr), .rdata(dm_rdata)
  );

  // IRF / scratch pad bus port
  assign rfb_re   = (rgn_r == RGN_IRF) || (rgn_r == RGN_SPRF);
  assign rfb_we   = (rgn_w == RGN_IRF) || (rgn_w == RGN_SPRF);
  assign rfb_sprf = rfb_we ? (rgn_w == RGN_SPRF) : (rgn_r == RGN_SPRF);
  assign rfb_bank = rfb_we ? mem_waddr[10:7] : mem_raddr[10:7];
  assign rfb_addr = rfb_we ? mem_waddr[6:2]  : mem_raddr[6:2];

  // read data return
  always_ff @(posedge HCLK or negedge HRESETn) begin
    if (!HRESETn) begin
      rgn_q  <= RGN_BAD;
      seg_q  <= '0;
      bank_q <= '0;
    end else if (mem_re) begin
      rgn_q  <= rgn_r;
      seg_q  <= mem_raddr[4:2];
      bank_q <= mem_raddr[10:7];
    end
  end

  always_comb begin
    unique case (rgn_q)
      RGN_IMEM: begin
        unique case (seg_q)
          3'd0:    mem_rdata = im_rdata[31:0];
          3'd1:    mem_rdata = im_rdata[63:32];
          3'd2:    mem_rdata = im_rdata[95:64];
          3'd3:    mem_rdata = im_rdata[127:96];
          default: mem_rdata = {18'd0, im_rdata[141:128]};
        endcase
      end
      RGN_DMEM: mem_rdata = (bank_q < 4'(NUM_BANKS)) ? dm_rdata[bank_q] : 32'd0;
      RGN_IRF, RGN_SPRF: mem_rdata = rfb_rdata;
      default: mem_rdata = 32'd0;
    endcase
  end

  // the bus only reaches the memories while the cluster is idle
  a_no_bus_while_running: assert property (@(posedge HCLK) disable iff (!HRESETn)
    running |-> !(rgn_w inside {RGN_IMEM, RGN_DMEM, RGN_IRF, RGN_SPRF}))
    else $error("alu_cluster_ip: bus write while the cluster runs");

endmodule
