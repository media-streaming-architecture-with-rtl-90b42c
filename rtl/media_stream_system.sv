// media_stream_system: media streaming architecture with homogeneous
// processor cores.
//
// NUM_CLUSTERS identical ALU cluster IPs sit as slaves on one AMBA AHB bus,
// mastered by a host processor outside this module. The host splits a
// stream kernel (for example the 32-point split-radix FFT) across the
// clusters: it loads each cluster's program and data, starts them, and the
// clusters compute in parallel while the bus stays free; results are read
// back once each cluster's alu_work flag shows it is done.
// Cluster i answers the 16 KB window BASE + i*0x4000; an ahb_decoder
// builds the select lines and the response multiplexer.
// Ports: the master side of the AHB bus (32-bit address) and one alu_work
// flag per cluster.
// The three stand-alone floating-point macros (fpu_type1/2/3) stand beside
// the bus with their own ports: they share one operand pair and operation
// code (fpu_a, fpu_b, fpu_ops; fpu_type3 always divides) and each returns
// its registered result one clock later. The document names these macros as
// parts to integrate with the cluster IP but gives no bus or port for them,
// so bringing them out as ports is this design's choice.
// The document evaluates 1, 2, 4 and 8 clusters; the default NUM_CLUSTERS
// is the largest of these. The bus fabric, the base address and the window
// size are this design's choices; the host (an ARM926EJ-S board in the
// document) is not part of this RTL.
module media_stream_system
  import mscp_pkg::*;
#(
  parameter int unsigned NUM_CLUSTERS = 8,
  parameter logic [31:0] BASE         = 32'h4000_0000,
  parameter bit          FP_EN        = 1'b1
) (
  input  logic        HCLK,
  input  logic        HRESETn,
  input  logic [31:0] HADDR,
  input  logic        HWRITE,
  input  logic [1:0]  HTRANS,
  input  logic [2:0]  HSIZE,
  input  logic [2:0]  HBURST,
  input  logic [31:0] HWDATA,
  output logic        HREADY,
  output logic [1:0]  HRESP,
  output logic [31:0] HRDATA,
  output logic [NUM_CLUSTERS-1:0] alu_work,
  // stand-alone FPU macros
  input  logic        fpu_reset,
  input  logic [31:0] fpu_a,
  input  logic [31:0] fpu_b,
  input  logic [2:0]  fpu_ops,
  output logic [31:0] fpu1_out,
  output logic [31:0] fpu2_out,
  output logic [31:0] fpu3_out
);

  logic        hsel     [NUM_CLUSTERS];
  logic        s_hready [NUM_CLUSTERS];
  hresp_e      s_hresp  [NUM_CLUSTERS];
  logic [31:0] s_hrdata [NUM_CLUSTERS];
  hresp_e      hresp_m;

  ahb_decoder #(.NUM_SLAVES(NUM_CLUSTERS), .BASE(BASE), .WIN_BITS(HADDR_W)) u_dec (
    .HCLK, .HRESETn, .HADDR, .HTRANS(htrans_e'(HTRANS)), .HSEL(hsel),
    .S_HREADY(s_hready), .S_HRESP(s_hresp), .S_HRDATA(s_hrdata),
    .HREADY, .HRESP(hresp_m), .HRDATA
  );
  assign HRESP = hresp_m;

  for (genvar i = 0; i < NUM_CLUSTERS; i++) begin : g_cl
    alu_cluster_ip #(.FP_EN(FP_EN)) u_ip (
      .HCLK, .HRESETn, .HSEL(hsel[i]), .HADDR(HADDR[HADDR_W-1:0]),
      .HWRITE, .HTRANS(htrans_e'(HTRANS)), .HSIZE, .HBURST(hburst_e'(HBURST)),
      .HWDATA, .HREADY_in(HREADY), .HREADY(s_hready[i]), .HRESP(s_hresp[i]),
      .HRDATA(s_hrdata[i]), .alu_work(alu_work[i])
    );
  end

  fpu_type1 u_fpu1 (.clk(HCLK), .reset(fpu_reset), .data_in1(fpu_a), .data_in2(fpu_b),
                    .ops(fpu_ops), .data_out(fpu1_out));
  fpu_type2 u_fpu2 (.clk(HCLK), .reset(fpu_reset), .data_in1(fpu_a), .data_in2(fpu_b),
                    .ops(fpu_ops), .data_out(fpu2_out));
  fpu_type3 u_fpu3 (.clk(HCLK), .reset(fpu_reset), .data_in1(fpu_a), .data_in2(fpu_b),
                    .data_out(fpu3_out));

endmodule
