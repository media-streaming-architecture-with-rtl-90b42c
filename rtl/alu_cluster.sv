// alu_cluster: the VLIW processing core of the ALU cluster IP.
//
// Five functional units work in parallel under one 142-bit instruction:
// two ALUs, two multipliers and one divider. Each unit input has its own
// intra register file (IRF) bank, ten banks in all, so operands come from
// local storage; a scratch pad register file (SPRF) holds shared values such
// as filter coefficients. The controller part of this module reads the
// decoded instruction, selects each operand from the unit's IRF bank, the
// paired data-memory bank, the scratch pad or a 5-bit immediate, starts the
// units, and routes each result to the IRF bank, data-memory bank or
// scratch pad word named by its destination field.
//
// Timing of one instruction, counted from its fetch clock:
//   clock 0 fetch, 1 decode, 2 source selection (register-file and memory
//   reads), 3.. execution (ALU 2, MUL 4, DIV 16 clocks), then write-back at
//   the end of the unit's last clock.
// An ALU result is written in clock 5 (6 clocks in all), a MUL result in
// clock 7 (8 clocks) and a DIV result in clock 19 (20 clocks), as in the
// document. There are no interlocks or forwarding: the program schedule
// must respect these latencies (a value written in clock w can be read by an
// instruction whose source-selection clock is w+1 or later) and must not
// start a division while the divider is busy or let two results target
// the same bank in one clock (the lower-numbered unit would win;
// assertions report both).
//
// Bus side: while the cluster is idle (alu_work high) the AHB wrapper can
// read and write any IRF bank or the scratch pad through the rfb_* port;
// rfb_rdata is valid the clock after rfb_re.
//
// The unit mix, the ten IRF banks, the scratch pad, the PC/decoder,
// controller and the latencies are the document's; the instruction field
// layout, the operand/destination encodings and the unit-to-bank pairing
// are this design's (see mscp_pkg).
module alu_cluster
  import mscp_pkg::*;
#(
  parameter bit FP_EN = 1'b1
) (
  input  logic        clk,
  input  logic        rst_n,
  // control from the AHB wrapper
  input  logic        start,
  input  logic [7:0]  end_val,
  input  logic        abort_req,
  output logic        alu_work,
  output logic        running,
  // instruction memory
  output logic        imem_re,
  output logic [6:0]  imem_addr,
  input  instr_t      imem_rdata,
  // data memory, one port set per bank
  output logic        dmem_re    [NUM_BANKS],
  output logic [4:0]  dmem_raddr [NUM_BANKS],
  input  logic [31:0] dmem_rdata [NUM_BANKS],
  output logic        dmem_we    [NUM_BANKS],
  output logic [4:0]  dmem_waddr [NUM_BANKS],
  output logic [31:0] dmem_wdata [NUM_BANKS],
  // bus access to IRF banks and scratch pad (idle only)
  input  logic        rfb_re,
  input  logic        rfb_we,
  input  logic        rfb_sprf,
  input  logic [3:0]  rfb_bank,
  input  logic [4:0]  rfb_addr,
  input  logic [3:0]  rfb_wbe,
  input  logic [31:0] rfb_wdata,
  output logic [31:0] rfb_rdata
);

  localparam int unsigned TAG_W = $bits(dst_t);

  // ---------------- fetch / decode ----------------
  instr_t dec_instr;
  logic   dec_valid;
  logic   busy;

  pc_decoder #(.DEPTH(IMEM_DEPTH)) u_pc (
    .clk, .rst_n, .start, .end_val, .abort_req, .busy_in(busy),
    .imem_re, .imem_addr, .imem_rdata,
    .dec_instr, .dec_valid, .running, .alu_work
  );

  // slot bodies in unit order
  slot_body_t body [NUM_UNITS];
  assign body[U_ALU0] = dec_instr.alu0.body;
  assign body[U_ALU1] = dec_instr.alu1.body;
  assign body[U_MUL0] = dec_instr.mul0.body;
  assign body[U_MUL1] = dec_instr.mul1.body;
  assign body[U_DIV]  = dec_instr.div.body;

  // ---------------- source selection ----------------
  src_t        src [NUM_BANKS];
  logic        irf_re    [NUM_BANKS];
  logic [4:0]  irf_raddr [NUM_BANKS];
  logic [31:0] irf_rdata [NUM_BANKS];
  logic        irf_we    [NUM_BANKS];
  logic [3:0]  irf_wbe   [NUM_BANKS];
  logic [4:0]  irf_waddr [NUM_BANKS];
  logic [31:0] irf_wdata [NUM_BANKS];
  logic        sp_re     [NUM_BANKS];
  logic [4:0]  sp_raddr  [NUM_BANKS];
  logic [31:0] sp_rdata  [NUM_BANKS];
  logic        sp_we;
  logic [3:0]  sp_wbe;
  logic [4:0]  sp_waddr;
  logic [31:0] sp_wdata;

  always_comb begin
    for (int k = 0; k < NUM_BANKS; k++) begin
      src[k]        = (k % 2 == 0) ? body[k/2].a : body[k/2].b;
      irf_re[k]     = dec_valid && (src[k].sel == SRC_IRF);
      irf_raddr[k]  = src[k].addr;
      dmem_re[k]    = dec_valid && (src[k].sel == SRC_DMEM);
      dmem_raddr[k] = src[k].addr;
      sp_re[k]      = dec_valid && (src[k].sel == SRC_SPRF);
      sp_raddr[k]   = src[k].addr;
    end
    // bus reads (only while idle)
    if (rfb_re && !rfb_sprf && rfb_bank < 4'(NUM_BANKS)) begin
      irf_re[rfb_bank]    = 1'b1;
      irf_raddr[rfb_bank] = rfb_addr;
    end
    if (rfb_re && rfb_sprf) begin
      sp_re[0]    = 1'b1;
      sp_raddr[0] = rfb_addr;
    end
  end

  // execute-stage registers
  logic       ex_valid;
  src_sel_e   ex_sel [NUM_BANKS];
  logic [4:0] ex_imm [NUM_BANKS];
  dst_t       ex_dst [NUM_UNITS];
  alu_op_e    ex_alu_op [2];
  mul_op_e    ex_mul_op [2];
  div_op_e    ex_div_op;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) ex_valid <= 1'b0;
    else        ex_valid <= dec_valid && !abort_req;
  end

  always_ff @(posedge clk) begin
    for (int k = 0; k < NUM_BANKS; k++) begin
      ex_sel[k] <= src[k].sel;
      ex_imm[k] <= src[k].addr;
    end
    for (int u = 0; u < NUM_UNITS; u++) ex_dst[u] <= body[u].dst;
    ex_alu_op[0] <= dec_instr.alu0.op;
    ex_alu_op[1] <= dec_instr.alu1.op;
    ex_mul_op[0] <= dec_instr.mul0.op;
    ex_mul_op[1] <= dec_instr.mul1.op;
    ex_div_op    <= dec_instr.div.op;
  end

  logic [31:0] opnd [NUM_BANKS];
  always_comb begin
    for (int k = 0; k < NUM_BANKS; k++) begin
      unique case (ex_sel[k])
        SRC_IRF:  opnd[k] = irf_rdata[k];
        SRC_DMEM: opnd[k] = dmem_rdata[k];
        SRC_SPRF: opnd[k] = sp_rdata[k];
        default:  opnd[k] = {27'd0, ex_imm[k]};
      endcase
    end
  end

  // ---------------- functional units ----------------
  logic             wb_v   [NUM_UNITS];
  logic [31:0]      wb_res [NUM_UNITS];
  logic [TAG_W-1:0] wb_tag [NUM_UNITS];
  logic             div_busy;

  for (genvar g = 0; g < 2; g++) begin : g_alu
    alu_unit #(.TAG_W(TAG_W), .FP_EN(FP_EN)) u_alu (
      .clk, .rst_n, .in_valid(ex_valid), .op(ex_alu_op[g]),
      .a(opnd[2*g]), .b(opnd[2*g+1]), .in_tag(ex_dst[g]),
      .out_valid(wb_v[g]), .result(wb_res[g]), .out_tag(wb_tag[g])
    );
  end

  for (genvar g = 0; g < 2; g++) begin : g_mul
    mul_unit #(.TAG_W(TAG_W), .FP_EN(FP_EN)) u_mul (
      .clk, .rst_n, .in_valid(ex_valid), .op(ex_mul_op[g]),
      .a(opnd[2*(g+2)]), .b(opnd[2*(g+2)+1]), .in_tag(ex_dst[g+2]),
      .out_valid(wb_v[g+2]), .result(wb_res[g+2]), .out_tag(wb_tag[g+2])
    );
  end

  div_unit #(.TAG_W(TAG_W), .FP_EN(FP_EN)) u_div (
    .clk, .rst_n, .in_valid(ex_valid), .op(ex_div_op),
    .a(opnd[2*U_DIV]), .b(opnd[2*U_DIV+1]), .in_tag(ex_dst[U_DIV]),
    .busy(div_busy), .out_valid(wb_v[U_DIV]), .result(wb_res[U_DIV]),
    .out_tag(wb_tag[U_DIV])
  );

  // drain counter: clocks until the last issued operation has written back
  logic [4:0] drain, lat;
  always_comb begin
    lat = 5'd0;
    if (ex_valid) begin
      if (ex_alu_op[0] != ALU_NOP || ex_alu_op[1] != ALU_NOP) lat = 5'(ALU_LAT);
      if (ex_mul_op[0] != MUL_NOP || ex_mul_op[1] != MUL_NOP) lat = 5'(MUL_LAT);
      if (ex_div_op != DIV_NOP) lat = 5'(DIV_LAT);
    end
  end
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) drain <= '0;
    else if (lat > drain - 5'(drain != 0)) drain <= lat;
    else if (drain != 0) drain <= drain - 5'd1;
  end
  assign busy = ex_valid || (drain != 0) || div_busy;

  // ---------------- write-back routing ----------------
  dst_t wdst [NUM_UNITS];
  always_comb begin
    for (int u = 0; u < NUM_UNITS; u++) wdst[u] = dst_t'(wb_tag[u]);
    for (int b = 0; b < NUM_BANKS; b++) begin
      irf_we[b] = 1'b0;  irf_wbe[b] = 4'hF;  irf_waddr[b] = '0;  irf_wdata[b] = '0;
      dmem_we[b] = 1'b0; dmem_waddr[b] = '0; dmem_wdata[b] = '0;
      for (int u = NUM_UNITS - 1; u >= 0; u--) begin
        if (wb_v[u] && wdst[u].bank == 4'(b)) begin
          if (wdst[u].sel == DST_IRF) begin
            irf_we[b] = 1'b1; irf_waddr[b] = wdst[u].addr; irf_wdata[b] = wb_res[u];
          end
          if (wdst[u].sel == DST_DMEM) begin
            dmem_we[b] = 1'b1; dmem_waddr[b] = wdst[u].addr; dmem_wdata[b] = wb_res[u];
          end
        end
      end
    end
    sp_we = 1'b0; sp_wbe = 4'hF; sp_waddr = '0; sp_wdata = '0;
    for (int u = NUM_UNITS - 1; u >= 0; u--) begin
      if (wb_v[u] && wdst[u].sel == DST_SPRF) begin
        sp_we = 1'b1; sp_waddr = wdst[u].addr; sp_wdata = wb_res[u];
      end
    end
    // bus writes (only while idle)
    if (rfb_we && !rfb_sprf && rfb_bank < 4'(NUM_BANKS)) begin
      irf_we[rfb_bank] = 1'b1; irf_wbe[rfb_bank] = rfb_wbe;
      irf_waddr[rfb_bank] = rfb_addr; irf_wdata[rfb_bank] = rfb_wdata;
    end
    if (rfb_we && rfb_sprf) begin
      sp_we = 1'b1; sp_wbe = rfb_wbe; sp_waddr = rfb_addr; sp_wdata = rfb_wdata;
    end
  end

  // ---------------- storage ----------------
  for (genvar k = 0; k < NUM_BANKS; k++) begin : g_irf
    irf #(.DEPTH(BANK_DEPTH)) u_irf (
      .clk, .we(irf_we[k]), .wbe(irf_wbe[k]), .waddr(irf_waddr[k]),
      .wdata(irf_wdata[k]), .re(irf_re[k]), .raddr(irf_raddr[k]),
      .rdata(irf_rdata[k])
    );
  end

  sprf #(.DEPTH(SPRF_DEPTH), .NRD(NUM_BANKS)) u_sprf (
    .clk, .we(sp_we), .wbe(sp_wbe), .waddr(sp_waddr), .wdata(sp_wdata),
    .re(sp_re), .raddr(sp_raddr), .rdata(sp_rdata)
  );

  // bus read data
  logic       rfb_sprf_q;
  logic [3:0] rfb_bank_q;
  always_ff @(posedge clk) begin
    if (rfb_re) begin
      rfb_sprf_q <= rfb_sprf;
      rfb_bank_q <= rfb_bank;
    end
  end
  assign rfb_rdata = rfb_sprf_q ? sp_rdata[0] :
                     (rfb_bank_q < 4'(NUM_BANKS)) ? irf_rdata[rfb_bank_q] : 32'd0;

  // ---------------- schedule checks ----------------
  function automatic int unsigned n_writers(input int b, input dst_sel_e s);
    int unsigned n = 0;
    for (int u = 0; u < NUM_UNITS; u++)
      if (wb_v[u] && wdst[u].sel == s && (s == DST_SPRF || wdst[u].bank == 4'(b))) n++;
    return n;
  endfunction

  always_ff @(posedge clk) begin
    if (rst_n) begin
      for (int b = 0; b < NUM_BANKS; b++) begin
        a_irf_one_writer:  assert (n_writers(b, DST_IRF) <= 1)
          else $error("alu_cluster: two results to IRF bank %0d in one clock", b);
        a_dmem_one_writer: assert (n_writers(b, DST_DMEM) <= 1)
          else $error("alu_cluster: two results to data bank %0d in one clock", b);
      end
      a_sprf_one_writer: assert (n_writers(0, DST_SPRF) <= 1)
        else $error("alu_cluster: two results to the scratch pad in one clock");
    end
  end

endmodule
