// pc_decoder: program counter (Pc_counter) and instruction decoder of the
// ALU cluster.
//
// Because the IP must run while the host owns the bus, the cluster feeds
// its own instruction addresses: after start the PC begins at 0 and rises
// by one every clock; each clock the PC is compared with the end value and
// fetching stops once PC >= end, so the program is words 0 .. end-1 of the
// instruction memory. abort_req clears the end value, which stops fetching at
// once, and drops the instructions already fetched (the escape from a hung
// program). alu_work is high when no program is running and nothing is left
// in the cluster's pipelines (busy_in low): the job is finished and the IP
// may be accessed again.
// Pipeline: clock 0 fetch (imem_re, imem_addr = PC), clock 1 the word
// arrives on imem_rdata and is decoded into the registered dec_instr /
// dec_valid, which the controller uses for operand selection in clock 2.
// The PC, the end-value comparison, alu_work and abort_req are the document's;
// the exclusive end (PC < end) and the flush on abort_req are this design's
// choices.
module pc_decoder
  import mscp_pkg::*;
#(
  parameter int unsigned DEPTH = 128,
  localparam int unsigned AW = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [AW:0]   end_val,
  input  logic          abort_req,
  input  logic          busy_in,
  output logic          imem_re,
  output logic [AW-1:0] imem_addr,
  input  instr_t        imem_rdata,
  output instr_t        dec_instr,
  output logic          dec_valid,
  output logic          running,
  output logic          alu_work
);

  logic [AW:0] pc, end_q;
  logic        f_valid;

  assign running   = (pc < end_q);
  assign imem_re   = running;
  assign imem_addr = pc[AW-1:0];
  assign alu_work  = !running && !f_valid && !dec_valid && !busy_in;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pc        <= '0;
      end_q     <= '0;
      f_valid   <= 1'b0;
      dec_valid <= 1'b0;
    end else if (abort_req) begin
      end_q     <= '0;
      f_valid   <= 1'b0;
      dec_valid <= 1'b0;
    end else begin
      if (start) begin
        pc    <= '0;
        end_q <= end_val;
      end else if (running) begin
        pc <= pc + 1'b1;
      end
      f_valid   <= running && !start;
      dec_valid <= f_valid;
    end
  end

  always_ff @(posedge clk) begin
    if (f_valid) dec_instr <= imem_rdata;
  end

endmodule
