// tb_instr_mem: self-checking test of instr_mem.
//
// Loads all 128 words segment by segment (four 32-bit segments and the
// 14-bit top segment, partly with byte enables), then reads random words
// and compares the full 142-bit word with a shadow copy.
module tb_instr_mem;
  logic clk = 1'b0;
  logic we, re;
  logic [2:0] wseg;
  logic [3:0] wbe;
  logic [6:0] waddr, raddr;
  logic [31:0] wdata;
  logic [141:0] rdata;
  logic [141:0] shadow [128];
  int checks = 0, failures = 0;

  instr_mem dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [159:0] w;
    logic [141:0] exp_d;
    we = 1'b0; re = 1'b0; wseg = '0; wbe = '0; waddr = '0; raddr = '0; wdata = '0;
    for (int i = 0; i < 128; i++) shadow[i] = '0;
    for (int pass = 0; pass < 2; pass++)
      for (int i = 0; i < 128; i++)
        for (int s = 0; s < 5; s++) begin
          @(negedge clk);
          we = 1'b1; waddr = 7'(i); wseg = 3'(s); wdata = $urandom;
          wbe = (pass == 0) ? 4'hF : 4'($urandom);
          w = 160'(shadow[i]);
          for (int k = 0; k < 4; k++) if (wbe[k]) w[32*s + 8*k +: 8] = wdata[8*k +: 8];
          shadow[i] = w[141:0];
        end
    @(negedge clk); we = 1'b0;
    for (int i = 0; i < 500; i++) begin
      re = 1'b1; raddr = 7'($urandom); exp_d = shadow[raddr];
      @(negedge clk);
      re = 1'b0;
      @(negedge clk);
      checks++;
      if (rdata !== exp_d) begin failures++; $display("MISMATCH word %0d", raddr); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
