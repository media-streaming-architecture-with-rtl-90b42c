// tb_irf: self-checking test of irf.
//
// Writes random words with random byte enables and reads random addresses,
// comparing against a shadow array: read data one clock after re, held while
// re is low, and old data on a same-clock read and write.
module tb_irf;
  logic clk = 1'b0;
  logic we, re;
  logic [3:0] wbe;
  logic [4:0] waddr, raddr;
  logic [31:0] wdata, rdata;
  logic [31:0] shadow [32];
  int checks = 0, failures = 0;

  irf dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] exp_d;
    logic        exp_v;
    we = 1'b1; re = 1'b0; wbe = 4'hF;
    for (int i = 0; i < 32; i++) begin
      @(negedge clk); waddr = 5'(i); wdata = $urandom; shadow[i] = wdata;
    end
    @(negedge clk); we = 1'b0;
    exp_v = 1'b0;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      if (exp_v) begin
        checks++;
        if (rdata !== exp_d) begin failures++; $display("MISMATCH %h %h", rdata, exp_d); end
      end
      re = ($urandom_range(3) != 0); raddr = 5'($urandom);
      we = $urandom_range(1); waddr = ($urandom_range(3) == 0) ? raddr : 5'($urandom);
      wbe = 4'($urandom); wdata = $urandom;
      if (re) begin exp_d = shadow[raddr]; exp_v = 1'b1; end
      if (we) for (int k = 0; k < 4; k++) if (wbe[k]) shadow[waddr][8*k +: 8] = wdata[8*k +: 8];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
