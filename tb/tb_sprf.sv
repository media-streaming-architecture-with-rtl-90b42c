// tb_sprf: self-checking test of sprf.
//
// Fills the scratch pad, then reads it through all ten read ports at once
// with random addresses while writing with byte enables, comparing every
// port against a shadow array (data the clock after re, held while re low).
module tb_sprf;
  logic clk = 1'b0;
  logic we;
  logic [3:0] wbe;
  logic [4:0] waddr;
  logic [31:0] wdata;
  logic re [10];
  logic [4:0] raddr [10];
  logic [31:0] rdata [10];
  logic [31:0] shadow [32];
  logic [31:0] exp_d [10];
  int checks = 0, failures = 0;

  sprf dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int p = 0; p < 10; p++) begin re[p] = 1'b0; raddr[p] = '0; end
    we = 1'b1; wbe = 4'hF;
    for (int i = 0; i < 32; i++) begin
      @(negedge clk); waddr = 5'(i); wdata = $urandom; shadow[i] = wdata;
    end
    @(negedge clk); we = 1'b0;
    for (int p = 0; p < 10; p++) begin re[p] = 1'b1; raddr[p] = 5'(p); exp_d[p] = shadow[p]; end
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      for (int p = 0; p < 10; p++) begin
        checks++;
        if (rdata[p] !== exp_d[p]) begin failures++; $display("MISMATCH port %0d", p); end
      end
      for (int p = 0; p < 10; p++) begin
        re[p] = $urandom_range(1); raddr[p] = 5'($urandom);
        if (re[p]) exp_d[p] = shadow[raddr[p]];
      end
      we = $urandom_range(1); waddr = 5'($urandom); wbe = 4'($urandom); wdata = $urandom;
      if (we) for (int k = 0; k < 4; k++) if (wbe[k]) shadow[waddr][8*k +: 8] = wdata[8*k +: 8];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
