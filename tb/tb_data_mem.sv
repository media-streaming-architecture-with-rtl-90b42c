// tb_data_mem: self-checking test of data_mem.
//
// Writes and reads all ten banks in parallel with random addresses and byte
// enables and compares every bank's read data with a shadow copy; this also
// checks that the banks are independent of each other.
module tb_data_mem;
  logic clk = 1'b0;
  logic we [10], re [10];
  logic [3:0] wbe [10];
  logic [4:0] waddr [10], raddr [10];
  logic [31:0] wdata [10], rdata [10];
  logic [31:0] shadow [10][32];
  logic [31:0] exp_d [10];
  logic        exp_v [10];
  int checks = 0, failures = 0;

  data_mem dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int b = 0; b < 10; b++) begin re[b] = 1'b0; we[b] = 1'b1; wbe[b] = 4'hF; raddr[b] = '0; exp_v[b] = 1'b0; end
    for (int i = 0; i < 32; i++) begin
      @(negedge clk);
      for (int b = 0; b < 10; b++) begin
        waddr[b] = 5'(i); wdata[b] = $urandom; shadow[b][i] = wdata[b];
      end
    end
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      for (int b = 0; b < 10; b++) if (exp_v[b]) begin
        checks++;
        if (rdata[b] !== exp_d[b]) begin failures++; $display("MISMATCH bank %0d", b); end
      end
      for (int b = 0; b < 10; b++) begin
        re[b] = $urandom_range(1); raddr[b] = 5'($urandom);
        if (re[b]) begin exp_d[b] = shadow[b][raddr[b]]; exp_v[b] = 1'b1; end
        we[b] = $urandom_range(1); waddr[b] = 5'($urandom); wbe[b] = 4'($urandom); wdata[b] = $urandom;
        if (we[b]) for (int k = 0; k < 4; k++) if (wbe[b][k]) shadow[b][waddr[b]][8*k +: 8] = wdata[b][8*k +: 8];
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
