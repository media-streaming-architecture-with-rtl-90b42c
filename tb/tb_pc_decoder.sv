// tb_pc_decoder: self-checking test of pc_decoder.
//
// A behavioural instruction memory returns a word that encodes its own
// address. For random end values the test checks that the PC fetches 0 ..
// end-1 one per clock, that each word appears on dec_instr with dec_valid
// two clocks after it was addressed, that alu_work drops while the program
// runs and rises again once the pipeline (busy_in) is empty, and that
// abort_req stops fetching and decoding at once.
module tb_pc_decoder;
  import mscp_pkg::*;

  logic clk = 1'b0, rst_n;
  logic start, abort_req, busy_in;
  logic [7:0] end_val;
  logic imem_re;
  logic [6:0] imem_addr;
  instr_t imem_rdata, dec_instr;
  logic dec_valid, running, alu_work;
  int checks = 0, failures = 0;

  pc_decoder dut (.*);

  always #5 clk = ~clk;

  // instruction memory model: synchronous read, word tagged with its address
  always_ff @(posedge clk) if (imem_re) imem_rdata <= instr_t'({71'h5A5A_0000_0000 | imem_addr, 71'(imem_addr) * 71'h1_0000_0001});

  function automatic instr_t word_of(int a);
    return instr_t'({71'h5A5A_0000_0000 | 7'(a), 71'(a) * 71'h1_0000_0001});
  endfunction

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s (t=%0t)", msg, $time); end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n, got, cyc;
    rst_n = 1'b0; start = 1'b0; abort_req = 1'b0; busy_in = 1'b0; end_val = '0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(alu_work && !running, "idle after reset");
    for (int it = 0; it < 60; it++) begin
      n = (it == 0) ? 128 : (it == 1) ? 1 : $urandom_range(1, 128);
      start = 1'b1; end_val = 8'(n);
      @(negedge clk);
      start = 1'b0;
      got = 0; cyc = 0;
      while (got < n && cyc < 400) begin
        if (cyc < n) check(running && imem_re && imem_addr == 7'(cyc), "pc sequence");
        if (cyc < n) check(!alu_work, "alu_work low while running");
        if (dec_valid) begin
          check(dec_instr == word_of(got), "decoded word order");
          check(cyc == got + 2, "fetch-to-decode latency");
          got++;
        end
        @(negedge clk); cyc++;
      end
      check(got == n, "all words decoded");
      check(!running && !dec_valid, "stopped at end value");
      // pipeline still busy: alu_work stays low
      busy_in = 1'b1;
      @(negedge clk);
      check(!alu_work, "alu_work low while units busy");
      busy_in = 1'b0;
      #1 check(alu_work, "alu_work high when done");
      @(negedge clk);
    end
    // abort in the middle of a long program
    for (int it = 0; it < 20; it++) begin
      start = 1'b1; end_val = 8'd128;
      @(negedge clk);
      start = 1'b0;
      repeat ($urandom_range(1, 60)) @(negedge clk);
      abort_req = 1'b1;
      @(negedge clk);
      abort_req = 1'b0;
      check(!running && !imem_re && !dec_valid, "abort stops fetch and decode");
      @(negedge clk);
      check(!dec_valid && alu_work, "nothing issued after abort");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
