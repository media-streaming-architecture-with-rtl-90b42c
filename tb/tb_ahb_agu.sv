// tb_ahb_agu: self-checking test of ahb_agu.
//
// Loads every burst type with byte, halfword and word sizes and random
// aligned start addresses and checks each generated beat address against
// the AHB incrementing/wrapping rule, including the 0x34, 0x38, 0x3C, 0x30
// example of a 4-beat word wrapping burst.
module tb_ahb_agu;
  import mscp_pkg::*;

  logic clk = 1'b0, rst_n;
  logic load, step;
  logic [13:0] load_addr, addr, next_addr;
  logic [2:0] load_size;
  hburst_e load_burst;
  int checks = 0, failures = 0;

  ahb_agu dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int beats(hburst_e b);
    case (b)
      HB_WRAP4, HB_INCR4: return 4;
      HB_WRAP8, HB_INCR8: return 8;
      HB_WRAP16, HB_INCR16: return 16;
      default: return 0;
    endcase
  endfunction

  task automatic run(hburst_e bt, int sz, logic [13:0] a0);
    int n, bytes, blk;
    logic [13:0] e;
    @(negedge clk);
    load = 1'b1; load_addr = a0; load_size = 3'(sz); load_burst = bt;
    @(negedge clk);
    load = 1'b0; step = 1'b1;
    n = (beats(bt) == 0) ? 6 : beats(bt);
    bytes = 1 << sz;
    e = a0;
    for (int i = 0; i < n; i++) begin
      checks++;
      if (addr !== e) begin failures++; $display("MISMATCH burst %0d size %0d beat %0d: %h exp %h", bt, sz, i, addr, e); end
      if (bt == HB_WRAP4 || bt == HB_WRAP8 || bt == HB_WRAP16) begin
        blk = beats(bt) * bytes;
        e = 14'((int'(e) / blk) * blk + (int'(e) + bytes) % blk);
      end else e = e + 14'(bytes);
      @(negedge clk);
    end
    step = 1'b0;
  endtask

  initial begin
    rst_n = 1'b0; load = 1'b0; step = 1'b0; load_addr = '0; load_size = '0; load_burst = HB_SINGLE;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    run(HB_WRAP4, 2, 14'h34);
    for (int i = 0; i < 300; i++) begin
      int sz;
      sz = $urandom_range(2);
      run(hburst_e'($urandom_range(7)), sz, 14'(($urandom % 14'h3F00) & ~((1 << sz) - 1)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
