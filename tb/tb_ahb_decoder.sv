// tb_ahb_decoder: self-checking test of ahb_decoder.
//
// Drives random addresses (inside the slave windows, just outside them and
// far away) and random transfer types, with slaves whose HREADY, HRESP and
// HRDATA are random. A reference model tracks which slave owns each data
// phase and checks HSELx (one-hot, right window), the response multiplexer,
// and the default slave's two-clock ERROR for unmapped NONSEQ/SEQ
// transfers. Four slaves at base 0x4000_0000 with 16 KB windows.
module tb_ahb_decoder;
  import mscp_pkg::*;

  localparam int N = 4;
  localparam logic [31:0] BASE = 32'h4000_0000;

  logic HCLK = 1'b0, HRESETn;
  logic [31:0] HADDR;
  htrans_e HTRANS;
  logic HSEL [N];
  logic S_HREADY [N];
  hresp_e S_HRESP [N];
  logic [31:0] S_HRDATA [N];
  logic HREADY;
  hresp_e HRESP;
  logic [31:0] HRDATA;
  int checks = 0, failures = 0;

  ahb_decoder #(.NUM_SLAVES(N), .BASE(BASE), .WIN_BITS(14)) dut (.*);

  always #5 HCLK = ~HCLK;

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s (t=%0t)", msg, $time); end
  endtask

  initial begin
    repeat (100000) @(posedge HCLK);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int owner;          // slave of the data phase, -1 default slave
    int def_ph;         // reference default-slave phase
    int exp_sel, n_err = 0;
    logic [31:0] off;
    HRESETn = 1'b0; HADDR = '0; HTRANS = HT_IDLE;
    for (int i = 0; i < N; i++) begin S_HREADY[i] = 1'b1; S_HRESP[i] = HR_OKAY; S_HRDATA[i] = '0; end
    repeat (2) @(negedge HCLK);
    HRESETn = 1'b1;
    owner = -1; def_ph = 0;
    for (int it = 0; it < 20000; it++) begin
      @(negedge HCLK);
      case ($urandom_range(3))
        0: HADDR = BASE + $urandom_range(N * 16384 - 1);
        1: HADDR = BASE + N * 16384 + $urandom_range(1000);
        2: HADDR = BASE - 1 - $urandom_range(1000);
        default: HADDR = $urandom;
      endcase
      if ($urandom_range(7) == 0) HADDR = BASE + $urandom_range(N - 1) * 16384;
      HTRANS = htrans_e'($urandom);
      for (int i = 0; i < N; i++) begin
        S_HREADY[i] = ($urandom_range(3) != 0);
        S_HRESP[i]  = hresp_e'($urandom);
        S_HRDATA[i] = $urandom;
      end
      #1;
      // select lines
      off = HADDR - BASE;
      exp_sel = (HADDR >= BASE && off < N * 16384) ? int'(off >> 14) : -1;
      for (int i = 0; i < N; i++) check(HSEL[i] == (exp_sel == i), "HSEL decode");
      // response multiplexer
      if (owner >= 0) begin
        check(HREADY == S_HREADY[owner] && HRESP == S_HRESP[owner] && HRDATA == S_HRDATA[owner],
              "response from data-phase slave");
      end else begin
        check(HREADY == (def_ph != 1), "default slave HREADY");
        check(HRESP == ((def_ph != 0) ? HR_ERROR : HR_OKAY), "default slave HRESP");
        if (def_ph == 1) n_err++;
      end
      // reference update at the rising edge
      if (def_ph == 1) def_ph = 2; else if (def_ph == 2) def_ph = 0;
      if (HREADY) begin
        owner = exp_sel;
        if (exp_sel < 0 && (HTRANS == HT_NONSEQ || HTRANS == HT_SEQ)) def_ph = 1;
      end
    end
    check(n_err > 0, "default slave ERROR seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
