// tb_alu_cluster_ip: self-checking test of alu_cluster_ip over its AHB port.
//
// Acts as the host: loads a small VLIW program into the instruction memory
// with 5-beat incrementing bursts (one instruction = five 32-bit segments),
// loads vectors into the data memory, a table into an IRF bank and
// constants into the scratch pad, writes START, keeps reading until the
// RETRY responses stop, and reads the results back with a burst. The
// program adds two vectors (ALU0, data memory to data memory), scales a
// vector from an IRF bank by a scratch-pad constant (MUL0, to another IRF
// bank), and runs FADD, FMUL and FDIV on scratch-pad floats. Results are
// compared with values computed here. Also checked: instruction-memory
// read-back including the 14-bit top segment, byte-lane writes, ABORT of
// a long program, and ERROR for unmapped addresses.
module tb_alu_cluster_ip;
  import mscp_pkg::*;
  import tb_fp_pkg::*;

  logic HCLK = 1'b0, HRESETn;
  logic [31:0] m_haddr, m_hwdata;
  logic m_hwrite;
  htrans_e m_htrans;
  logic [2:0] m_hsize;
  hburst_e m_hburst;
  logic HREADY;
  hresp_e HRESP;
  logic [31:0] HRDATA;
  logic alu_work;
  int checks = 0, failures = 0;

  alu_cluster_ip dut (
    .HCLK, .HRESETn, .HSEL(1'b1), .HADDR(m_haddr[13:0]), .HWRITE(m_hwrite),
    .HTRANS(m_htrans), .HSIZE(m_hsize), .HBURST(m_hburst), .HWDATA(m_hwdata),
    .HREADY_in(HREADY), .HREADY, .HRESP, .HRDATA, .alu_work
  );

  always #5 HCLK = ~HCLK;

  initial begin
    repeat (200000) @(posedge HCLK);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL: %s (t=%0t)", msg, $time); end
  endtask

  // ---------------------------------------------------------------- AHB master
  // One burst per call, driven at the falling edge; the slave's HREADY,
  // HRESP and HRDATA come from registers, so the values seen one step after
  // the falling edge are the ones sampled at the next rising edge.
  // busy_at: beat index before which one BUSY cycle is inserted (-1: none).
  // st returns the response of an aborted burst (ERROR or RETRY) or OKAY;
  // waits[k] counts the wait states of beat k.
  function automatic logic [31:0] beat_addr(logic [31:0] a0, hburst_e hb, int sz, int k);
    int nb, bytes;
    logic [31:0] a;
    bytes = 1 << sz;
    nb = (hb == HB_WRAP4) ? 4 : (hb == HB_WRAP8) ? 8 : (hb == HB_WRAP16) ? 16 : 0;
    if (nb == 0) return a0 + 32'(k * bytes);
    a = a0 & ~32'(nb * bytes - 1);
    return a | ((a0 + 32'(k * bytes)) & 32'(nb * bytes - 1));
  endfunction

  task automatic ahb_burst(input bit wr, input logic [31:0] a0, input hburst_e hb,
                           input int sz, input int n, input logic [31:0] wdat [$],
                           output logic [31:0] rdat [$], input int busy_at,
                           output hresp_e st, output int waits [$]);
    int i, dp;
    bit busy_done, stop;
    i = 0; dp = -1; busy_done = 0; stop = 0;
    st = HR_OKAY;
    rdat = {}; waits = {};
    for (int k = 0; k < n; k++) waits.push_back(0);
    forever begin
      @(negedge HCLK);
      if (stop || i >= n) begin
        m_htrans = HT_IDLE;
      end else if (i == busy_at && !busy_done && i > 0) begin
        m_htrans = HT_BUSY; m_haddr = beat_addr(a0, hb, sz, i);
      end else begin
        m_htrans = (i == 0) ? HT_NONSEQ : HT_SEQ;
        m_haddr  = beat_addr(a0, hb, sz, i);
        m_hwrite = wr; m_hsize = 3'(sz); m_hburst = hb;
      end
      if (dp >= 0 && wr) m_hwdata = wdat[dp];
      #1;
      if (HREADY) begin
        if (dp >= 0 && !wr && !stop) rdat.push_back(HRDATA);
        dp = -1;
        if (m_htrans == HT_NONSEQ || m_htrans == HT_SEQ) begin dp = i; i++; end
        else if (m_htrans == HT_BUSY) busy_done = 1;
        if (dp < 0 && (i >= n || stop)) break;
      end else begin
        if (dp >= 0) waits[dp]++;
        if (HRESP != HR_OKAY) begin st = HRESP; stop = 1; end
      end
    end
  endtask

  task automatic ahb_write1(input logic [31:0] a, input logic [31:0] d, output hresp_e st);
    logic [31:0] q [$];
    int w [$];
    ahb_burst(1'b1, a, HB_SINGLE, 2, 1, '{d}, q, -1, st, w);
  endtask

  task automatic ahb_read1(input logic [31:0] a, output logic [31:0] d, output hresp_e st);
    logic [31:0] q [$];
    int w [$];
    ahb_burst(1'b0, a, HB_SINGLE, 2, 1, '{}, q, -1, st, w);
    d = (q.size() > 0) ? q[0] : 32'hx;
  endtask

  // addresses
  function automatic logic [31:0] a_imem(int i, int seg); return 32'((i << 5) | (seg << 2)); endfunction
  function automatic logic [31:0] a_dmem(int b, int w);   return 32'h1000 | 32'((b << 7) | (w << 2)); endfunction
  function automatic logic [31:0] a_irf(int b, int w);    return 32'h1800 | 32'((b << 7) | (w << 2)); endfunction
  function automatic logic [31:0] a_sprf(int w);          return 32'h2000 | 32'(w << 2); endfunction

  task automatic load_instr(int i, instr_t w);
    logic [159:0] x;
    logic [31:0] q [$], rq [$];
    int wt [$];
    hresp_e st;
    x = 160'(w);
    q = {};
    for (int s = 0; s < 5; s++) q.push_back(x[32*s +: 32]);
    ahb_burst(1'b1, a_imem(i, 0), HB_INCR, 2, 5, q, rq, -1, st, wt);
    check(st == HR_OKAY, "instruction load");
  endtask

  task automatic wr(logic [31:0] a, logic [31:0] d);
    hresp_e st;
    ahb_write1(a, d, st);
    check(st == HR_OKAY, "write OKAY");
  endtask

  task automatic rd(logic [31:0] a, output logic [31:0] d);
    hresp_e st;
    ahb_read1(a, d, st);
    check(st == HR_OKAY, "read OKAY");
  endtask

  function automatic slot_body_t mk(src_sel_e sa, int aa, src_sel_e sb, int ab, dst_sel_e sd, int bd, int ad);
    slot_body_t b;
    b.a = '{sa, 5'(aa)}; b.b = '{sb, 5'(ab)}; b.dst = '{sd, 4'(bd), 5'(ad)};
    return b;
  endfunction

  initial begin
    logic [31:0] x [8], y [8], z [8], f [3], d;
    logic [31:0] q [$], rq [$];
    int wt [$];
    hresp_e st;
    instr_t w;
    int n_retry;

    HRESETn = 1'b0; m_htrans = HT_IDLE; m_haddr = '0; m_hwrite = 1'b0;
    m_hsize = 3'd2; m_hburst = HB_SINGLE; m_hwdata = '0;
    repeat (3) @(negedge HCLK);
    HRESETn = 1'b1;
    @(negedge HCLK);
    check(alu_work, "alu_work high after reset");

    // data
    for (int i = 0; i < 8; i++) begin
      x[i] = $urandom; y[i] = $urandom; z[i] = $urandom_range(1000);
      wr(a_dmem(0, i), x[i]);
      wr(a_dmem(1, i), y[i]);
      wr(a_irf(4, i), z[i]);
    end
    wr(a_sprf(0), 32'd37);
    f[0] = rand_f(125, 130); f[1] = rand_f(125, 130);
    wr(a_sprf(1), f[0]);
    wr(a_sprf(2), f[1]);

    // program
    for (int i = 0; i < 8; i++) begin
      w = '0;
      w.alu0.op = ALU_ADD;
      w.alu0.body = mk(SRC_DMEM, i, SRC_DMEM, i, DST_DMEM, 0, 16 + i);
      w.mul0.op = MUL_LO;
      w.mul0.body = mk(SRC_IRF, i, SRC_SPRF, 0, DST_IRF, 9, i);
      load_instr(i, w);
    end
    w = '0;
    w.alu1.op = ALU_FADD; w.alu1.body = mk(SRC_SPRF, 1, SRC_SPRF, 2, DST_SPRF, 0, 5);
    w.mul1.op = MUL_FMUL; w.mul1.body = mk(SRC_SPRF, 1, SRC_SPRF, 2, DST_SPRF, 0, 4);
    w.div.op  = DIV_FDIV; w.div.body  = mk(SRC_SPRF, 1, SRC_SPRF, 2, DST_SPRF, 0, 3);
    load_instr(8, w);

    // instruction memory read-back, all five segments
    for (int s = 0; s < 5; s++) begin
      logic [159:0] xx;
      xx = 160'(w);
      rd(a_imem(8, s), d);
      check(d == xx[32*s +: 32], "instruction memory read-back");
    end

    // run
    wr(32'h3000, 32'd9);
    @(negedge HCLK);
    check(!alu_work, "alu_work low after START");
    n_retry = 0;
    do begin
      ahb_read1(a_dmem(0, 16), d, st);
      if (st == HR_RETRY) n_retry++;
    end while (st == HR_RETRY && n_retry < 1000);
    check(n_retry > 0, "RETRY while the cluster works");
    check(alu_work, "alu_work high when done");

    // results: one 8-beat burst read of the sums
    ahb_burst(1'b0, a_dmem(0, 16), HB_INCR8, 2, 8, '{}, rq, -1, st, wt);
    check(st == HR_OKAY && rq.size() == 8, "result burst");
    for (int i = 0; i < 8 && i < rq.size(); i++) check(rq[i] == x[i] + y[i], $sformatf("ADD result %0d", i));
    check(wt.size() == 8 && wt[0] == 2 && wt[7] == 0, "burst read wait states");
    for (int i = 0; i < 8; i++) begin
      rd(a_irf(9, i), d);
      check(d == z[i] * 37, $sformatf("MUL result %0d", i));
    end
    rd(a_sprf(5), d); check(d == r2f(f2r(f[0]) + f2r(f[1])), "FADD result");
    rd(a_sprf(4), d); check(d == r2f(f2r(f[0]) * f2r(f[1])), "FMUL result");
    rd(a_sprf(3), d); check(d == r2f(f2r(f[0]) / f2r(f[1])), "FDIV result");

    // byte and halfword writes
    ahb_burst(1'b1, a_dmem(3, 5) + 1, HB_SINGLE, 0, 1, '{32'h0000_AB00}, rq, -1, st, wt);
    ahb_burst(1'b1, a_dmem(3, 5) + 2, HB_SINGLE, 1, 1, '{32'hCDEF_0000}, rq, -1, st, wt);
    ahb_burst(1'b1, a_dmem(3, 5), HB_SINGLE, 0, 1, '{32'h0000_0012}, rq, -1, st, wt);
    rd(a_dmem(3, 5), d);
    check(d == 32'hCDEF_AB12, "byte lanes");

    // abort a long program of NOPs
    for (int i = 0; i < 9; i++) load_instr(i, '0);
    wr(32'h3000, 32'd128);
    repeat (10) @(negedge HCLK);
    check(!alu_work, "long program running");
    wr(32'h3004, 32'd0);
    repeat (3) @(negedge HCLK);
    check(alu_work, "ABORT stops the cluster");
    rd(a_dmem(0, 16), d);
    check(d == x[0] + y[0], "memory intact after abort");

    // ERROR
    ahb_read1(32'h2800, d, st);  check(st == HR_ERROR, "unmapped -> ERROR");
    ahb_read1(32'h3004, d, st);  check(st == HR_ERROR, "read of ABORT -> ERROR");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
