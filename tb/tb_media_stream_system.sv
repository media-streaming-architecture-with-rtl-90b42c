// tb_media_stream_system: end-to-end test of the media streaming system at
// its default size (eight ALU cluster IPs on one AHB bus).
//
// The testbench is the host. It splits a 16-tap FIR filter over all eight
// clusters: every cluster gets the same program, the coefficients in its
// scratch pad and its own block of input samples, computes eight outputs,
// and the host reads them back. The taps are the symmetric 16-tap set
// 3, -4, 3, 0, -4, 10, -19, 84, 84, -19, 10, -4, 0, 3, -4, 3.
//
// FIR program (78 instructions), for local outputs n = 0..7 in two groups
// of four, k-pairs kp = 0..7 and r = 0..3, instruction t = 32g + 4kp + r:
//   MUL0: x[n-2kp]   * h[2kp]   -> data bank 0, word t mod 32
//   MUL1: x[n-2kp-1] * h[2kp+1] -> data bank 2, word t mod 32
// Six instructions later (the product is written in clock t+7 and read in
// clock t+8) ALU0/ALU1 add the product to the output's running sum in IRF
// bank 1 / bank 3; four outputs interleave, so each sum is read exactly
// when the previous add has been written. ALU1's last add goes to IRF bank 0
// and instructions 70..77 add the two halves into data bank 8.
// A second program exercises the divider and the floating-point operations
// (QUO, REM, SQRT, FDIV, FMUL, FADD, FSUB), and one-instruction programs
// measure the ALU, MUL and DIV latencies (write-back six, eight and twenty
// clocks after the fetch).
//
// Mechanisms counted (a failure is counted for any that never happened):
// first-beat read wait states, zero-wait prefetched burst reads, wrapping
// bursts, RETRY while a cluster works, ERROR from a cluster and from the
// default slave, ABORT, the UNWRITE_WAIT state (BUSY in a write burst),
// all eight clusters running at once, the three unit latencies, and
// operations of the three stand-alone FPU macros (checked one clock after
// the operands against a double-precision reference).
module tb_media_stream_system;
  import mscp_pkg::*;
  import tb_fp_pkg::*;

  localparam int NC = 8;
  localparam logic [31:0] BASE = 32'h4000_0000;

  logic HCLK = 1'b0, HRESETn;
  logic [31:0] m_haddr, m_hwdata;
  logic m_hwrite;
  htrans_e m_htrans;
  logic [2:0] m_hsize;
  hburst_e m_hburst;
  logic HREADY;
  logic [1:0] hresp_w;
  hresp_e HRESP;
  logic [31:0] HRDATA;
  logic [NC-1:0] alu_work;
  logic        fpu_reset;
  logic [31:0] fpu_a, fpu_b, fpu1_out, fpu2_out, fpu3_out;
  logic [2:0]  fpu_ops;
  int checks = 0, failures = 0;

  media_stream_system dut (
    .HCLK, .HRESETn, .HADDR(m_haddr), .HWRITE(m_hwrite), .HTRANS(m_htrans),
    .HSIZE(m_hsize), .HBURST(m_hburst), .HWDATA(m_hwdata), .HREADY,
    .HRESP(hresp_w), .HRDATA, .alu_work,
    .fpu_reset, .fpu_a, .fpu_b, .fpu_ops, .fpu1_out, .fpu2_out, .fpu3_out
  );
  assign HRESP = hresp_e'(hresp_w);

  always #5 HCLK = ~HCLK;

  initial begin
    repeat (300000) @(posedge HCLK);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; if (failures < 30) $display("FAIL: %s (t=%0t)", msg, $time); end
  endtask

  // ------------------------------------------------------------ monitors
  int cyc = 0;
  always_ff @(posedge HCLK) cyc <= cyc + 1;

  int n_parallel_max = 0, n_unwrite = 0;
  int t_start [NC], t_done [NC];
  always_ff @(posedge HCLK) begin
    int k;
    k = 0;
    for (int i = 0; i < NC; i++) if (!alu_work[i]) k++;
    if (k > n_parallel_max) n_parallel_max <= k;
  end
  for (genvar i = 0; i < NC; i++) begin : g_mon
    always_ff @(posedge HCLK) begin
      if (dut.g_cl[i].u_ip.start) t_start[i] <= cyc;
      if (alu_work[i] && !$past(alu_work[i])) t_done[i] <= cyc;
      if (dut.g_cl[i].u_ip.u_wrap.state == 3'd4 && $past(dut.g_cl[i].u_ip.u_wrap.state) != 3'd4)
        n_unwrite <= n_unwrite + 1;
    end
  end

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

  // ------------------------------------------------------------ host side
  function automatic logic [31:0] cb(int c);              return BASE + 32'(c) * 32'h4000; endfunction
  function automatic logic [31:0] a_imem(int c, int i, int s); return cb(c) | 32'((i << 5) | (s << 2)); endfunction
  function automatic logic [31:0] a_dmem(int c, int b, int w); return cb(c) | 32'h1000 | 32'((b << 7) | (w << 2)); endfunction
  function automatic logic [31:0] a_irf(int c, int b, int w);  return cb(c) | 32'h1800 | 32'((b << 7) | (w << 2)); endfunction
  function automatic logic [31:0] a_sprf(int c, int w);        return cb(c) | 32'h2000 | 32'(w << 2); endfunction

  int n_wait_first = 0, n_prefetch = 0, n_wrap = 0, n_retry = 0;
  int n_err_ip = 0, n_err_def = 0, n_abort = 0, n_fpu = 0;

  task automatic note_read(int wt [$]);
    for (int k = 0; k < wt.size(); k++) begin
      if (k == 0 && wt[k] == 2) n_wait_first++;
      if (k > 0 && wt[k] == 0) n_prefetch++;
    end
  endtask

  // burst write of a list of words, optionally with one BUSY cycle
  task automatic wr_burst(logic [31:0] a, logic [31:0] q [$], int busy_at);
    logic [31:0] rq [$];
    int wt [$];
    hresp_e st;
    ahb_burst(1'b1, a, HB_INCR, 2, q.size(), q, rq, busy_at, st, wt);
    check(st == HR_OKAY, "write burst OKAY");
  endtask

  task automatic wr(logic [31:0] a, logic [31:0] d);
    hresp_e st;
    ahb_write1(a, d, st);
    check(st == HR_OKAY, "write OKAY");
  endtask

  // read that retries while the cluster works
  task automatic rd(logic [31:0] a, output logic [31:0] d);
    logic [31:0] rq [$];
    int wt [$];
    hresp_e st;
    int tries = 0;
    do begin
      ahb_burst(1'b0, a, HB_SINGLE, 2, 1, '{}, rq, -1, st, wt);
      if (st == HR_RETRY) n_retry++;
      tries++;
    end while (st == HR_RETRY && tries < 2000);
    check(st == HR_OKAY && rq.size() == 1, "read OKAY");
    note_read(wt);
    d = (rq.size() > 0) ? rq[0] : 32'd0;
  endtask

  task automatic rd_burst(logic [31:0] a, hburst_e hb, int n, output logic [31:0] rq [$]);
    int wt [$];
    hresp_e st;
    int tries = 0;
    do begin
      ahb_burst(1'b0, a, hb, 2, n, '{}, rq, -1, st, wt);
      if (st == HR_RETRY) n_retry++;
      tries++;
    end while (st == HR_RETRY && tries < 2000);
    check(st == HR_OKAY && rq.size() == n, "burst read OKAY");
    note_read(wt);
  endtask

  task automatic load_prog(int c, instr_t prog [$]);
    for (int i = 0; i < prog.size(); i++) begin
      logic [159:0] x;
      logic [31:0] q [$];
      x = 160'(prog[i]);
      q = {};
      for (int s = 0; s < 5; s++) q.push_back(x[32*s +: 32]);
      wr_burst(a_imem(c, i, 0), q, (i % 7 == 3) ? 2 : -1);
    end
  endtask

  function automatic slot_body_t mk(src_sel_e sa, int aa, src_sel_e sb, int ab, dst_sel_e sd, int bd, int ad);
    slot_body_t b;
    b.a = '{sa, 5'(aa)}; b.b = '{sb, 5'(ab)}; b.dst = '{sd, 4'(bd), 5'(ad)};
    return b;
  endfunction

  // the FIR program described in the header
  function automatic void fir_prog(ref instr_t p [$]);
    p = {};
    for (int i = 0; i < 78; i++) p.push_back('0);
    for (int t = 0; t < 64; t++) begin
      int g, kp, r, n;
      g = t / 32; kp = (t % 32) / 4; r = t % 4; n = 4 * g + r;
      p[t].mul0.op = MUL_LO;
      p[t].mul0.body = mk(SRC_DMEM, n - 2 * kp + 15, SRC_SPRF, 2 * kp, DST_DMEM, 0, t % 32);
      p[t].mul1.op = MUL_LO;
      p[t].mul1.body = mk(SRC_DMEM, n - 2 * kp - 1 + 15, SRC_SPRF, 2 * kp + 1, DST_DMEM, 2, t % 32);
      p[t + 6].alu0.op = ALU_ADD;
      p[t + 6].alu0.body = mk(SRC_DMEM, t % 32, (kp == 0) ? SRC_IMM : SRC_IRF, (kp == 0) ? 0 : n,
                              DST_IRF, 1, n);
      p[t + 6].alu1.op = ALU_ADD;
      p[t + 6].alu1.body = mk(SRC_DMEM, t % 32, (kp == 0) ? SRC_IMM : SRC_IRF, (kp == 0) ? 0 : n,
                              DST_IRF, (kp == 7) ? 0 : 3, (kp == 7) ? 16 + n : n);
    end
    for (int n = 0; n < 8; n++) begin
      p[70 + n].alu0.op = ALU_ADD;
      p[70 + n].alu0.body = mk(SRC_IRF, 16 + n, SRC_IRF, n, DST_DMEM, 8, n);
    end
  endfunction

  localparam int H [16] = '{3, -4, 3, 0, -4, 10, -19, 84, 84, -19, 10, -4, 0, 3, -4, 3};

  initial begin
    instr_t p [$];
    int xs [NC * 8 + 15];   // input stream, xs[j] = x[j - 15]
    logic [31:0] d, rq [$], q [$];
    int wt [$];
    hresp_e st;
    int t0, t1;

    HRESETn = 1'b0; m_htrans = HT_IDLE; m_haddr = '0; m_hwrite = 1'b0;
    m_hsize = 3'd2; m_hburst = HB_SINGLE; m_hwdata = '0;
    fpu_reset = 1'b1; fpu_a = '0; fpu_b = '0; fpu_ops = FOP_ADD;
    repeat (3) @(negedge HCLK);
    HRESETn = 1'b1;
    @(negedge HCLK);
    check(&alu_work, "all clusters idle after reset");

    // ---------------- FIR over all clusters
    for (int j = 0; j < NC * 8 + 15; j++) xs[j] = (j < 15) ? 0 : $urandom_range(0, 4000) - 2000;
    fir_prog(p);
    for (int c = 0; c < NC; c++) begin
      load_prog(c, p);
      q = {};
      for (int k = 0; k < 16; k++) q.push_back(32'(H[k]));
      wr_burst(a_sprf(c, 0), q, -1);
      q = {};
      for (int j = 0; j < 23; j++) q.push_back(32'(xs[8 * c + j]));
      wr_burst(a_dmem(c, 4, 0), q, (c % 2 == 0) ? 5 : -1);
      wr_burst(a_dmem(c, 6, 0), q, -1);
    end
    // instruction memory read-back of cluster 3 (prefetched burst over the five segments)
    rd_burst(a_imem(3, 10, 0), HB_INCR, 5, rq);
    begin
      logic [159:0] x;
      x = 160'(p[10]);
      for (int s = 0; s < 5 && s < rq.size(); s++) check(rq[s] == x[32*s +: 32], "instruction read-back");
    end
    // start all clusters
    for (int c = 0; c < NC; c++) wr(cb(c) | 32'h3000, 32'd78);
    // results, read with retries while the clusters finish
    for (int c = 0; c < NC; c++) begin
      rd_burst(a_dmem(c, 8, 0), HB_INCR8, 8, rq);
      for (int n = 0; n < 8 && n < rq.size(); n++) begin
        int y;
        y = 0;
        for (int k = 0; k < 16; k++) y += H[k] * xs[8 * c + n - k + 15];
        check(rq[n] == 32'(y), $sformatf("FIR cluster %0d output %0d: %0d exp %0d", c, n, $signed(rq[n]), y));
      end
    end
    check(n_parallel_max == NC, "all clusters computed in parallel");
    for (int c = 0; c < NC; c++)
      check(t_done[c] - t_start[c] == 78 + 5 + 1, $sformatf("FIR run time cluster %0d: %0d", c, t_done[c] - t_start[c]));

    // ---------------- wrapping burst: write WRAP8 from word 5, read back WRAP4
    q = {};
    for (int k = 0; k < 8; k++) q.push_back($urandom);
    ahb_burst(1'b1, a_dmem(2, 9, 5), HB_WRAP8, 2, 8, q, rq, -1, st, wt);
    check(st == HR_OKAY, "WRAP8 write");
    for (int k = 0; k < 8; k++) begin
      rd(a_dmem(2, 9, (5 + k) % 8), d);
      check(d == q[k], "WRAP8 beat order");
    end
    rd_burst(a_dmem(2, 9, 6), HB_WRAP4, 4, rq);
    for (int k = 0; k < 4 && k < rq.size(); k++) check(rq[k] == q[(4 + (6 + k) % 4 - 5 + 8) % 8], "WRAP4 read order");
    n_wrap += 2;

    // ---------------- divider and floating point on cluster 5
    begin
      logic [31:0] fa, fb;
      fa = rand_f(125, 130); fb = rand_f(125, 130);
      wr(a_sprf(5, 20), fa); wr(a_sprf(5, 21), fb);
      wr(a_irf(5, 8, 0), 32'd1000003); wr(a_irf(5, 9, 0), 32'd97);
      p = {};
      for (int i = 0; i < 20; i++) p.push_back('0);
      p[0].div.op = DIV_QUO;  p[0].div.body = mk(SRC_IRF, 0, SRC_IRF, 0, DST_SPRF, 0, 22);
      p[0].alu0.op = ALU_FADD; p[0].alu0.body = mk(SRC_SPRF, 20, SRC_SPRF, 21, DST_SPRF, 0, 23);
      p[1].alu1.op = ALU_FSUB; p[1].alu1.body = mk(SRC_SPRF, 20, SRC_SPRF, 21, DST_SPRF, 0, 24);
      p[2].mul0.op = MUL_FMUL; p[2].mul0.body = mk(SRC_SPRF, 20, SRC_SPRF, 21, DST_SPRF, 0, 25);
      p[3].mul1.op = MUL_HI;   p[3].mul1.body = mk(SRC_SPRF, 20, SRC_SPRF, 21, DST_SPRF, 0, 26);
      p[17].div.op = DIV_REM;  p[17].div.body = mk(SRC_IRF, 0, SRC_IRF, 0, DST_SPRF, 0, 27);
      p[16].alu0.op = ALU_SRA;  p[16].alu0.body = mk(SRC_SPRF, 20, SRC_IMM, 3, DST_SPRF, 0, 31);
      load_prog(5, p);
      wr(cb(5) | 32'h3000, 32'd18);
      rd(a_sprf(5, 27), d); check(d == 1000003 % 97, "REM");
      rd(a_sprf(5, 22), d); check(d == 1000003 / 97, "QUO");
      rd(a_sprf(5, 23), d); check(d == r2f(f2r(fa) + f2r(fb)), "FADD");
      rd(a_sprf(5, 24), d); check(d == r2f(f2r(fa) - f2r(fb)), "FSUB");
      rd(a_sprf(5, 25), d); check(d == r2f(f2r(fa) * f2r(fb)), "FMUL");
      rd(a_sprf(5, 26), d); check(d == 32'((longint'($signed(fa)) * longint'($signed(fb))) >>> 32), "MUL HI");
      rd(a_sprf(5, 31), d); check(d == 32'($signed(fa) >>> 3), "SRA");
      p = {'0, '0}; p[2] = '0; p[3] = '0;
      p[0].div.op = DIV_FDIV; p[0].div.body = mk(SRC_SPRF, 20, SRC_SPRF, 21, DST_SPRF, 0, 28);
      load_prog(5, p);
      wr(cb(5) | 32'h3000, 32'd1);
      rd(a_sprf(5, 28), d); check(d == r2f(f2r(fa) / f2r(fb)), "FDIV");
      p = {'0};
      p[0].div.op = DIV_SQRT; p[0].div.body = mk(SRC_IRF, 0, SRC_IMM, 0, DST_SPRF, 0, 29);
      load_prog(5, p);
      wr(cb(5) | 32'h3000, 32'd1);
      rd(a_sprf(5, 29), d); check(d == 32'd1000, "SQRT");
    end

    // ---------------- unit latencies: one instruction, fetch to write-back
    begin
      int lat [3];
      for (int u = 0; u < 3; u++) begin
        p = {'0};
        case (u)
          0: begin p[0].alu0.op = ALU_SUB; p[0].alu0.body = mk(SRC_IMM, 30, SRC_IMM, 8, DST_IRF, 7, 3); end
          1: begin p[0].mul0.op = MUL_LO;  p[0].mul0.body = mk(SRC_IMM, 30, SRC_IMM, 8, DST_IRF, 7, 3); end
          default: begin p[0].div.op = DIV_QUO; p[0].div.body = mk(SRC_IMM, 30, SRC_IMM, 8, DST_IRF, 7, 3); end
        endcase
        load_prog(1, p);
        wr(cb(1) | 32'h3000, 32'd1);
        rd(a_irf(1, 7, 3), d);
        check(d == ((u == 0) ? 22 : (u == 1) ? 240 : 3), "latency probe result");
        // fetch is the clock after the start pulse; alu_work rises the clock after write-back
        lat[u] = t_done[1] - t_start[1] - 1;
      end
      check(lat[0] == 6, $sformatf("ALU instruction takes six clocks (%0d)", lat[0]));
      check(lat[1] == 8, $sformatf("MUL instruction takes eight clocks (%0d)", lat[1]));
      check(lat[2] == 20, $sformatf("DIV instruction takes twenty clocks (%0d)", lat[2]));
    end

    // ---------------- ABORT of a program that never ends
    p = {};
    for (int i = 0; i < 128; i++) p.push_back('0);
    load_prog(6, p);
    wr(cb(6) | 32'h3000, 32'd128);
    repeat (20) @(negedge HCLK);
    check(!alu_work[6], "cluster 6 running");
    ahb_read1(a_dmem(6, 0, 0), d, st);
    if (st == HR_RETRY) n_retry++;
    wr(cb(6) | 32'h3004, 32'd0);
    repeat (3) @(negedge HCLK);
    check(alu_work[6], "ABORT stopped cluster 6");
    n_abort++;

    // ---------------- ERROR responses
    ahb_read1(BASE + NC * 32'h4000, d, st);
    check(st == HR_ERROR, "default slave ERROR");
    if (st == HR_ERROR) n_err_def++;
    ahb_read1(cb(4) | 32'h2800, d, st);
    check(st == HR_ERROR, "cluster ERROR for unmapped offset");
    if (st == HR_ERROR) n_err_ip++;
    ahb_read1(a_dmem(0, 8, 0), d, st);
    check(st == HR_OKAY, "bus usable after ERROR");

    // ---------------- stand-alone FPU macros: one-clock latency, exponents
    // kept close so the double-precision reference rounds only once
    fpu_reset = 1'b0;
    for (int v = 0; v < 200; v++) begin
      logic [2:0] op;
      logic [31:0] ra, rb, e12, e3;
      op = (v % 4 == 0) ? FOP_ADD : (v % 4 == 1) ? FOP_SUB : (v % 4 == 2) ? FOP_MUL : FOP_DIV;
      ra = rand_f(120, 135);
      rb = rand_f(120, 135);
      fpu_a = ra; fpu_b = rb; fpu_ops = op;
      @(negedge HCLK);
      e3 = r2f(f2r(ra) / f2r(rb));
      unique case (op)
        FOP_ADD: e12 = r2f(f2r(ra) + f2r(rb));
        FOP_SUB: e12 = r2f(f2r(ra) - f2r(rb));
        FOP_MUL: e12 = r2f(f2r(ra) * f2r(rb));
        default: e12 = e3;
      endcase
      if (op != FOP_DIV) check(fpu1_out == e12, $sformatf("fpu_type1 op %0d %h %h", op, ra, rb));
      check(fpu2_out == e12, $sformatf("fpu_type2 op %0d %h %h", op, ra, rb));
      check(fpu3_out == e3, $sformatf("fpu_type3 %h %h", ra, rb));
      n_fpu++;
    end

    // ---------------- mechanism counts
    $display("mechanisms: first-beat waits %0d, prefetched beats %0d, wrap bursts %0d, RETRY %0d, ERROR ip %0d default %0d, ABORT %0d, UNWRITE_WAIT %0d, clusters in parallel %0d, FPU macro operations %0d",
             n_wait_first, n_prefetch, n_wrap, n_retry, n_err_ip, n_err_def, n_abort, n_unwrite, n_parallel_max, n_fpu);
    check(n_wait_first > 0, "read wait states happened");
    check(n_prefetch > 0, "prefetched burst beats happened");
    check(n_wrap > 0, "wrapping bursts happened");
    check(n_retry > 0, "RETRY happened");
    check(n_err_ip > 0 && n_err_def > 0, "ERROR happened");
    check(n_abort > 0, "ABORT happened");
    check(n_unwrite > 0, "UNWRITE_WAIT happened");
    check(n_parallel_max == NC, "parallel clusters happened");
    check(n_fpu > 0, "FPU macro operations happened");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
