// tb_ahb_wrapper: self-checking test of ahb_wrapper.
//
// A cycle-level AHB master (tasks below) drives the wrapper; behind it a
// word memory with a one-clock read stands in for the IP's memories and a
// counter stands in for the cluster (alu_work low for a number of clocks
// after START). Checked:
//   - random single and burst reads/writes of all burst types and sizes
//     against a byte-level shadow memory, including the write byte lanes;
//   - two wait states on the first read beat of a burst and none on the
//     following beats (prefetch), zero wait states on writes;
//   - BUSY inside write bursts (UNWRITE_WAIT state entered);
//   - START gives one start pulse with the end value, accesses during the
//     run get a two-clock RETRY, ABORT gets through and stops the run;
//   - two-clock ERROR for a bad address, a read of START and HSIZE > word.
// The instance is connected with HREADY_in = HREADY as on a one-slave bus.
module tb_ahb_wrapper;
  import mscp_pkg::*;

  logic HCLK = 1'b0, HRESETn;
  logic [31:0] m_haddr, m_hwdata;
  logic m_hwrite;
  htrans_e m_htrans;
  logic [2:0] m_hsize;
  hburst_e m_hburst;
  logic HREADY;
  hresp_e HRESP;
  logic [31:0] HRDATA;
  logic mem_re, mem_we;
  logic [13:0] mem_raddr, mem_waddr;
  logic [3:0] mem_wbe;
  logic [31:0] mem_rdata, mem_wdata;
  logic start, abort_req, alu_work;
  logic [7:0] end_val;

  int checks = 0, failures = 0;

  ahb_wrapper dut (
    .HCLK, .HRESETn, .HSEL(1'b1), .HADDR(m_haddr[13:0]), .HWRITE(m_hwrite),
    .HTRANS(m_htrans), .HSIZE(m_hsize), .HBURST(m_hburst), .HWDATA(m_hwdata),
    .HREADY_in(HREADY), .HREADY, .HRESP, .HRDATA,
    .mem_re, .mem_raddr, .mem_rdata, .mem_we, .mem_waddr, .mem_wbe, .mem_wdata,
    .start, .end_val, .abort_req, .alu_work
  );

  always #5 HCLK = ~HCLK;

  // memory model behind the wrapper
  logic [31:0] mem [4096];
  always_ff @(posedge HCLK) begin
    if (mem_re) mem_rdata <= mem[mem_raddr[13:2]];
    if (mem_we) for (int k = 0; k < 4; k++)
      if (mem_wbe[k]) mem[mem_waddr[13:2]][8*k +: 8] <= mem_wdata[8*k +: 8];
  end

  // cluster model
  int run_cnt = 0, n_start = 0, n_abort = 0;
  logic [7:0] last_end;
  assign alu_work = (run_cnt == 0);
  always_ff @(posedge HCLK) begin
    if (abort_req) begin run_cnt <= 0; n_abort <= n_abort + 1; end
    else if (start) begin run_cnt <= 40; n_start <= n_start + 1; last_end <= end_val; end
    else if (run_cnt > 0) run_cnt <= run_cnt - 1;
  end

  // UNWRITE_WAIT entries
  int n_unwrite = 0;
  always_ff @(posedge HCLK) if (dut.state == dut.S_UNWRITE_WAIT && $past(dut.state) != dut.S_UNWRITE_WAIT) n_unwrite <= n_unwrite + 1;

  initial begin
    repeat (400000) @(posedge HCLK);
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

  // byte-level shadow of the memory model
  logic [7:0] shadow [16384];

  function automatic logic [31:0] rand_addr(int sz);
    logic [31:0] a;
    // a legal data region (IMEM segment 0..4, DMEM/IRF bank 0..9, SPRF)
    case ($urandom_range(3))
      0: a = {18'd0, 2'b00, 7'($urandom), 3'($urandom_range(4)), 2'($urandom)};
      1: a = 32'h1000 | {21'd0, 4'($urandom_range(9)), 5'($urandom), 2'($urandom)};
      2: a = 32'h1800 | {21'd0, 4'($urandom_range(9)), 5'($urandom), 2'($urandom)};
      default: a = 32'h2000 | {25'd0, 5'($urandom), 2'($urandom)};
    endcase
    return a & ~32'((1 << sz) - 1);
  endfunction

  function automatic logic [31:0] lane_data(logic [31:0] a, int sz, logic [31:0] d);
    // data as the master places it on its byte lanes
    return d << (8 * (a[1:0] & ~2'((1 << sz) - 1)));
  endfunction

  initial begin
    logic [31:0] wq [$], rq [$], d, a0;
    int w [$];
    hresp_e st;
    int n, sz, busy_at, n_wait_first, n_wait_rest, tries;
    hburst_e hb;

    HRESETn = 1'b0; m_htrans = HT_IDLE; m_haddr = '0; m_hwrite = 1'b0;
    m_hsize = 3'd2; m_hburst = HB_SINGLE; m_hwdata = '0;
    for (int i = 0; i < 4096; i++) mem[i] = '0;
    for (int i = 0; i < 16384; i++) shadow[i] = '0;
    repeat (3) @(negedge HCLK);
    HRESETn = 1'b1;

    // 4-beat wrapping word burst from data-memory offset 0x34: beats 0x34, 0x38, 0x3C, 0x30
    wq = '{32'h11, 32'h22, 32'h33, 32'h44};
    ahb_burst(1'b1, 32'h1034, HB_WRAP4, 2, 4, wq, rq, -1, st, w);
    @(negedge HCLK);
    check(st == HR_OKAY && mem[32'h1034 >> 2] == 32'h11 && mem[32'h1038 >> 2] == 32'h22 &&
          mem[32'h103C >> 2] == 32'h33 && mem[32'h1030 >> 2] == 32'h44, "WRAP4 from 0x34");
    for (int k = 0; k < 4; k++) for (int b = 0; b < 4; b++)
      shadow[beat_addr(32'h1034, HB_WRAP4, 2, k) + b] = wq[k][8*b +: 8];

    // random bursts
    n_wait_first = 0; n_wait_rest = 0;
    for (int it = 0; it < 1500; it++) begin
      bit wr;
      wr = $urandom_range(1);
      sz = $urandom_range(2);
      hb = hburst_e'($urandom_range(7));
      n  = (hb == HB_SINGLE) ? 1 : (hb == HB_INCR) ? $urandom_range(1, 9) :
           (hb == HB_WRAP4 || hb == HB_INCR4) ? 4 : (hb == HB_WRAP8 || hb == HB_INCR8) ? 8 : 16;
      // every beat inside the start address's region
      forever begin
        bit ok;
        a0 = rand_addr(sz);
        ok = 1;
        for (int k = 0; k < n; k++)
          if (decode_region(14'(beat_addr(a0, hb, sz, k))) != decode_region(14'(a0)) ||
              beat_addr(a0, hb, sz, k) > 32'h3FFF) ok = 0;
        if (ok) break;
      end
      busy_at = ($urandom_range(3) == 0 && n > 1) ? $urandom_range(1, n - 1) : -1;
      wq = {};
      for (int k = 0; k < n; k++) wq.push_back($urandom);
      for (int k = 0; k < n; k++) wq[k] = lane_data(beat_addr(a0, hb, sz, k), sz, wq[k]);
      ahb_burst(wr, a0, hb, sz, n, wq, rq, busy_at, st, w);
      check(st == HR_OKAY, "burst response OKAY");
      if (wr) begin
        for (int k = 0; k < n; k++) begin
          logic [31:0] ba;
          ba = beat_addr(a0, hb, sz, k);
          check(w[k] == 0, "write without wait states");
          for (int b = 0; b < (1 << sz); b++)
            shadow[(ba & ~32'd3) + ba[1:0] + b] = wq[k][8*(ba[1:0] + b) +: 8];
        end
      end else begin
        check(rq.size() == n, "read beat count");
        for (int k = 0; k < n && k < rq.size(); k++) begin
          logic [31:0] ba;
          ba = beat_addr(a0, hb, sz, k);
          for (int b = 0; b < (1 << sz); b++)
            check(rq[k][8*(ba[1:0] + b) +: 8] == shadow[ba + b], "read data");
          if (k == 0) begin check(w[k] == 2, "first read beat: two wait states"); n_wait_first++; end
          else if (!(k == busy_at)) begin check(w[k] == 0, "later read beats: no wait state"); n_wait_rest++; end
        end
      end
    end
    check(n_unwrite > 0, "BUSY in a write burst reached UNWRITE_WAIT");

    // START, RETRY during the run, ABORT
    for (int it = 0; it < 20; it++) begin
      int s0;
      s0 = n_start;
      d = 32'($urandom_range(1, 128));
      ahb_write1(32'h3000, d, st);
      check(st == HR_OKAY, "START accepted");
      @(negedge HCLK);
      check(n_start == s0 + 1 && last_end == d[7:0], "start pulse with end value");
      ahb_read1(32'h1000, d, st);
      check(st == HR_RETRY, "read during ALU_WORK gets RETRY");
      ahb_write1(32'h1000, 32'h1234, st);
      check(st == HR_RETRY, "write during ALU_WORK gets RETRY");
      if (it % 2 == 0) begin
        int a_0;
        a_0 = n_abort;
        ahb_write1(32'h3004, 32'h0, st);
        check(st == HR_OKAY, "ABORT accepted while running");
        @(negedge HCLK);
        check(n_abort == a_0 + 1 && alu_work, "abort pulse stops the run");
      end
      tries = 0;
      do begin ahb_read1(32'h2000, d, st); tries++; end while (st == HR_RETRY && tries < 100);
      if (st != HR_OKAY || tries > 90) $display("after run: st=%0d tries=%0d state=%0d run_cnt=%0d", st, tries, dut.state, run_cnt);
      check(st == HR_OKAY && d == {shadow[32'h2003], shadow[32'h2002], shadow[32'h2001], shadow[32'h2000]},
            "access after the run completes");
    end

    // ERROR responses
    ahb_read1(32'h2800, d, st);   check(st == HR_ERROR, "unmapped read -> ERROR");
    ahb_write1(32'h1500, 1, st);  check(st == HR_ERROR, "bank 10 write -> ERROR");
    ahb_read1(32'h3000, d, st);   check(st == HR_ERROR, "read of START -> ERROR");
    ahb_write1(32'h0018, 1, st);  check(st == HR_ERROR, "IMEM segment 6 -> ERROR");
    ahb_burst(1'b0, 32'h1000, HB_SINGLE, 3, 1, '{}, rq, -1, st, w);
    check(st == HR_ERROR, "doubleword size -> ERROR");
    ahb_read1(32'h1000, d, st);   check(st == HR_OKAY, "OKAY after ERROR");
    check(n_wait_first > 0 && n_wait_rest > 0, "read burst timing covered");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
