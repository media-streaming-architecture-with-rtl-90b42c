// tb_alu_cluster: self-checking test of alu_cluster.
//
// Random VLIW programs run on the cluster and on a clock-level reference
// model written for this test. The generator keeps the rules the schedule
// must obey (one result per bank and clock, one division at a time) but
// otherwise mixes all operations, operand sources and destinations with
// random distances between producer and consumer, so the model only agrees
// with the RTL if the fetch/decode/source-select timing and the ALU (2),
// MUL (4) and DIV (16) latencies are exact: instruction i reads its sources
// in clock i+2 and writes in clock i+5 (ALU), i+7 (MUL) or i+19 (DIV); a
// value written in clock w is seen by reads in clock w+1 on.
// Floating-point operations read a block of scratch-pad words holding
// moderate normal numbers; results the model cannot compute exactly (and
// everything derived from them) are marked unknown and not compared.
// IRF banks and the scratch pad are loaded and read back through the
// rfb_* bus port, the data memory and instruction memory are behavioural
// models here. alu_work is checked against the end of the last write, and
// abort_req is checked to stop a running program.
module tb_alu_cluster;
  import mscp_pkg::*;
  import tb_fp_pkg::*;

  logic clk = 1'b0, rst_n;
  logic start, abort_req, alu_work, running;
  logic [7:0] end_val;
  logic imem_re;
  logic [6:0] imem_addr;
  instr_t imem_rdata;
  logic dmem_re [NUM_BANKS], dmem_we [NUM_BANKS];
  logic [4:0] dmem_raddr [NUM_BANKS], dmem_waddr [NUM_BANKS];
  logic [31:0] dmem_rdata [NUM_BANKS], dmem_wdata [NUM_BANKS];
  logic rfb_re, rfb_we, rfb_sprf;
  logic [3:0] rfb_bank, rfb_wbe;
  logic [4:0] rfb_addr;
  logic [31:0] rfb_wdata, rfb_rdata;
  int checks = 0, failures = 0;

  alu_cluster dut (.*);

  always #5 clk = ~clk;

  // instruction and data memory models
  instr_t prog [128];
  logic [31:0] dm [NUM_BANKS][32];
  always_ff @(posedge clk) begin
    if (imem_re) imem_rdata <= prog[imem_addr];
    for (int b = 0; b < NUM_BANKS; b++) begin
      if (dmem_re[b]) dmem_rdata[b] <= dm[b][dmem_raddr[b]];
      if (dmem_we[b]) dm[b][dmem_waddr[b]] <= dmem_wdata[b];
    end
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; if (failures < 20) $display("FAIL: %s (t=%0t)", msg, $time); end
  endtask

  // ------------------------------------------------------------ reference
  logic [31:0] r_irf [NUM_BANKS][32], r_dm [NUM_BANKS][32], r_sp [32];
  bit          u_irf [NUM_BANKS][32], u_dm [NUM_BANKS][32], u_sp [32];   // unknown

  typedef struct { int clk; dst_t dst; logic [31:0] v; bit unk; } wr_t;
  wr_t pend [$];

  function automatic bit nice(logic [31:0] f);
    return f[30:23] >= 8'd100 && f[30:23] <= 8'd160;
  endfunction

  function automatic logic [31:0] isqrt(logic [31:0] x);
    logic [31:0] r = 0;
    for (int k = 15; k >= 0; k--)
      if (64'(r | (32'd1 << k)) * 64'(r | (32'd1 << k)) <= 64'(x)) r = r | (32'd1 << k);
    return r;
  endfunction

  // result of unit u; unk set when the model cannot give an exact value
  function automatic logic [31:0] calc(int u, int op, logic [31:0] x, logic [31:0] y, inout bit unk);
    longint p;
    int ed;
    ed = int'(x[30:23]) - int'(y[30:23]);
    if (u < 2) begin
      case (alu_op_e'(op))
        ALU_ADD: return x + y;
        ALU_SUB: return x - y;
        ALU_ABS: return ($signed(x) < 0) ? -x : x;
        ALU_AND: return x & y;
        ALU_OR:  return x | y;
        ALU_XOR: return x ^ y;
        ALU_NOT: return ~x;
        ALU_SLL: return x << (y % 32);
        ALU_SRL: return x >> (y % 32);
        ALU_SRA: return 32'($signed(x) >>> (y % 32));
        ALU_LT:  return ($signed(x) < $signed(y)) ? 1 : 0;
        ALU_GT:  return ($signed(x) > $signed(y)) ? 1 : 0;
        ALU_EQ:  return (x == y) ? 1 : 0;
        ALU_FADD, ALU_FSUB: begin
          if (!nice(x) || !nice(y) || ed > 20 || ed < -20) begin unk = 1; return 0; end
          return (op == ALU_FADD) ? r2f(f2r(x) + f2r(y)) : r2f(f2r(x) - f2r(y));
        end
        default: return 0;
      endcase
    end else if (u < 4) begin
      p = longint'($signed(x)) * longint'($signed(y));
      case (mul_op_e'(op))
        MUL_LO: return p[31:0];
        MUL_HI: return p[63:32];
        default: begin
          if (!nice(x) || !nice(y)) begin unk = 1; return 0; end
          return r2f(f2r(x) * f2r(y));
        end
      endcase
    end else begin
      case (div_op_e'(op))
        DIV_QUO:  return (y == 0) ? 32'hFFFF_FFFF : x / y;
        DIV_REM:  return (y == 0) ? x : x % y;
        DIV_SQRT: return isqrt(x);
        default: begin
          if (!nice(x) || !nice(y)) begin unk = 1; return 0; end
          return r2f(f2r(x) / f2r(y));
        end
      endcase
    end
  endfunction

  function automatic slot_body_t body_of(instr_t w, int u);
    case (u)
      0: return w.alu0.body;
      1: return w.alu1.body;
      2: return w.mul0.body;
      3: return w.mul1.body;
      default: return w.div.body;
    endcase
  endfunction

  function automatic int op_of(instr_t w, int u);
    case (u)
      0: return int'(w.alu0.op);
      1: return int'(w.alu1.op);
      2: return int'(w.mul0.op);
      3: return int'(w.mul1.op);
      default: return int'(w.div.op);
    endcase
  endfunction

  // runs the reference for a program of n words; returns the last write clock
  function automatic int ref_run(int n);
    int last = -1;
    pend = {};
    for (int c = 0; c < n + 40; c++) begin
      // source selection of instruction c-2
      if (c - 2 >= 0 && c - 2 < n) begin
        instr_t w;
        w = prog[c - 2];
        for (int u = 0; u < NUM_UNITS; u++) begin
          slot_body_t bd;
          logic [31:0] v [2];
          bit unk;
          wr_t e;
          bd = body_of(w, u);
          if (op_of(w, u) == 0) continue;
          unk = 0;
          for (int s = 0; s < 2; s++) begin
            src_t sr;
            int bank;
            sr = (s == 0) ? bd.a : bd.b;
            bank = 2 * u + s;
            case (sr.sel)
              SRC_IRF:  begin v[s] = r_irf[bank][sr.addr]; unk |= u_irf[bank][sr.addr]; end
              SRC_DMEM: begin v[s] = r_dm[bank][sr.addr];  unk |= u_dm[bank][sr.addr]; end
              SRC_SPRF: begin v[s] = r_sp[sr.addr];        unk |= u_sp[sr.addr]; end
              default:  v[s] = {27'd0, sr.addr};
            endcase
          end
          e.v = calc(u, op_of(w, u), v[0], v[1], unk);
          e.unk = unk;
          e.dst = bd.dst;
          e.clk = c + ((u < 2) ? 3 : (u < 4) ? 5 : 17);
          if (bd.dst.sel != DST_NONE) pend.push_back(e);
        end
      end
      // write-back at the end of clock c
      for (int k = 0; k < pend.size(); k++) if (pend[k].clk == c) begin
        dst_t d;
        d = pend[k].dst;
        last = c;
        case (d.sel)
          DST_IRF:  begin r_irf[d.bank][d.addr] = pend[k].v; u_irf[d.bank][d.addr] = pend[k].unk; end
          DST_DMEM: begin r_dm[d.bank][d.addr]  = pend[k].v; u_dm[d.bank][d.addr]  = pend[k].unk; end
          DST_SPRF: begin r_sp[d.addr]          = pend[k].v; u_sp[d.addr]          = pend[k].unk; end
          default: ;
        endcase
      end
    end
    return last;
  endfunction

  // ------------------------------------------------------------ generator
  // per-clock write reservations: [clock][0..9 IRF, 10..19 DMEM, 20 SPRF]
  bit resv [200][21];

  function automatic src_t rand_src(bit fp);
    src_t s;
    if (fp) begin s.sel = SRC_SPRF; s.addr = 5'(24 + $urandom_range(7)); return s; end
    s.sel  = src_sel_e'($urandom_range(3));
    s.addr = 5'($urandom);
    return s;
  endfunction

  function automatic void gen(int n, int mix);
    int last_div = -100;
    for (int c = 0; c < 200; c++) for (int k = 0; k < 21; k++) resv[c][k] = 0;
    for (int i = 0; i < 128; i++) prog[i] = '0;
    for (int i = 0; i < n; i++) begin
      instr_t w;
      w = '0;
      for (int u = 0; u < NUM_UNITS; u++) begin
        slot_body_t bd;
        int op, wc, slot;
        bit fp;
        if ($urandom_range(9) < mix) continue;
        if (u < 2)      begin op = $urandom_range(1, 15); fp = (op >= 14); end
        else if (u < 4) begin op = $urandom_range(1, 3);  fp = (op == 3); end
        else begin
          if (i - last_div < 17) continue;
          op = $urandom_range(1, 4); fp = (op == 4);
          last_div = i;
        end
        bd.a = rand_src(fp && $urandom_range(7) != 0);
        bd.b = rand_src(fp && $urandom_range(7) != 0);
        bd.dst.sel  = dst_sel_e'($urandom_range(1, 3));
        bd.dst.bank = 4'($urandom_range(NUM_BANKS - 1));
        bd.dst.addr = 5'($urandom);
        // the scratch-pad float block stays read-only
        if (bd.dst.sel == DST_SPRF) begin bd.dst.bank = 0; bd.dst.addr = 5'($urandom_range(23)); end
        wc = i + 2 + ((u < 2) ? 3 : (u < 4) ? 5 : 17);
        slot = (bd.dst.sel == DST_IRF) ? int'(bd.dst.bank) :
               (bd.dst.sel == DST_DMEM) ? 10 + int'(bd.dst.bank) : 20;
        if (resv[wc][slot]) bd.dst.sel = DST_NONE;
        else resv[wc][slot] = 1;
        case (u)
          0: begin w.alu0.op = alu_op_e'(op); w.alu0.body = bd; end
          1: begin w.alu1.op = alu_op_e'(op); w.alu1.body = bd; end
          2: begin w.mul0.op = mul_op_e'(op); w.mul0.body = bd; end
          3: begin w.mul1.op = mul_op_e'(op); w.mul1.body = bd; end
          default: begin w.div.op = div_op_e'(op); w.div.body = bd; end
        endcase
      end
      prog[i] = w;
    end
  endfunction

  // ------------------------------------------------------------ bus port
  task automatic rfb_write(bit sp, int bank, int addr, logic [31:0] d);
    @(negedge clk);
    rfb_we = 1'b1; rfb_sprf = sp; rfb_bank = 4'(bank); rfb_addr = 5'(addr);
    rfb_wbe = 4'hF; rfb_wdata = d;
    @(negedge clk);
    rfb_we = 1'b0;
  endtask

  task automatic rfb_read(bit sp, int bank, int addr, output logic [31:0] d);
    @(negedge clk);
    rfb_re = 1'b1; rfb_sprf = sp; rfb_bank = 4'(bank); rfb_addr = 5'(addr);
    @(negedge clk);
    rfb_re = 1'b0;
    d = rfb_rdata;
  endtask

  task automatic init_state();
    for (int b = 0; b < NUM_BANKS; b++)
      for (int a = 0; a < 32; a++) begin
        logic [31:0] v;
        v = ($urandom_range(3) == 0) ? 32'($urandom_range(40)) : $urandom;
        r_irf[b][a] = v; u_irf[b][a] = 0;
        rfb_write(0, b, a, v);
        v = $urandom;
        r_dm[b][a] = v; u_dm[b][a] = 0; dm[b][a] = v;
      end
    for (int a = 0; a < 32; a++) begin
      logic [31:0] v;
      v = (a >= 24) ? rand_f(120, 134) : $urandom;
      r_sp[a] = v; u_sp[a] = 0;
      rfb_write(1, 0, a, v);
    end
  endtask

  task automatic compare_state();
    logic [31:0] d;
    for (int b = 0; b < NUM_BANKS; b++)
      for (int a = 0; a < 32; a++) begin
        rfb_read(0, b, a, d);
        if (!u_irf[b][a]) check(d == r_irf[b][a], $sformatf("IRF bank %0d word %0d: %h exp %h", b, a, d, r_irf[b][a]));
        if (!u_dm[b][a])  check(dm[b][a] == r_dm[b][a], $sformatf("DMEM bank %0d word %0d: %h exp %h", b, a, dm[b][a], r_dm[b][a]));
      end
    for (int a = 0; a < 32; a++) begin
      rfb_read(1, 0, a, d);
      if (!u_sp[a]) check(d == r_sp[a], $sformatf("SPRF word %0d: %h exp %h", a, d, r_sp[a]));
    end
  endtask

  initial begin
    int n, last, t0, t_done, n_fp_checked;
    rst_n = 1'b0; start = 1'b0; abort_req = 1'b0; end_val = '0;
    rfb_re = 1'b0; rfb_we = 1'b0; rfb_sprf = 1'b0; rfb_bank = '0; rfb_addr = '0;
    rfb_wbe = '0; rfb_wdata = '0;
    for (int i = 0; i < 128; i++) prog[i] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int it = 0; it < 40; it++) begin
      n = (it < 3) ? 1 : $urandom_range(5, 100);
      init_state();
      gen(n, (it < 3) ? 0 : $urandom_range(2, 8));
      if (it < 3) begin
        // single instructions: one ALU, MUL or DIV result
        prog[0] = '0;
        case (it)
          0: begin prog[0].alu0.op = ALU_ADD; prog[0].alu0.body.a = '{SRC_IMM, 5'd7};
                   prog[0].alu0.body.b = '{SRC_IMM, 5'd9}; prog[0].alu0.body.dst = '{DST_IRF, 4'd3, 5'd1}; end
          1: begin prog[0].mul0.op = MUL_LO; prog[0].mul0.body.a = '{SRC_IMM, 5'd7};
                   prog[0].mul0.body.b = '{SRC_IMM, 5'd9}; prog[0].mul0.body.dst = '{DST_IRF, 4'd3, 5'd1}; end
          default: begin prog[0].div.op = DIV_QUO; prog[0].div.body.a = '{SRC_IMM, 5'd31};
                   prog[0].div.body.b = '{SRC_IMM, 5'd4}; prog[0].div.body.dst = '{DST_IRF, 4'd3, 5'd1}; end
        endcase
      end
      last = ref_run(n);
      // run: instruction 0 is fetched in the clock after the start pulse
      @(negedge clk);
      start = 1'b1; end_val = 8'(n);
      @(negedge clk);
      start = 1'b0;
      t0 = 0; t_done = -1;
      check(!alu_work && running, "alu_work low while running");
      for (int c = 1; c < 300 && t_done < 0; c++) begin
        @(negedge clk);
        if (alu_work) t_done = c;
      end
      // alu_work rises in the clock after the last write
      if (last >= 0) check(t_done == last + 1, $sformatf("done after last write: %0d vs %0d", t_done, last + 1));
      if (it == 0) check(r_irf[3][1] == 16 && last == 5, "single ADD writes in clock 5 (6 clocks)");
      if (it == 1) check(r_irf[3][1] == 63 && last == 7, "single MUL writes in clock 7 (8 clocks)");
      if (it == 2) check(r_irf[3][1] == 7 && last == 19, "single DIV writes in clock 19 (20 clocks)");
      compare_state();
    end
    // abort
    for (int it = 0; it < 5; it++) begin
      gen(120, 2);
      @(negedge clk);
      start = 1'b1; end_val = 8'd120;
      @(negedge clk);
      start = 1'b0;
      repeat ($urandom_range(5, 60)) @(negedge clk);
      abort_req = 1'b1;
      @(negedge clk);
      abort_req = 1'b0;
      check(!running, "abort stops the program");
      t_done = -1;
      for (int c = 0; c < 40 && t_done < 0; c++) begin
        if (alu_work) t_done = c;
        @(negedge clk);
      end
      check(t_done >= 0 && t_done <= 18, "alu_work after abort once in-flight work drains");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
