// ahb_wrapper: AMBA AHB slave wrapper of the ALU cluster IP.
//
// Connects the IP's memories and its start/abort controls to an AHB bus.
// A six-state FSM answers the bus, and an address generation unit (ahb_agu)
// produces the memory addresses of incrementing and wrapping bursts.
//
// States (names from the document):
//   IDLE        nothing in progress; NONSEQ write -> ACCESSIBLE, NONSEQ read
//               -> UNREAD_WAIT, write to START -> ALU_WORK.
//   ACCESSIBLE  transfers proceed with zero wait states. BUSY during a
//               write burst -> UNWRITE_WAIT; a read that does not continue
//               the prefetched burst -> UNREAD_WAIT; no transfer -> IDLE.
//   UNREAD_WAIT the first read of a burst: HREADY is held low for two
//               clocks while the memory read and the prefetch of the next
//               beat are started; then back to ACCESSIBLE, where every
//               following SEQ read of the burst completes in one clock.
//   UNWRITE_WAIT the master sent BUSY inside a write burst; OKAY with zero
//               wait; SEQ/NONSEQ -> ACCESSIBLE.
//   ALU_WORK    the cluster runs. Every access except ABORT gets a
//               two-clock RETRY response; a write to ABORT stops the
//               cluster. When the cluster raises alu_work -> IDLE.
//   ERROR       invalid address, read of a control address, transfer size
//               over a word, or SEQ with no burst in progress: two-clock
//               ERROR response, then IDLE.
// The master must drive IDLE (or repeat the transfer) in the second clock
// of a RETRY or ERROR response, as AHB masters do; address phases in that
// clock are ignored.
//
// Memory side: a read port (mem_rdata valid the clock after mem_re) and a
// write port with byte enables (little-endian lanes from HSIZE and
// HADDR[1:0]); addresses are HADDR-format byte addresses. START/ABORT
// writes give start/abort_req pulses in the write's data phase, with the end
// PC taken from HWDATA[7:0]. mem_wdata and end_val are HWDATA itself, with
// no register: AHB write data is valid during the data phase, which is the
// clock in which the write is performed.
//
// The six states, their entry conditions, the two-clock read latency with
// one-per-clock burst reads after it, RETRY while the cluster works and the
// two-clock ERROR response are the document's. The prefetch mechanism, the
// address map (mscp_pkg), the exact error conditions and the use of
// HREADY_in (the bus-wide HREADY, needed when several slaves share the bus)
// are this design's choices. HSPLITx/HMASTER/HMASTLOCK (split support) are
// not implemented: the IP never answers SPLIT.
module ahb_wrapper
  import mscp_pkg::*;
(
  input  logic        HCLK,
  input  logic        HRESETn,
  input  logic        HSEL,
  input  logic [13:0] HADDR,
  input  logic        HWRITE,
  input  htrans_e     HTRANS,
  input  logic [2:0]  HSIZE,
  input  hburst_e     HBURST,
  input  logic [31:0] HWDATA,
  input  logic        HREADY_in,
  output logic        HREADY,
  output hresp_e      HRESP,
  output logic [31:0] HRDATA,
  // memory side
  output logic        mem_re,
  output logic [13:0] mem_raddr,
  input  logic [31:0] mem_rdata,
  output logic        mem_we,
  output logic [13:0] mem_waddr,
  output logic [3:0]  mem_wbe,
  output logic [31:0] mem_wdata,
  // cluster control
  output logic        start,
  output logic [7:0]  end_val,
  output logic        abort_req,
  input  logic        alu_work
);

  typedef enum logic [2:0] {
    S_IDLE, S_ACCESS, S_ALU_WORK, S_UNREAD_WAIT, S_UNWRITE_WAIT, S_ERROR
  } state_e;

  typedef enum logic [1:0] { W_MEM, W_START, W_ABORT } wkind_e;

  state_e      state;
  logic [1:0]  resp_ph;      // 0 none, 1 first clock, 2 second clock
  hresp_e      resp_kind;
  logic        wcnt;
  logic        wr_dp;
  wkind_e      wr_kind;
  logic [13:0] wr_addr;
  logic [3:0]  wr_wbe;
  logic        wr_burst;     // the last accepted transfer was a write
  logic        primed;       // mem_rdata holds the beat at pred_addr
  logic [13:0] pred_addr;
  logic [31:0] hrdata_q;
  logic        start_pending;
  state_e      st;           // state as seen by this clock's address phase

  // AGU
  logic        agu_load, agu_step;
  logic [13:0] agu_addr, agu_next;

  ahb_agu #(.AW(14)) u_agu (
    .clk(HCLK), .rst_n(HRESETn), .load(agu_load), .load_addr(HADDR),
    .load_size(HSIZE), .load_burst(HBURST), .step(agu_step),
    .addr(agu_addr), .next_addr(agu_next)
  );

  // address-phase decode
  logic    ap_valid, ap_busy, ap_bad, ap_adv, in_burst;
  region_e rgn;
  logic [3:0] be;

  // a finished run counts as IDLE at once, so that a master that keeps
  // retrying is served in the clock the cluster finishes
  assign st = (state == S_ALU_WORK && resp_ph == 2'd0 && alu_work &&
               !start_pending && !wr_dp) ? S_IDLE : state;

  always_comb begin
    ap_valid = HSEL && HREADY_in && (HTRANS == HT_NONSEQ || HTRANS == HT_SEQ);
    ap_busy  = HSEL && HREADY_in && (HTRANS == HT_BUSY);
    rgn      = decode_region(HADDR);
    in_burst = (st == S_ACCESS || st == S_UNWRITE_WAIT);
    ap_bad   = (rgn == RGN_BAD) || (HSIZE > 3'd2) ||
               (!HWRITE && (rgn == RGN_START || rgn == RGN_ABORT)) ||
               (HTRANS == HT_SEQ && !in_burst);
    // a read that continues the prefetched burst
    ap_adv   = ap_valid && !ap_bad && !HWRITE && HTRANS == HT_SEQ &&
               primed && (HADDR == pred_addr) &&
               (st == S_ACCESS);
    unique case (HSIZE)
      3'd0:    be = 4'b0001 << HADDR[1:0];
      3'd1:    be = HADDR[1] ? 4'b1100 : 4'b0011;
      default: be = 4'b1111;
    endcase
  end

  // memory read issue, AGU control
  always_comb begin
    mem_re    = 1'b0;
    mem_raddr = agu_addr;
    agu_step  = 1'b0;
    agu_load  = 1'b0;
    if (st == S_UNREAD_WAIT) begin
      mem_re   = 1'b1;
      agu_step = 1'b1;
    end else if (ap_adv) begin
      mem_re   = 1'b1;
      agu_step = 1'b1;
    end else if (ap_valid && !ap_bad &&
                 (st == S_IDLE || st == S_ACCESS || st == S_UNWRITE_WAIT)) begin
      if (HTRANS == HT_NONSEQ) agu_load = 1'b1;
      else if (HWRITE)         agu_step = 1'b1;
    end
  end

  // bus outputs
  always_comb begin
    HREADY = !(state == S_UNREAD_WAIT || resp_ph == 2'd1);
    HRESP  = (resp_ph != 2'd0) ? resp_kind : HR_OKAY;
    HRDATA = hrdata_q;
    mem_we    = wr_dp && (wr_kind == W_MEM);
    mem_waddr = wr_addr;
    mem_wbe   = wr_wbe;
    mem_wdata = HWDATA;
    start     = wr_dp && (wr_kind == W_START);
    abort_req = wr_dp && (wr_kind == W_ABORT);
    end_val   = HWDATA[7:0];
  end

  always_ff @(posedge HCLK or negedge HRESETn) begin
    if (!HRESETn) begin
      state         <= S_IDLE;
      resp_ph       <= 2'd0;
      resp_kind     <= HR_OKAY;
      wcnt          <= 1'b0;
      wr_dp         <= 1'b0;
      wr_kind       <= W_MEM;
      wr_addr       <= '0;
      wr_wbe        <= '0;
      wr_burst      <= 1'b0;
      primed        <= 1'b0;
      pred_addr     <= '0;
      hrdata_q      <= '0;
      start_pending <= 1'b0;
    end else begin
      wr_dp <= 1'b0;
      start_pending <= 1'b0;
      unique case (st)
        S_IDLE, S_ACCESS, S_UNWRITE_WAIT: begin
          if (ap_valid) begin
            if (ap_bad) begin
              state     <= S_ERROR;
              resp_ph   <= 2'd1;
              resp_kind <= HR_ERROR;
              primed    <= 1'b0;
            end else if (HWRITE) begin
              wr_dp    <= 1'b1;
              wr_wbe   <= be;
              wr_burst <= 1'b1;
              primed   <= 1'b0;
              wr_addr  <= (HTRANS == HT_NONSEQ) ? HADDR : agu_next;
              if (rgn == RGN_START) begin
                wr_kind       <= W_START;
                state         <= S_ALU_WORK;
                start_pending <= 1'b1;
              end else begin
                wr_kind <= (rgn == RGN_ABORT) ? W_ABORT : W_MEM;
                state   <= S_ACCESS;
              end
            end else if (ap_adv) begin
              hrdata_q  <= mem_rdata;
              pred_addr <= agu_addr;
              wr_burst  <= 1'b0;
              state     <= S_ACCESS;
            end else begin
              state    <= S_UNREAD_WAIT;
              wcnt     <= 1'b0;
              primed   <= 1'b0;
              wr_burst <= 1'b0;
            end
          end else if (ap_busy && in_burst && wr_burst) begin
            state <= S_UNWRITE_WAIT;
          end else if (!ap_busy && st != S_UNWRITE_WAIT) begin
            state <= S_IDLE;
          end
        end

        S_UNREAD_WAIT: begin
          wcnt <= 1'b1;
          if (wcnt) begin
            hrdata_q  <= mem_rdata;
            pred_addr <= agu_addr;
            primed    <= 1'b1;
            state     <= S_ACCESS;
          end
        end

        S_ALU_WORK: begin
          if (resp_ph == 2'd1) begin
            resp_ph <= 2'd2;
          end else if (resp_ph == 2'd2) begin
            resp_ph <= 2'd0;
          end else if (ap_valid && HWRITE && rgn == RGN_ABORT) begin
            wr_dp   <= 1'b1;
            wr_kind <= W_ABORT;
          end else if (ap_valid) begin
            resp_ph   <= 2'd1;
            resp_kind <= HR_RETRY;
          end
        end

        S_ERROR: begin
          if (resp_ph == 2'd1) resp_ph <= 2'd2;
          else begin
            resp_ph <= 2'd0;
            state   <= S_IDLE;
          end
        end

        default: state <= S_IDLE;
      endcase
    end
  end

  // AHB rules checked in simulation
  a_ready_in_idle: assert property (@(posedge HCLK) disable iff (!HRESETn)
    (state == S_IDLE && resp_ph == 2'd0) |-> HREADY)
    else $error("ahb_wrapper: wait state while idle");
  a_two_cycle_resp: assert property (@(posedge HCLK) disable iff (!HRESETn)
    (resp_ph == 2'd1) |=> (resp_ph == 2'd2 && HREADY && HRESP == $past(HRESP)))
    else $error("ahb_wrapper: ERROR/RETRY response not two clocks long");

endmodule
