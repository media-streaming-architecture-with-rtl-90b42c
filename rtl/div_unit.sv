// div_unit: non-pipelined divider / square-root unit of the cluster.
//
// DIV_QUO and DIV_REM divide two unsigned 32-bit numbers with a radix-4
// restoring algorithm, two quotient bits per clock; DIV_SQRT takes the
// integer square root of operand a digit by digit, one root bit (two
// radicand bits) per clock; DIV_FDIV (with FP_EN) returns the
// single-precision quotient a / b. Every operation takes 16 clocks: the
// result appears with out_valid 16 clocks after in_valid. The unit holds one
// operation at a time; busy is high while it works and an operation started
// while busy is dropped (an assertion reports it). Division by zero gives a
// quotient of all ones and a remainder equal to a.
// The document gives the function (quotient, remainder, square root), that
// the unit is not pipelined to save area, and its 20-cycle instruction
// latency, of which 16 clocks are spent here; the algorithms, the unsigned
// operands and the divide-by-zero result are this design's choices.
module div_unit
  import mscp_pkg::*;
#(
  parameter int unsigned TAG_W = 11,
  parameter bit          FP_EN = 1'b1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  div_op_e          op,
  input  logic [31:0]      a,
  input  logic [31:0]      b,
  input  logic [TAG_W-1:0] in_tag,
  output logic             busy,
  output logic             out_valid,
  output logic [31:0]      result,
  output logic [TAG_W-1:0] out_tag
);

  logic [3:0]       cnt;
  div_op_e          op_q;
  logic [TAG_W-1:0] tag_q;
  logic [31:0]      x_q;     // dividend / radicand bits not yet consumed
  logic [31:0]      d_q;     // divisor
  logic [33:0]      r_q;     // partial remainder
  logic [31:0]      q_q;     // quotient / root
  logic [31:0]      f_q;     // FP quotient
  logic [31:0]      fp_y;

  logic             start;
  div_op_e          op_s;
  logic [31:0]      x_s, d_s, q_s, x_n, q_n;
  logic [33:0]      r_s, r_n;

  fp_div u_fdiv (.a(a), .b(b), .y(fp_y));

  assign start = in_valid && (op != DIV_NOP) && !busy;

  // one iteration, applied to the inputs on the start clock and to the
  // registered state afterwards
  always_comb begin
    logic [33:0] t, d1, d2, d3, tr;
    op_s = start ? op : op_q;
    x_s  = start ? a : x_q;
    d_s  = start ? b : d_q;
    r_s  = start ? 34'd0 : r_q;
    q_s  = start ? 32'd0 : q_q;
    t    = {r_s[31:0], x_s[31:30]};
    tr   = {q_s, 2'b01};
    d1   = {2'b00, d_s};
    d2   = {1'b0, d_s, 1'b0};
    d3   = d1 + d2;
    x_n  = {x_s[29:0], 2'b00};
    r_n  = t;
    q_n  = q_s;
    if (op_s == DIV_SQRT) begin
      if (t >= tr) begin
        r_n = t - tr;
        q_n = {q_s[30:0], 1'b1};
      end else begin
        q_n = {q_s[30:0], 1'b0};
      end
    end else begin
      if (t >= d3)      begin r_n = t - d3; q_n = {q_s[29:0], 2'd3}; end
      else if (t >= d2) begin r_n = t - d2; q_n = {q_s[29:0], 2'd2}; end
      else if (t >= d1) begin r_n = t - d1; q_n = {q_s[29:0], 2'd1}; end
      else              begin               q_n = {q_s[29:0], 2'd0}; end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy      <= 1'b0;
      out_valid <= 1'b0;
      cnt       <= '0;
    end else begin
      out_valid <= 1'b0;
      if (start) begin
        busy <= 1'b1;
        cnt  <= 4'd1;
      end else if (busy) begin
        cnt <= cnt + 4'd1;
        if (cnt == 4'd15) begin
          busy      <= 1'b0;
          out_valid <= 1'b1;
        end
      end
    end
  end

  always_ff @(posedge clk) begin
    if (start) begin
      op_q  <= op;
      tag_q <= in_tag;
      d_q   <= b;
      f_q   <= fp_y;
    end
    if (start || busy) begin
      x_q <= x_n;
      r_q <= r_n;
      q_q <= q_n;
    end
  end

  always_comb begin
    unique case (op_q)
      DIV_REM:  result = r_q[31:0];
      DIV_FDIV: result = FP_EN ? f_q : 32'd0;
      default:  result = q_q;
    endcase
    out_tag = tag_q;
  end

  // an operation issued while the unit is busy is lost
  property p_no_issue_when_busy;
    @(posedge clk) disable iff (!rst_n) !(in_valid && (op != DIV_NOP) && busy);
  endproperty
  a_no_issue_when_busy: assert property (p_no_issue_when_busy)
    else $error("div_unit: operation issued while busy");

endmodule
