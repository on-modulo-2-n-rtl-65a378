// mod2n1_alu: modulo (2^n+1) arithmetic unit, top level.
//
// Holds the three modulo (2^n+1) adders and the complementer side by side and
// serves one operation at a time.  Operands use the zero-indicator form
// X = I (x + 1) with m = 2^n + 1; I = 0 means zero and x must then be 0.
//   OP_ADD_CLA  A + B mod m by the single-step modular carry-look-ahead adder
//   OP_ADD_SEL  A + B mod m by two conditional sums and a multiplexer row
//   OP_ADD_SEQ  A + B mod m by one binary adder used for two cycles
//   OP_NEG      m - A mod m (the additive complement of A; B is ignored)
// All three adders give the same sum; they differ in cost and speed.
//
// Interface: start (accepted when busy is low) captures op and both operands
// into registers.  The result r_x, r_i is registered and valid is high for
// one cycle when it appears.  flag_q and flag_cn report the adder's Q (x + y
// overflows n bits) and C_n (x + y + I_a I_b overflows) for the last add,
// and are 0 after OP_NEG.
// Timing: start in cycle t; valid in cycle t+2 for OP_ADD_CLA, OP_ADD_SEL and
// OP_NEG, and in cycle t+3 for OP_ADD_SEQ.  A new start is taken in the cycle
// valid is high.
//
// The arithmetic units are the document's; this wrapper (operand and result
// registers, operation select, handshake, N = 16) is this design's own.
module mod2n1_alu
  import mod2n1_pkg::*;
#(
  parameter int unsigned N = 16
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  op_e          op,
  input  logic [N-1:0] a_x,
  input  logic         a_i,
  input  logic [N-1:0] b_x,
  input  logic         b_i,
  output logic         busy,
  output logic         valid,
  output logic [N-1:0] r_x,
  output logic         r_i,
  output logic         flag_q,
  output logic         flag_cn
);

  op_e          op_r;
  logic [N-1:0] ax_r, bx_r;
  logic         ai_r, bi_r;
  logic         accept;

  assign accept = start & ~busy;

  // Arithmetic units, all fed from the operand registers.
  logic [N-1:0] cla_s, sel_s, seq_s, neg_x;
  logic         cla_i, sel_i, seq_i, neg_i;
  logic         cla_q, cla_cn, sel_q, sel_cn, seq_q, seq_cn;
  logic         seq_valid, seq_busy;

  mod_cla_adder #(.N(N)) u_cla (
    .x(ax_r), .ix(ai_r), .y(bx_r), .iy(bi_r),
    .s(cla_s), .is_(cla_i), .q(cla_q), .cn(cla_cn)
  );

  mod_csel_adder #(.N(N)) u_sel (
    .x(ax_r), .ix(ai_r), .y(bx_r), .iy(bi_r),
    .s(sel_s), .is_(sel_i), .q(sel_q), .cn(sel_cn)
  );

  mod_add_2cycle #(.N(N)) u_seq (
    .clk(clk), .rst_n(rst_n), .start(accept && op == OP_ADD_SEQ),
    .x(ax_r), .ix(ai_r), .y(bx_r), .iy(bi_r),
    .s(seq_s), .is_(seq_i), .valid(seq_valid), .busy(seq_busy),
    .q(seq_q), .cn(seq_cn)
  );

  mod_complement #(.N(N)) u_neg (
    .x(ax_r), .ix(ai_r), .y(neg_x), .iy(neg_i)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy    <= 1'b0;
      valid   <= 1'b0;
      op_r    <= OP_ADD_CLA;
      ax_r    <= '0;
      ai_r    <= 1'b0;
      bx_r    <= '0;
      bi_r    <= 1'b0;
      r_x     <= '0;
      r_i     <= 1'b0;
      flag_q  <= 1'b0;
      flag_cn <= 1'b0;
    end else begin
      valid <= 1'b0;
      if (accept) begin
        busy <= 1'b1;
        op_r <= op;
        ax_r <= a_x;
        ai_r <= a_i;
        bx_r <= b_x;
        bi_r <= b_i;
      end else if (busy) begin
        unique case (op_r)
          OP_ADD_CLA: begin
            r_x <= cla_s;  r_i <= cla_i;  flag_q <= cla_q;  flag_cn <= cla_cn;
            valid <= 1'b1; busy <= 1'b0;
          end
          OP_ADD_SEL: begin
            r_x <= sel_s;  r_i <= sel_i;  flag_q <= sel_q;  flag_cn <= sel_cn;
            valid <= 1'b1; busy <= 1'b0;
          end
          OP_ADD_SEQ: begin
            if (seq_valid) begin
              r_x <= seq_s;  r_i <= seq_i;  flag_q <= seq_q;  flag_cn <= seq_cn;
              valid <= 1'b1; busy <= 1'b0;
            end
          end
          OP_NEG: begin
            r_x <= neg_x;  r_i <= neg_i;  flag_q <= 1'b0;  flag_cn <= 1'b0;
            valid <= 1'b1; busy <= 1'b0;
          end
          default: busy <= 1'b0;
        endcase
      end
    end
  end

  // The two-cycle adder is only started from idle, so it is never busy
  // while the wrapper is idle.
  assert property (@(posedge clk) disable iff (!rst_n) !busy |-> !seq_busy)
    else $error("two-cycle adder busy while the unit is idle");

endmodule
