// mod_add_2cycle: modulo (2^n+1) adder using one binary adder over two cycles.
//
// One n-bit carry-look-ahead binary adder sees x and y for two add cycles.
// Its carry-in is I_x I_y NOT F, where F is a D flip-flop.  A start sets F,
// so the first cycle adds x + y with carry-in 0 and the adder's overflow is Q.
// The clock edge ending that cycle loads Q into F.  In the second cycle the
// carry-in is I_x I_y when Q = 0 (giving x + y + I_x I_y, overflow C_n) and 0
// when Q = 1 (giving x + y - 2^n).  The zero indicator of the result is
//   I_s = NOT (C_n AND NOT F) AND (I_x OR I_y) = (Q OR NOT C_n)(I_x OR I_y).
//
// Interface: clk, rst_n (active low, synchronous), start (one-cycle pulse),
// x, ix, y, iy (must stay stable from the cycle after start until valid);
// s, is_ (the sum), valid (high for the one cycle in which s and is_ hold the
// result), busy, and q (the flip-flop, the first-cycle overflow) and cn as
// status.
// Timing: start in cycle t, first add cycle t+1, result valid in cycle t+2.
//
// The adder, flip-flop and gates follow the document's logic diagram.  The
// document presets the flip-flop asynchronously and clocks it with a delayed
// clock; here it is set synchronously by start and the two add cycles are two
// cycles of one clock, with a small phase counter producing busy and valid.
module mod_add_2cycle #(
  parameter int unsigned N = 16
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [N-1:0] x,
  input  logic         ix,
  input  logic [N-1:0] y,
  input  logic         iy,
  output logic [N-1:0] s,
  output logic         is_,
  output logic         valid,
  output logic         busy,
  output logic         q,
  output logic         cn
);

  typedef enum logic [1:0] {PH_IDLE, PH_ADD1, PH_ADD2} phase_e;

  phase_e phase;
  logic   ff;        // the carry flip-flop (its Q output)
  logic   cin;

  assign cin = ix & iy & ~ff;

  cla_binary_adder #(.N(N)) u_adder (
    .a(x), .b(y), .cin(cin), .sum(s), .cout(cn)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      phase <= PH_IDLE;
      ff    <= 1'b1;
    end else if (start) begin
      phase <= PH_ADD1;
      ff    <= 1'b1;
    end else begin
      unique case (phase)
        PH_ADD1: begin
          ff    <= cn;      // first-cycle overflow Q
          phase <= PH_ADD2;
        end
        PH_ADD2: phase <= PH_IDLE;
        default: phase <= PH_IDLE;
      endcase
    end
  end

  assign is_   = ~(cn & ~ff) & (ix | iy);
  assign valid = (phase == PH_ADD2);
  assign busy  = (phase != PH_IDLE);
  assign q     = ff;

endmodule
