// mwm_correct: final correction section of the reducer.
//
// After the shift phase the shift-and-add register R is congruent to
// z_hi * 2^N, so R + z_lo is congruent to z (mod m). This section forms that
// sum and then subtracts m until the difference would go negative, leaving
// the remainder in its register S.
//  * add_low (controller state S3): S <= a - m if that is not negative, else
//    a, with a = R + z_lo.
//  * sub_flag (state S4): a = S; S <= S - m while that is not negative.
//    sub_neg reports a negative difference, which ends the loop.
//  * otherwise S holds, so result stays valid after done.
// result is the low N bits of S. The source design ends with one more
// "add modVal on overflow" step; it is left out here because it can never
// fire: the loop stops only when S - m < 0, so S < m < 2^N and bit N of S is
// clear.
//
// Timing: one clock in S3 plus one clock per subtraction in S4; for a modulus
// with its top bit set (such as P-384) the loop ends within three clocks.
// The add / subtract / select structure follows the source datapath. This
// design's own choices: the difference is one bit wider than a (N+3 bits) so
// that its sign is exact for any modulus, the register is written only in S3
// and S4 (add_low comes from the controller for this), the unreachable final
// add is omitted, and the reset is synchronous.
module mwm_correct #(
  parameter int unsigned N = 384
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         add_low,     // state S3
  input  logic         sub_flag,    // state S4
  input  logic [N:0]   sh_reg,
  input  logic [N-1:0] z_lo,
  input  logic [N-1:0] modulus,
  output logic [N-1:0] result,
  output logic         sub_neg
);

  logic [N+1:0] a_in;      // R + z_lo < 3 * 2^N
  logic [N+1:0] a;
  logic [N+2:0] sub_val;   // signed difference a - m
  logic [N+1:0] post_sub;
  logic [N+1:0] s_reg;

  assign a_in     = {1'b0, sh_reg} + {2'b00, z_lo};
  assign a        = sub_flag ? s_reg : a_in;
  assign sub_val  = {1'b0, a} - {3'b000, modulus};
  assign sub_neg  = sub_val[N+2];
  assign post_sub = sub_neg ? a : sub_val[N+1:0];

  always_ff @(posedge clk) begin
    if (rst)                          s_reg <= '0;
    else if (add_low)                 s_reg <= post_sub;
    else if (sub_flag && !sub_neg)    s_reg <= post_sub;
  end

  assign result = s_reg[N-1:0];

endmodule
