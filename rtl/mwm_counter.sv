// mwm_counter: shift counter of the reducer's controller.
//
// The shift phase must multiply the upper half of z by exactly 2^N, so it has
// to shift the working register N times in total. This counter starts at N
// (on rst or reset_count), and on every clock where the datapath reports a
// shift (count_decrement) and the count is not yet zero it subtracts the
// amount just shifted. shift_done is high while the count is zero; it freezes
// the shift-and-add register.
//
// The counter also chooses the shift amount for the cycle:
//  * USE_LZD = 0: PAR_BITS bits per cycle (1 in the base reducer), never more
//    than the count left.
//  * USE_LZD = 1: the leading zero detector sits inside the counter, as in the
//    source design. It counts the leading zeros of the register's low N bits,
//    and the shift amount is that count plus PAR_BITS, again capped at the
//    count left. The most significant 1 of the register therefore lands in
//    the top bit of the PAR_BITS-bit tag shifted past bit N.
// The count-down, the reset values and the LZD placement follow the source
// algorithm; the synchronous active-high reset and the capping of the LZD
// amount at the remaining count (instead of at a fixed LZD width) are this
// design's choices. sh_reg is read only when USE_LZD is set.
module mwm_counter #(
  parameter int unsigned N        = 384,
  parameter int unsigned PAR_BITS = 1,
  parameter bit          USE_LZD  = 1'b0,
  parameter int unsigned SW       = mwm_pkg::amt_width(N)
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          reset_count,
  input  logic          count_decrement,
  input  logic [N:0]    sh_reg,
  output logic [SW-1:0] shift_amt,
  output logic          shift_done
);

  localparam int unsigned CW = $clog2(N + 1);
  // Room for lz + PAR_BITS before capping.
  localparam int unsigned WW = $clog2(N + PAR_BITS + 1);

  logic [CW-1:0] count;
  logic [WW-1:0] want;

  if (USE_LZD) begin : g_lzd
    logic [CW-1:0] lz;
    mwm_lzd #(.W(N), .CW(CW)) u_lzd (.d(sh_reg[N-1:0]), .lz(lz));
    assign want = WW'(lz) + WW'(PAR_BITS);
  end else begin : g_fixed
    assign want = WW'(PAR_BITS);
  end

  always_comb begin
    if (want > WW'(count)) shift_amt = SW'(count);
    else                   shift_amt = SW'(want);
  end

  assign shift_done = (count == '0);

  always_ff @(posedge clk) begin
    if (rst || reset_count)                count <= CW'(N);
    else if (count_decrement && !shift_done) count <= count - CW'(shift_amt);
  end

endmodule
