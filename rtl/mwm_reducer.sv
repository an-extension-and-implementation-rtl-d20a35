// mwm_reducer: 2N-bit to N-bit modular reducer without multiply or divide.
//
// Computes result = z mod m for a 2N-bit z and an N-bit modulus m, using only
// shifts, adds and subtracts ("mod without mod"). z is split into halves
// z_hi and z_lo, so z = z_hi * 2^N + z_lo.
//  1. Shift phase (controller state S2): z_hi is shifted left N times in the
//     shift-and-add register; whenever bits are pushed past bit N they are
//     dropped and their value mod m, a precomputed multiple of
//     modVal = 2^N mod m, is added back. This yields R = z_hi * 2^N (mod m)
//     with R < 2^(N+1).
//  2. Correction (S3, S4): z_lo is added and m is subtracted until the
//     difference goes negative, leaving R + z_lo reduced below m.
//
// Interface: hold z, modulus and mod_vals stable from the start request until
// done. Take start low, then high: the operation begins when start is seen
// high in state S1. done pulses for one clock in S5; result is valid from then
// until the next operation reaches S3.
// mod_vals[t] must equal (t * 2^N) mod m for t = 1 .. 2^PAR_BITS - 1; entry 1
// is modVal. The modulus must be non-zero and below 2^N. For a modulus with
// its top bit set the subtract loop ends within three clocks; smaller moduli
// are reduced correctly but take about 3 * 2^N / m loop clocks.
//
// Timing (start seen high to done): one clock per shift step (PAR_BITS bits,
// or a run of leading zeros plus PAR_BITS bits with USE_LZD) plus one clock
// per overflowing add, then one clock for S2's last check, S3, the S4 loop
// and S5. With the defaults and the P-384 modulus this is about 390 clocks.
//
// Parameters: N operand half-width (384 in the source design), PAR_BITS bits
// shifted out per clock (1 = base datapath, 2 = the two-bit parallel
// datapath), USE_LZD adds the leading zero detector of the improved design.
// Block structure, state machine and parameter defaults follow the source
// design; the port-level handshake details noted in each sub-block are this
// design's own.
module mwm_reducer #(
  parameter int unsigned N        = 384,
  parameter int unsigned PAR_BITS = 1,
  parameter bit          USE_LZD  = 1'b0
) (
  input  logic                              clk,
  input  logic                              rst,
  input  logic                              start,
  input  logic [2*N-1:0]                    z,
  input  logic [N-1:0]                      modulus,
  input  logic [(1<<PAR_BITS)-1:1][N-1:0]   mod_vals,
  output logic [N-1:0]                      result,
  output logic                              done
);

  localparam int unsigned SW = mwm_pkg::amt_width(N);

  logic          reset_count, load_z, sub_flag, add_low;
  logic          shift_done, count_decrement, sub_neg;
  logic [SW-1:0] shift_amt;
  logic [N:0]    sh_reg;

  mwm_fsm u_fsm (
    .clk, .rst, .start, .shift_done, .sub_neg,
    .reset_count, .load_z, .done, .sub_flag, .add_low
  );

  mwm_counter #(.N(N), .PAR_BITS(PAR_BITS), .USE_LZD(USE_LZD), .SW(SW)) u_counter (
    .clk, .rst, .reset_count, .count_decrement, .sh_reg, .shift_amt, .shift_done
  );

  mwm_shadd #(.N(N), .PAR_BITS(PAR_BITS), .SW(SW)) u_shadd (
    .clk, .rst,
    .load            (load_z),
    .en              (~shift_done),
    .z_hi            (z[2*N-1:N]),
    .shift_amt,
    .mod_vals,
    .sh_reg,
    .count_decrement
  );

  mwm_correct #(.N(N)) u_correct (
    .clk, .rst, .add_low, .sub_flag, .sh_reg,
    .z_lo    (z[N-1:0]),
    .modulus,
    .result,
    .sub_neg
  );

  // The remainder handed out with done is always reduced.
  a_result_reduced: assert property (@(posedge clk) disable iff (rst)
    done |-> (result < modulus));

endmodule
