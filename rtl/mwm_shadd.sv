// mwm_shadd: shift-and-add section of the reducer.
//
// Holds an N+1 bit register R. On load it takes the upper half of z with a
// zero overflow bit. Afterwards, on every enabled clock, it does one of:
//  * R[N] = 1 (the previous add overflowed): drop bit N, which is worth
//    2^N = modVal (mod m), and add modVal to the low N bits. No shift, and
//    count_decrement is low so the counter does not count this cycle.
//  * R[N] = 0: shift the low N bits left by shift_amt into an N+PAR_BITS bit
//    word. The PAR_BITS bits pushed past bit N form a tag t; they are worth
//    t * 2^N, so they are dropped and mod_vals[t] = (t * 2^N) mod m is added
//    to the low N bits. A zero tag needs no add.
// Each step keeps R congruent, mod m, to z_hi * 2^(shifts so far), so after N
// counted shifts R = z_hi * 2^N (mod m), with R < 2^(N+1).
//
// With PAR_BITS = 1 this is the base datapath (table = modVal only); with
// PAR_BITS = 2 the table holds modVal, modVal2 = 2^(N+1) mod m and
// modValC = (2^N + 2^(N+1)) mod m as in the two-bit parallel datapath; larger
// PAR_BITS generalise the same lookup table to 2^PAR_BITS - 1 entries. The
// table entries are precomputed outside the reducer, like modVal itself.
// The register, its load mux, the overflow add and the shift-then-add
// selection follow the source datapath; folding the per-tag adders and
// muxes into one table lookup and one adder, and the synchronous reset, are
// this design's choices. Register update: en | load, one clock per step.
module mwm_shadd #(
  parameter int unsigned N        = 384,
  parameter int unsigned PAR_BITS = 1,
  parameter int unsigned SW       = mwm_pkg::amt_width(N),
  parameter int unsigned T        = 1 << PAR_BITS
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                load,            // load_z from the controller
  input  logic                en,              // ~shift_done
  input  logic [N-1:0]        z_hi,
  input  logic [SW-1:0]       shift_amt,
  input  logic [T-1:1][N-1:0] mod_vals,        // (t * 2^N) mod m, t = 1..T-1
  output logic [N:0]          sh_reg,
  output logic                count_decrement
);

  logic [N+PAR_BITS-1:0] shifted;
  logic [PAR_BITS-1:0]   tag;
  logic [N-1:0]          addend;
  logic [N-1:0]          add_val;
  logic                  do_add;
  logic [N:0]            sum;
  logic [N:0]            next;

  assign shifted = {{PAR_BITS{1'b0}}, sh_reg[N-1:0]} << shift_amt;
  assign tag     = shifted[N+PAR_BITS-1:N];

  always_comb begin
    if (sh_reg[N]) begin
      // Overflow left by the previous add: add without shifting.
      addend  = sh_reg[N-1:0];
      add_val = mod_vals[1];
      do_add  = 1'b1;
    end else begin
      addend  = shifted[N-1:0];
      add_val = (tag != '0) ? mod_vals[tag] : '0;
      do_add  = (tag != '0);
    end
    sum  = {1'b0, addend} + {1'b0, add_val};
    next = do_add ? sum : {1'b0, shifted[N-1:0]};
  end

  assign count_decrement = ~sh_reg[N];

  always_ff @(posedge clk) begin
    if (rst)       sh_reg <= '0;
    else if (load) sh_reg <= {1'b0, z_hi};
    else if (en)   sh_reg <= next;
  end

endmodule
