// tb_mwm_workloads: the evaluated configurations of the reducer, each run on
// random operands with every result checked against z % m and every latency
// against the cycle model (see mwm_reducer_harness):
//  * 768 -> 384 bits, P-384 modulus, z = x * y: base, with the leading zero
//    detector, and with 2, 3, 4 and 8 bits shifted out per clock (with LZD);
//  * 16 -> 8 bits with random full-length 8-bit moduli.
// It prints the average clock count of each for comparison with published
// figures for the same configurations.
module tb_mwm_workloads;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  localparam int NH = 7;
  localparam int OPS [NH] = '{100, 100, 100, 100, 100, 100, 2000};
  logic   fin [NH];
  int     chk [NH], fail [NH], ovf [NH], tag [NH], mul [NH], sub [NH], wl [NH];
  longint cyc [NH];

`define MWM_H(I, NN, P, L, MD, ZM) \
  mwm_reducer_harness #(.N(NN), .PAR_BITS(P), .USE_LZD(L), .NOPS(OPS[I]), .MODE(MD), .ZMODE(ZM)) h``I ( \
    .clk, .finished(fin[I]), .checks(chk[I]), .failures(fail[I]), .n_overflow_add(ovf[I]), \
    .n_tag_add(tag[I]), .n_multi_shift(mul[I]), .n_sub_loop(sub[I]), .n_wait_low(wl[I]), \
    .total_cycles(cyc[I]));

  `MWM_H(0, 384, 1, 1'b0, 0, 1)
  `MWM_H(1, 384, 1, 1'b1, 0, 1)
  `MWM_H(2, 384, 2, 1'b1, 0, 1)
  `MWM_H(3, 384, 3, 1'b1, 0, 1)
  `MWM_H(4, 384, 4, 1'b1, 0, 1)
  `MWM_H(5, 384, 8, 1'b1, 0, 1)
  `MWM_H(6, 8,   1, 1'b0, 1, 0)

  int checks = 0, failures = 0;
  string label [NH] = '{"768->384 P-384 base", "768->384 P-384 LZD",
                        "768->384 P-384 2-bit+LZD", "768->384 P-384 3-bit+LZD",
                        "768->384 P-384 4-bit+LZD", "768->384 P-384 8-bit+LZD",
                        "16->8 random moduli"};

  initial begin
    bit all;
    do begin
      @(posedge clk);
      all = 1'b1;
      for (int i = 0; i < NH; i++) all &= fin[i];
    end while (!all);
    for (int i = 0; i < NH; i++) begin
      checks += chk[i]; failures += fail[i];
      $display("%-28s average %0d clocks over %0d reductions", label[i], cyc[i] / OPS[i], OPS[i]);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
