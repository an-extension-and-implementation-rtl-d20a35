// tb_mwm_reducer: end-to-end test of the reducer in several configurations.
//
// Runs the full 768-to-384-bit reducer in its base form, with the leading
// zero detector, with 2-bit and 4-bit parallel tables, with both, and a
// small 16-to-8-bit instance with shortened moduli (long subtract loops).
// Each result is checked against z % m and each latency against a cycle model
// (see mwm_reducer_harness). Every mechanism of the datapath must occur at
// least once: add without shift, shift with table add, multi-bit shift,
// subtract loop in S4 and the start-low wait in S0.
module tb_mwm_reducer;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  localparam int NH = 6;
  logic   fin [NH];
  int     chk [NH], fail [NH], ovf [NH], tag [NH], mul [NH], sub [NH], wl [NH];
  longint cyc [NH];

  // base 768->384, P-384 modulus, z = x*y
  mwm_reducer_harness #(.N(384), .PAR_BITS(1), .USE_LZD(0), .NOPS(12), .MODE(0), .ZMODE(1)) h0 (
    .clk, .finished(fin[0]), .checks(chk[0]), .failures(fail[0]), .n_overflow_add(ovf[0]),
    .n_tag_add(tag[0]), .n_multi_shift(mul[0]), .n_sub_loop(sub[0]), .n_wait_low(wl[0]), .total_cycles(cyc[0]));
  // LZD, random full-length moduli
  mwm_reducer_harness #(.N(384), .PAR_BITS(1), .USE_LZD(1), .NOPS(12), .MODE(1), .ZMODE(0)) h1 (
    .clk, .finished(fin[1]), .checks(chk[1]), .failures(fail[1]), .n_overflow_add(ovf[1]),
    .n_tag_add(tag[1]), .n_multi_shift(mul[1]), .n_sub_loop(sub[1]), .n_wait_low(wl[1]), .total_cycles(cyc[1]));
  // 2-bit parallel (the published parallel datapath)
  mwm_reducer_harness #(.N(384), .PAR_BITS(2), .USE_LZD(0), .NOPS(12), .MODE(1), .ZMODE(0)) h2 (
    .clk, .finished(fin[2]), .checks(chk[2]), .failures(fail[2]), .n_overflow_add(ovf[2]),
    .n_tag_add(tag[2]), .n_multi_shift(mul[2]), .n_sub_loop(sub[2]), .n_wait_low(wl[2]), .total_cycles(cyc[2]));
  // 4-bit parallel with LZD
  mwm_reducer_harness #(.N(384), .PAR_BITS(4), .USE_LZD(1), .NOPS(12), .MODE(0), .ZMODE(1)) h3 (
    .clk, .finished(fin[3]), .checks(chk[3]), .failures(fail[3]), .n_overflow_add(ovf[3]),
    .n_tag_add(tag[3]), .n_multi_shift(mul[3]), .n_sub_loop(sub[3]), .n_wait_low(wl[3]), .total_cycles(cyc[3]));
  // 3-bit parallel, 384 not being a multiple of the step size at the end is fine
  mwm_reducer_harness #(.N(384), .PAR_BITS(3), .USE_LZD(0), .NOPS(8), .MODE(2), .ZMODE(0)) h4 (
    .clk, .finished(fin[4]), .checks(chk[4]), .failures(fail[4]), .n_overflow_add(ovf[4]),
    .n_tag_add(tag[4]), .n_multi_shift(mul[4]), .n_sub_loop(sub[4]), .n_wait_low(wl[4]), .total_cycles(cyc[4]));
  // small 16->8 instance, shortened moduli
  mwm_reducer_harness #(.N(8), .PAR_BITS(1), .USE_LZD(0), .NOPS(200), .MODE(2), .ZMODE(0)) h5 (
    .clk, .finished(fin[5]), .checks(chk[5]), .failures(fail[5]), .n_overflow_add(ovf[5]),
    .n_tag_add(tag[5]), .n_multi_shift(mul[5]), .n_sub_loop(sub[5]), .n_wait_low(wl[5]), .total_cycles(cyc[5]));

  int checks, failures;

  task automatic need(input string what, input int n);
    checks++;
    if (n == 0) begin
      failures++;
      $display("mechanism never exercised: %s", what);
    end else $display("  %-28s %0d", what, n);
  endtask

  initial begin
    int s_ovf, s_tag, s_mul, s_sub, s_wl;
    bit all;
    checks = 0; failures = 0;
    do begin
      @(posedge clk);
      all = 1'b1;
      for (int i = 0; i < NH; i++) all &= fin[i];
    end while (!all);
    s_ovf = 0; s_tag = 0; s_mul = 0; s_sub = 0; s_wl = 0;
    for (int i = 0; i < NH; i++) begin
      checks += chk[i]; failures += fail[i];
      s_ovf += ovf[i]; s_tag += tag[i]; s_mul += mul[i]; s_sub += sub[i]; s_wl += wl[i];
    end
    $display("average clocks per reduction: base P-384 %0d, LZD %0d, 2-bit %0d, 4-bit+LZD P-384 %0d, 3-bit %0d, 8-bit %0d",
             cyc[0] / 12, cyc[1] / 12, cyc[2] / 12, cyc[3] / 12, cyc[4] / 8, cyc[5] / 200);
    need("add without shift", s_ovf);
    need("shift with table add", s_tag);
    need("multi-bit shift", s_mul);
    need("subtract loop in S4", s_sub);
    need("wait for start low in S0", s_wl);
    need("LZD multi-bit shift", mul[1]);
    need("2-bit tag add", tag[2]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
