// tb_mwm_par16: the 768 -> 384-bit reducer retiring 16 bits per clock with
// the leading zero detector, on P-384 products z = x * y. Its table has
// 2^16 - 1 entries of 384 bits, (t * 2^384) mod p, computed by the harness
// with the simulator's wide arithmetic. Each result is checked against
// z % p and each latency against the cycle model (see mwm_reducer_harness);
// the average clock count is printed. Building this testbench takes a few
// minutes because of the size of the table.
module tb_mwm_par16;
  localparam int NOPS = 10;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic   fin;
  int     chk, fail, ovf, tag, mul, sub, wl;
  longint cyc;

  mwm_reducer_harness #(.N(384), .PAR_BITS(16), .USE_LZD(1'b1), .NOPS(NOPS), .MODE(0), .ZMODE(1)) h (
    .clk, .finished(fin), .checks(chk), .failures(fail), .n_overflow_add(ovf),
    .n_tag_add(tag), .n_multi_shift(mul), .n_sub_loop(sub), .n_wait_low(wl),
    .total_cycles(cyc));

  int checks, failures;

  initial begin
    checks = 0; failures = 0;
    do @(posedge clk); while (!fin);
    checks = chk + 1; failures = fail;
    if (tag == 0) begin failures++; $display("no table add seen"); end
    $display("768->384 P-384 16-bit+LZD average %0d clocks over %0d reductions", cyc / NOPS, NOPS);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
