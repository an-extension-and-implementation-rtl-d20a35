// tb_mwm_counter: checks the shift counter with and without the leading zero
// detector. A reference count runs beside each instance: it starts at N on
// reset_count and drops by the expected shift amount (PAR_BITS, or leading
// zeros + PAR_BITS, capped at the count left) on every clock where
// count_decrement is high and the count is not zero. shift_done must be high
// exactly when the reference count is zero.
module tb_mwm_counter;
  localparam int N = 16;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic        rst, reset_count, dec;
  logic [N:0]  r;
  logic [4:0]  amt_a, amt_b;
  logic        done_a, done_b;
  int          cnt_a, cnt_b;
  int checks = 0, failures = 0;
  int lzd_runs = 0;

  mwm_counter #(.N(N), .PAR_BITS(1), .USE_LZD(1'b0)) dut_a (
    .clk, .rst, .reset_count, .count_decrement(dec), .sh_reg(r), .shift_amt(amt_a), .shift_done(done_a));
  mwm_counter #(.N(N), .PAR_BITS(2), .USE_LZD(1'b1)) dut_b (
    .clk, .rst, .reset_count, .count_decrement(dec), .sh_reg(r), .shift_amt(amt_b), .shift_done(done_b));

  function automatic int lz16(input logic [N-1:0] v);
    for (int i = N - 1; i >= 0; i--) if (v[i]) return N - 1 - i;
    return N;
  endfunction

  function automatic int min2(input int x, input int y);
    return (x < y) ? x : y;
  endfunction

  initial begin
    int ea, eb;
    rst = 1'b1; reset_count = 1'b0; dec = 1'b0; r = '0;
    @(posedge clk); #1 rst = 1'b0;
    cnt_a = N; cnt_b = N;
    for (int cyc = 0; cyc < 3000; cyc++) begin
      // Random stimulus; now and then restart the count.
      reset_count = ($urandom % 40) == 0;
      dec = ($urandom % 5) != 0;
      r = 17'($urandom) >> ($urandom % 17);
      #1;
      ea = min2(1, cnt_a);
      eb = min2(lz16(r[N-1:0]) + 2, cnt_b);
      checks += 4;
      if (int'(amt_a) != ea) begin failures++; $display("cyc %0d amt_a %0d exp %0d", cyc, amt_a, ea); end
      if (int'(amt_b) != eb) begin failures++; $display("cyc %0d amt_b %0d exp %0d", cyc, amt_b, eb); end
      if (done_a != (cnt_a == 0)) begin failures++; $display("cyc %0d done_a", cyc); end
      if (done_b != (cnt_b == 0)) begin failures++; $display("cyc %0d done_b", cyc); end
      if (eb > 3 && cnt_b != 0) lzd_runs++;
      @(posedge clk);
      if (reset_count) begin cnt_a = N; cnt_b = N; end
      else if (dec) begin
        if (cnt_a != 0) cnt_a -= ea;
        if (cnt_b != 0) cnt_b -= eb;
      end
      #1;
    end
    checks++;
    if (lzd_runs == 0) begin failures++; $display("no multi-bit LZD shift seen"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
