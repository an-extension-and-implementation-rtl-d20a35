// tb_mwm_full: the reducer at its default size (768-bit z, 384-bit modulus,
// single-bit shifting, no leading zero detector) on two workloads:
//  * NIST P-384: z = x * y with x, y < p, as produced by a 384 x 384-bit
//    multiplier in an elliptic-curve field multiplication;
//  * random full-length 384-bit moduli with z = x * y, x, y < m.
// 10,000 reductions of each kind. Each result is compared with z % m. The average clock count per reduction
// (start seen high to done) is reported and checked against the expected
// range: about N = 384 shift clocks plus one clock per overflowing add plus a
// handful of control clocks. For P-384, 2^384 mod p is only 129 bits wide, so
// overflowing adds are rare and the average must lie in 386..396 clocks.
module tb_mwm_full;
  localparam int N    = 384;
  localparam int NOPS = 10000;

  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic               rst, start, done;
  logic [2*N-1:0]     z;
  logic [N-1:0]       modulus, result;
  logic [1:1][N-1:0]  mod_vals;
  int checks = 0, failures = 0;

  mwm_reducer dut (.clk, .rst, .start, .z, .modulus, .mod_vals, .result, .done);

  function automatic logic [N-1:0] rand_bits();
    logic [N-1:0] v;
    for (int i = 0; i < N; i += 32) v = (v << 32) | N'($urandom);
    return v;
  endfunction

  task automatic reduce(input logic [N-1:0] m, input logic [2*N-1:0] zz, output int cyc);
    logic [N:0]     big;
    logic [2*N-1:0] ref_z;
    big = (N+1)'(1) << N;
    mod_vals[1] = N'(big % {1'b0, m});
    modulus = m; z = zz;
    ref_z = zz % {{N{1'b0}}, m};
    start = 1'b0;
    @(posedge clk); #1;
    start = 1'b1;
    cyc = 0;
    do begin @(posedge clk); #1; cyc++; end while (!done && cyc < 5000);
    checks++;
    if (result !== ref_z[N-1:0]) begin
      failures++;
      $display("mismatch: m=%h got %h expected %h", m, result, ref_z[N-1:0]);
    end
    // Leave S5 before the inputs change.
    @(posedge clk); #1;
  endtask

  initial begin
    logic [N:0]   p_ext;
    logic [N-1:0] p, m, x, y;
    int cyc, sum_p, sum_r;
    rst = 1'b1; start = 1'b1; z = '0; modulus = '1; mod_vals = '0;
    repeat (2) @(posedge clk);
    #1 rst = 1'b0;
    p_ext = ((N+1)'(1) << 384) - ((N+1)'(1) << 128) - ((N+1)'(1) << 96)
          + ((N+1)'(1) << 32) - (N+1)'(1);
    p = p_ext[N-1:0];
    sum_p = 0;
    for (int i = 0; i < NOPS; i++) begin
      x = rand_bits() % p; y = rand_bits() % p;
      reduce(p, {{N{1'b0}}, x} * {{N{1'b0}}, y}, cyc);
      sum_p += cyc;
    end
    sum_r = 0;
    for (int i = 0; i < NOPS; i++) begin
      m = rand_bits(); m[N-1] = 1'b1;
      x = rand_bits() % m; y = rand_bits() % m;
      reduce(m, {{N{1'b0}}, x} * {{N{1'b0}}, y}, cyc);
      sum_r += cyc;
    end
    $display("P-384: average %0d clocks per reduction", sum_p / NOPS);
    $display("random 384-bit moduli: average %0d clocks per reduction", sum_r / NOPS);
    checks++;
    if (sum_p / NOPS < 386 || sum_p / NOPS > 396) begin
      failures++; $display("P-384 average clock count outside 386..396");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
