// tb_mwm_correct: checks the final correction section (N = 16). A random
// register value R < 2^17, lower half z_lo and modulus m are applied; add_low
// is raised for one clock, then sub_flag until sub_neg. The result must equal
// (R + z_lo) mod m, the number of loop clocks must match the number of
// subtractions left after the first one, and the result must hold afterwards.
module tb_mwm_correct;
  localparam int N = 16;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic          rst, add_low, sub_flag, sub_neg;
  logic [N:0]    sh_reg;
  logic [N-1:0]  z_lo, modulus, result;
  int checks = 0, failures = 0;
  int n_loop = 0;

  mwm_correct #(.N(N)) dut (
    .clk, .rst, .add_low, .sub_flag, .sh_reg, .z_lo, .modulus, .result, .sub_neg);

  initial begin
    longint a, expect_r, nsub;
    int loops;
    rst = 1'b1; add_low = 1'b0; sub_flag = 1'b0; sh_reg = '0; z_lo = '0; modulus = 16'h8000;
    @(posedge clk); #1 rst = 1'b0;
    for (int run = 0; run < 500; run++) begin
      sh_reg  = 17'($urandom);
      z_lo    = 16'($urandom);
      // Mostly full-length moduli, some short ones for longer loops.
      modulus = (run % 3 == 0) ? 16'(($urandom % 4000) + 1) : 16'($urandom | 32'h8000);
      a = longint'(sh_reg) + longint'(z_lo);
      expect_r = a % longint'(modulus);
      nsub = a / longint'(modulus);           // subtractions in total
      add_low = 1'b1;
      @(posedge clk); #1 add_low = 1'b0; sub_flag = 1'b1; #1;
      loops = 1;
      while (!sub_neg && loops < 100000) begin @(posedge clk); #1 loops++; end
      @(posedge clk); #1 sub_flag = 1'b0;
      checks += 3;
      if (result != N'(expect_r)) begin
        failures++; $display("run %0d: result %h expected %h", run, result, expect_r);
      end
      // One clock per subtraction beyond the first, plus the negative one.
      if (longint'(loops) != ((nsub > 0) ? nsub : 1)) begin
        failures++; $display("run %0d: %0d loop clocks, %0d subtractions a=%0d m=%0d", run, loops, nsub, a, modulus);
      end
      if (loops > 1) n_loop++;
      repeat (2) @(posedge clk); #1;
      if (result != N'(expect_r)) begin failures++; $display("run %0d: result not held", run); end
    end
    checks++;
    if (n_loop == 0) begin failures++; $display("subtract loop never ran"); end
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
