// tb_mwm_fsm: checks the controller's state sequence and outputs. It walks
// S0 -> S1 (start low) -> S2 (start high) -> S3 (shift_done) -> S4 -> S5
// (sub_neg) -> S0 with random waits in the states that wait, and checks every
// clock that load_z, reset_count, add_low, sub_flag and done match the state
// a reference sequencer in the testbench expects.
module tb_mwm_fsm;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic rst, start, shift_done, sub_neg;
  logic reset_count, load_z, done, sub_flag, add_low;
  int checks = 0, failures = 0;
  int st;   // reference state number 0..5

  mwm_fsm dut (.clk, .rst, .start, .shift_done, .sub_neg,
               .reset_count, .load_z, .done, .sub_flag, .add_low);

  task automatic check_outputs();
    checks++;
    if (load_z != (st == 1) || reset_count != (st == 1 && start) ||
        add_low != (st == 3) || sub_flag != (st == 4) || done != (st == 5)) begin
      failures++;
      $display("state %0d: load_z=%b reset_count=%b add_low=%b sub_flag=%b done=%b",
               st, load_z, reset_count, add_low, sub_flag, done);
    end
  endtask

  initial begin
    int nxt;
    rst = 1'b1; start = 1'b1; shift_done = 1'b0; sub_neg = 1'b0;
    @(posedge clk); #1 rst = 1'b0; st = 0;
    for (int cyc = 0; cyc < 5000; cyc++) begin
      start      = ($urandom % 3) != 0;
      shift_done = ($urandom % 4) == 0;
      sub_neg    = ($urandom % 3) == 0;
      #1 check_outputs();
      case (st)
        0: nxt = start ? 0 : 1;
        1: nxt = start ? 2 : 1;
        2: nxt = shift_done ? 3 : 2;
        3: nxt = 4;
        4: nxt = sub_neg ? 5 : 4;
        default: nxt = 0;
      endcase
      @(posedge clk); #1 st = nxt;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
