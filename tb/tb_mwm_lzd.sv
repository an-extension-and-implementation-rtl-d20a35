// tb_mwm_lzd: checks the leading zero detector at the reducer's width (384)
// and exhaustively at 8 bits. Reference: position of the most significant 1
// found by scanning down from the top.
module tb_mwm_lzd;
  logic [383:0] d;
  logic [8:0]   lz;
  logic [7:0]   d8;
  logic [3:0]   lz8;
  int checks = 0, failures = 0;

  mwm_lzd #(.W(384)) dut (.d(d), .lz(lz));
  mwm_lzd #(.W(8))   dut8 (.d(d8), .lz(lz8));

  function automatic int ref_lz384(input logic [383:0] v);
    for (int i = 383; i >= 0; i--) if (v[i]) return 383 - i;
    return 384;
  endfunction

  function automatic int ref_lz8(input logic [7:0] v);
    for (int i = 7; i >= 0; i--) if (v[i]) return 7 - i;
    return 8;
  endfunction

  initial begin
    for (int i = 0; i < 256; i++) begin
      d8 = 8'(i); #1;
      checks++;
      if (int'(lz8) != ref_lz8(d8)) begin
        failures++; $display("W=8 d=%h lz=%0d expected %0d", d8, lz8, ref_lz8(d8));
      end
    end
    for (int i = 0; i < 2000; i++) begin
      for (int k = 0; k < 384; k += 32) d[k +: 32] = $urandom;
      // Clear a random number of top bits so that every count occurs.
      d = d >> ($urandom % 385);
      if (i == 0) d = '0;
      if (i == 1) d = {1'b1, 383'b0};
      #1;
      checks++;
      if (int'(lz) != ref_lz384(d)) begin
        failures++; $display("W=384 lz=%0d expected %0d", lz, ref_lz384(d));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
