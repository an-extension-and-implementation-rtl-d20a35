// tb_mwm_shadd: checks the shift-and-add section (N = 16) with a 2-bit table
// and with the single-bit datapath. For each run a random modulus m with its
// top bit set and the table (t * 2^16) mod m are formed; z_hi is loaded and
// random shift amounts (0 .. 2 or 0 .. 1) are applied. The register is
// compared every clock with an integer model of one step, and its value
// mod m with z_hi * 2^(shifts so far) mod m, which is the invariant the
// reduction rests on.
module tb_mwm_shadd;
  localparam int N = 16;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic               rst, load, en;
  logic [N-1:0]       z_hi;
  logic [4:0]         amt2, amt1;
  logic [3:1][N-1:0]  tab2;
  logic [1:1][N-1:0]  tab1;
  logic [N:0]         r2, r1;
  logic               dec2, dec1;
  int checks = 0, failures = 0;
  int n_ovf = 0, n_tag = 0;

  mwm_shadd #(.N(N), .PAR_BITS(2)) dut2 (
    .clk, .rst, .load, .en, .z_hi, .shift_amt(amt2), .mod_vals(tab2), .sh_reg(r2), .count_decrement(dec2));
  mwm_shadd #(.N(N), .PAR_BITS(1)) dut1 (
    .clk, .rst, .load, .en, .z_hi, .shift_amt(amt1), .mod_vals(tab1), .sh_reg(r1), .count_decrement(dec1));

  // One step of the model: overflow add, or shift then add the table entry.
  function automatic longint step(input longint r, input int s, input longint m, input int p);
    longint v, t;
    if (r >= (64'd1 << N)) return r - (64'd1 << N) + ((64'd1 << N) % m);
    v = r << s;
    t = v >> N;
    return (v & ((64'd1 << N) - 1)) + ((t * (64'd1 << N)) % m);
  endfunction

  function automatic longint powmod(input longint x, input int e, input longint m);
    longint v = x % m;
    for (int i = 0; i < e; i++) v = (v * 2) % m;
    return v;
  endfunction

  initial begin
    longint m, m2, e2, e1;
    int sh2, sh1;
    rst = 1'b1; load = 1'b0; en = 1'b0; z_hi = '0; amt2 = '0; amt1 = '0;
    tab2 = '0; tab1 = '0;
    @(posedge clk); #1 rst = 1'b0;
    for (int run = 0; run < 200; run++) begin
      m = longint'($urandom % 32768) + 32768;
      for (int t = 1; t < 4; t++) tab2[t] = N'((longint'(t) << N) % m);
      tab1[1] = tab2[1];
      z_hi = N'($urandom);
      load = 1'b1; en = 1'b1;
      @(posedge clk); #1 load = 1'b0;
      e2 = {48'd0, z_hi}; e1 = e2; sh2 = 0; sh1 = 0;
      for (int k = 0; k < 24; k++) begin
        amt2 = 5'($urandom % 3);
        amt1 = 5'($urandom % 2);
        en = ($urandom % 6) != 0;
        checks += 2;
        if (dec2 != !r2[N]) begin failures++; $display("count_decrement wrong"); end
        if (dec1 != !r1[N]) begin failures++; $display("count_decrement wrong"); end
        if (r2[N]) n_ovf++;
        else if (amt2 != 0 && ((longint'(r2) << amt2) >> N) != 0) n_tag++;
        @(posedge clk); #1;
        if (en) begin
          if (!e2[N]) sh2 += int'(amt2);
          if (!e1[N]) sh1 += int'(amt1);
          e2 = step(e2, int'(amt2), m, 2);
          e1 = step(e1, int'(amt1), m, 1);
        end
        checks += 4;
        if (longint'(r2) != e2) begin failures++; $display("run %0d P=2 r=%h exp %h", run, r2, e2); end
        if (longint'(r1) != e1) begin failures++; $display("run %0d P=1 r=%h exp %h", run, r1, e1); end
        m2 = powmod({48'd0, z_hi}, sh2, m);
        if (longint'(r2) % m != m2) begin failures++; $display("run %0d P=2 invariant", run); end
        m2 = powmod({48'd0, z_hi}, sh1, m);
        if (longint'(r1) % m != m2) begin failures++; $display("run %0d P=1 invariant", run); end
      end
    end
    checks += 2;
    if (n_ovf == 0) begin failures++; $display("no overflow add seen"); end
    if (n_tag == 0) begin failures++; $display("no tag add seen"); end
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
