// mwm_reducer_harness: drives one mwm_reducer configuration through NOPS
// random reductions and checks each one.
//
// For every operation it picks z and a modulus m, computes the table
// (t * 2^N) mod m with the simulator's own wide arithmetic, runs the start
// handshake (start low, wait for S1, start high) and waits for done. The
// result is compared with z % m, and the clock count from start to done with
// a step-by-step model of the algorithm's cycle count. The model also counts
// how often each datapath mechanism occurs; since every latency must match
// the model to the clock, these counts are what the reducer did. finished
// goes high at the end.
// MODE: 0 = NIST P-384 modulus (N = 384 only), 1 = random moduli with the
// top bit set, 2 = random moduli 1 to 3 bits shorter than N.
// ZMODE: 0 = z uniformly random below 2^(2N), 1 = z = x * y with x, y < m.
module mwm_reducer_harness #(
  parameter int unsigned N        = 384,
  parameter int unsigned PAR_BITS = 1,
  parameter bit          USE_LZD  = 1'b0,
  parameter int unsigned NOPS     = 20,
  parameter int unsigned MODE     = 1,
  parameter int unsigned ZMODE    = 0
) (
  input  logic clk,
  output logic finished,
  output int   checks,
  output int   failures,
  output int   n_overflow_add,   // add without shift (register bit N set)
  output int   n_tag_add,        // shift that pushed a non-zero tag past bit N
  output int   n_multi_shift,    // shift of more than one bit in a clock
  output int   n_sub_loop,       // subtraction performed in state S4
  output int   n_wait_low,       // clocks with start still high after done (S0 wait)
  output longint total_cycles
);
  localparam int unsigned T = 1 << PAR_BITS;

  logic                rst;
  logic                start;
  logic [2*N-1:0]      z;
  logic [N-1:0]        modulus;
  logic [T-1:1][N-1:0] mod_vals;
  logic [N-1:0]        result;
  logic                done;

  mwm_reducer #(.N(N), .PAR_BITS(PAR_BITS), .USE_LZD(USE_LZD)) dut (
    .clk, .rst, .start, .z, .modulus, .mod_vals, .result, .done
  );

  function automatic logic [N-1:0] rand_bits();
    logic [N-1:0] v;
    for (int i = 0; i < N; i += 32) v = (v << 32) | N'($urandom);
    return v;
  endfunction

  function automatic logic [N-1:0] p384();
    logic [N:0] p;
    p = (N+1)'(1) << 384;
    p = p - ((N+1)'(1) << 128) - ((N+1)'(1) << 96) + ((N+1)'(1) << 32) - (N+1)'(1);
    return p[N-1:0];
  endfunction

  // Clock count model, counted from the edge that sees start high in S1 up to
  // the edge that enters S5: that edge, K shift steps, the S2 check, S3 and L
  // clocks of S4.
  function automatic int expected_cycles(input logic [2*N-1:0] zz,
                                         input logic [N-1:0] m,
                                         input logic [T-1:1][N-1:0] tab,
                                         inout int c_ovf, inout int c_tag,
                                         inout int c_mul, inout int c_sub);
    logic [N:0]            r;
    logic [N+PAR_BITS-1:0] sh;
    logic [N+1:0]          a;
    logic [PAR_BITS-1:0]   tg;
    int                    cnt, k, l, lz, s;
    r = {1'b0, zz[2*N-1:N]};
    cnt = N; k = 0;
    while (cnt > 0) begin
      k++;
      if (r[N]) begin
        c_ovf++;
        r = {1'b0, r[N-1:0]} + {1'b0, tab[1]};
      end else begin
        lz = N;
        for (int i = 0; i < N; i++) if (r[i]) lz = N - 1 - i;
        s = USE_LZD ? lz + PAR_BITS : PAR_BITS;
        if (s > cnt) s = cnt;
        sh = {{PAR_BITS{1'b0}}, r[N-1:0]} << s;
        tg = sh[N+PAR_BITS-1:N];
        if (tg != 0) c_tag++;
        if (s > 1) c_mul++;
        r = {1'b0, sh[N-1:0]} + ((tg != 0) ? {1'b0, tab[tg]} : '0);
        cnt -= s;
      end
    end
    a = {1'b0, r} + {2'b00, zz[N-1:0]};
    if (a >= {2'b00, m}) a = a - {2'b00, m};
    l = 1;
    while (a >= {2'b00, m}) begin a = a - {2'b00, m}; l++; c_sub++; end
    return k + 3 + l;
  endfunction

  initial begin
    logic [2*N-1:0]  zz, ref_z;
    logic [N-1:0]    m, x, y, expect_r;
    logic [N+PAR_BITS:0] big;
    int              cyc, exp_cyc, sh, hold;
    finished = 1'b0; checks = 0; failures = 0;
    n_overflow_add = 0; n_tag_add = 0; n_multi_shift = 0; n_sub_loop = 0;
    n_wait_low = 0; total_cycles = 0;
    rst = 1'b1; start = 1'b1; z = '0; modulus = '1; mod_vals = '0;
    repeat (3) @(posedge clk);
    #1 rst = 1'b0;
    for (int op = 0; op < NOPS; op++) begin
      // Pick the modulus.
      if (MODE == 0) m = p384();
      else begin
        m = rand_bits();
        if (MODE == 2) begin
          sh = 1 + ($urandom % 3);
          m = m >> sh;
          m[N-1-sh] = 1'b1;
        end else m[N-1] = 1'b1;
        if (m == 0) m = 1;
      end
      // Pick z.
      if (ZMODE == 1) begin
        x = rand_bits() % m;
        y = rand_bits() % m;
        zz = {{N{1'b0}}, x} * {{N{1'b0}}, y};
      end else zz = {rand_bits(), rand_bits()};
      // Every fourth operation uses a small upper half, which produces
      // long runs of leading zeros.
      if (op % 4 == 3) zz[2*N-1:N] = zz[2*N-1:N] >> (N - 1 - ($urandom % 8));
      for (int t = 1; t < T; t++) begin
        big = (N+PAR_BITS+1)'(t) << N;
        mod_vals[t] = N'(big % {{(PAR_BITS+1){1'b0}}, m});
      end
      ref_z    = zz % {{N{1'b0}}, m};
      expect_r = ref_z[N-1:0];
      exp_cyc  = expected_cycles(zz, m, mod_vals, n_overflow_add, n_tag_add,
                                 n_multi_shift, n_sub_loop);
      z = zz; modulus = m;
      // Handshake: one clock with start low takes the controller from S0 to
      // S1, then start goes high.
      start = 1'b0;
      @(posedge clk); #1;
      start = 1'b1;
      cyc = 0;
      do begin @(posedge clk); #1; cyc++; end while (!done && cyc < 100000);
      checks += 2;
      if (result !== expect_r) begin
        failures++;
        $display("MISMATCH N=%0d P=%0d LZD=%0d op %0d: got %h expected %h",
                 N, PAR_BITS, USE_LZD, op, result, expect_r);
      end
      if (cyc != exp_cyc) begin
        failures++;
        $display("CYCLES N=%0d P=%0d LZD=%0d op %0d: %0d clocks, expected %0d",
                 N, PAR_BITS, USE_LZD, op, cyc, exp_cyc);
      end
      total_cycles += longint'(cyc);
      // Leave start high for a few clocks: the controller must wait in S0
      // (no new operation, no done) and the result must stay put.
      @(posedge clk); #1;
      hold = $urandom % 4;
      for (int h = 0; h < hold; h++) begin
        n_wait_low++;
        @(posedge clk); #1;
        checks++;
        if (done) begin failures++; $display("done repeated while start stayed high"); end
      end
      checks++;
      if (result !== expect_r) begin
        failures++;
        $display("HOLD N=%0d P=%0d op %0d: result changed after done", N, PAR_BITS, op);
      end
    end
    finished = 1'b1;
  end

endmodule
