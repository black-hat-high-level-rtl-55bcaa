// tb_sha256_downgrade: self-checking test of the SHA-256 core and its round-counter downgrade.
// Checks the FIPS 180-4 digest of "abc", then random blocks and chaining values against a
// reference compression written here (its own constants are generated from the cube roots of
// the first 64 primes, so it shares nothing with the core), running all 64 rounds with the
// Trojan off and only rounds 46..63 with it on. It also checks the latency of both kinds of run
// (115 and 69 cycles) and that the downgraded digest differs from the real one.
module tb_sha256_downgrade;
  logic clk = 1'b0, rst_n = 1'b0;
  logic start = 1'b0, trojan = 1'b0;
  logic [7:0][31:0]  state_in, state_out;
  logic [15:0][31:0] block;
  logic busy, done, downgraded;
  int checks = 0, failures = 0, downgrades = 0;
  logic [31:0] kref [64];

  localparam logic [7:0][31:0] IV = {32'h5be0cd19, 32'h1f83d9ab, 32'h9b05688c, 32'h510e527f,
                                     32'ha54ff53a, 32'h3c6ef372, 32'hbb67ae85, 32'h6a09e667};

  always #5 clk = ~clk;

  sha256_downgrade dut (.clk, .rst_n, .start, .state_in, .block, .trojan, .busy, .done,
                        .state_out, .downgraded);

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (200_000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // k[t] = first 32 bits of the fractional part of the cube root of the t-th prime,
  // found exactly with integer arithmetic: the largest x with x^3 <= p * 2^96
  function automatic logic [31:0] cube_frac(input longint unsigned p);
    logic [127:0] target, lo, hi, mid;
    target = 128'(p) << 96;
    lo = 0; hi = 128'(1) << 40;
    while (hi - lo > 1) begin
      mid = (lo + hi) >> 1;
      if (mid * mid * mid <= target) lo = mid; else hi = mid;
    end
    return lo[31:0];
  endfunction

  function automatic logic [31:0] rr(input logic [31:0] x, input int n);
    return (x >> n) | (x << (32 - n));
  endfunction

  function automatic logic [7:0][31:0] ref_compress(input logic [7:0][31:0] hv,
                                                     input logic [15:0][31:0] blk, input int first);
    logic [31:0] w [64];
    logic [31:0] v [8];
    logic [31:0] s0, s1, t1, t2;
    logic [7:0][31:0] o;
    for (int t = 0; t < 64; t++) begin
      if (t < 16) w[t] = blk[t];
      else begin
        s0 = rr(w[t-15], 7) ^ rr(w[t-15], 18) ^ (w[t-15] >> 3);
        s1 = rr(w[t-2], 17) ^ rr(w[t-2], 19) ^ (w[t-2] >> 10);
        w[t] = w[t-16] + s0 + w[t-7] + s1;
      end
    end
    for (int q = 0; q < 8; q++) v[q] = hv[q];
    for (int t = first; t < 64; t++) begin
      t1 = v[7] + (rr(v[4], 6) ^ rr(v[4], 11) ^ rr(v[4], 25)) + ((v[4] & v[5]) ^ (~v[4] & v[6]))
           + kref[t] + w[t];
      t2 = (rr(v[0], 2) ^ rr(v[0], 13) ^ rr(v[0], 22)) + ((v[0] & v[1]) ^ (v[0] & v[2]) ^ (v[1] & v[2]));
      for (int q = 7; q > 0; q--) v[q] = v[q-1];
      v[4] = v[4] + t1;
      v[0] = t1 + t2;
    end
    for (int q = 0; q < 8; q++) o[q] = hv[q] + v[q];
    return o;
  endfunction

  task automatic run(input bit troj, output int cycles);
    @(negedge clk);
    trojan = troj; start = 1'b1;
    @(negedge clk) start = 1'b0;
    cycles = 1;
    while (!done && cycles < 1000) begin
      @(negedge clk);
      cycles++;
    end
  endtask

  initial begin
    int cyc;
    logic [7:0][31:0] exp_full, exp_red;
    begin
      int n;
      bit prime;
      n = 0;
      for (longint unsigned p = 2; n < 64; p++) begin
        prime = 1;
        for (longint unsigned d = 2; d * d <= p; d++) if (p % d == 0) prime = 0;
        if (prime) begin kref[n] = cube_frac(p); n++; end
      end
    end
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    // "abc", one padded block
    state_in = IV;
    block = '0;
    block[0]  = 32'h61626380;
    block[15] = 32'h00000018;
    run(1'b0, cyc);
    check(state_out[0] == 32'hba7816bf && state_out[1] == 32'h8f01cfea && state_out[2] == 32'h414140de &&
          state_out[3] == 32'h5dae2223 && state_out[4] == 32'hb00361a3 && state_out[5] == 32'h96177a9c &&
          state_out[6] == 32'hb410ff61 && state_out[7] == 32'hf20015ad, "SHA-256(abc)");
    check(cyc == 115, $sformatf("full-round latency %0d", cyc));
    check(ref_compress(IV, block, 0) == state_out, "reference model agrees on abc");
    // random blocks
    for (int it = 0; it < 40; it++) begin
      for (int q = 0; q < 8; q++)  state_in[q] = (it < 20) ? IV[q] : $urandom();
      for (int q = 0; q < 16; q++) block[q] = $urandom();
      exp_full = ref_compress(state_in, block, 0);
      exp_red  = ref_compress(state_in, block, 64 - 18);
      run(1'b0, cyc);
      check(state_out == exp_full && !downgraded, "full digest");
      check(cyc == 115, "full-round latency");
      run(1'b1, cyc);
      check(state_out == exp_red && downgraded, "18-round digest with the Trojan active");
      check(state_out != exp_full, "downgraded digest differs");
      check(cyc == 69, $sformatf("18-round latency %0d", cyc));
      if (downgraded) downgrades++;
    end
    $display("downgraded runs: %0d", downgrades);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
