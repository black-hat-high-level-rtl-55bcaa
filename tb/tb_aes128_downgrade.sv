// tb_aes128_downgrade: self-checking test of the AES-128 core and its round-counter downgrade.
// Checks the FIPS-197 example (key 000102..0f, plaintext 00112233..ff), then random keys and
// plaintexts against a reference cipher written here (its S-box is found by searching for each
// byte's inverse, independently of the core's generator): all ten rounds with the Trojan off,
// and with it on only the last seven, using round keys 4..10. It also checks the latency of both
// kinds of run (22 and 19 cycles).
module tb_aes128_downgrade;
  logic clk = 1'b0, rst_n = 1'b0;
  logic start = 1'b0, trojan = 1'b0;
  logic [127:0] key, pt, ct;
  logic busy, done, downgraded;
  int checks = 0, failures = 0;
  logic [7:0] sb [256];

  always #5 clk = ~clk;

  aes128_downgrade dut (.clk, .rst_n, .start, .key, .pt, .trojan, .busy, .done, .ct, .downgraded);

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

  function automatic logic [7:0] mul(input logic [7:0] a, input logic [7:0] b);
    logic [7:0] r = 0;
    for (int k = 7; k >= 0; k--) begin
      r = {r[6:0], 1'b0} ^ (r[7] ? 8'h1b : 8'h00);
      if (b[k]) r ^= a;
    end
    return r;
  endfunction

  function automatic void build_sbox();
    for (int x = 0; x < 256; x++) begin
      logic [7:0] inv = 0, s;
      for (int y = 1; y < 256; y++) if (mul(8'(x), 8'(y)) == 8'h01) inv = 8'(y);
      s = inv ^ {inv[6:0], inv[7]} ^ {inv[5:0], inv[7:6]} ^ {inv[4:0], inv[7:5]} ^ {inv[3:0], inv[7:4]} ^ 8'h63;
      sb[x] = s;
    end
  endfunction

  // reference: state as 16 bytes, byte n at st[n], column-major
  function automatic logic [127:0] ref_encrypt(input logic [127:0] k128, input logic [127:0] p128, input int first);
    logic [7:0] w [176];
    logic [7:0] s [16], t [16];
    logic [7:0] rc = 8'h01;
    logic [127:0] o;
    for (int n = 0; n < 16; n++) w[n] = k128[127 - 8*n -: 8];
    for (int n = 16; n < 176; n += 4) begin
      logic [7:0] tmp [4];
      for (int q = 0; q < 4; q++) tmp[q] = w[n - 4 + q];
      if (n % 16 == 0) begin
        logic [7:0] t0 = tmp[0];
        tmp[0] = sb[tmp[1]] ^ rc; tmp[1] = sb[tmp[2]]; tmp[2] = sb[tmp[3]]; tmp[3] = sb[t0];
        rc = mul(rc, 8'h02);
      end
      for (int q = 0; q < 4; q++) w[n + q] = w[n - 16 + q] ^ tmp[q];
    end
    for (int n = 0; n < 16; n++) s[n] = p128[127 - 8*n -: 8] ^ w[n];
    for (int r = first + 1; r <= 10; r++) begin
      for (int n = 0; n < 16; n++) s[n] = sb[s[n]];
      for (int c = 0; c < 4; c++) for (int rw = 0; rw < 4; rw++) t[rw + 4*c] = s[rw + 4*((c + rw) % 4)];
      for (int c = 0; c < 4; c++) begin
        if (r != 10) begin
          s[4*c]   = mul(t[4*c], 2) ^ mul(t[4*c+1], 3) ^ t[4*c+2] ^ t[4*c+3];
          s[4*c+1] = t[4*c] ^ mul(t[4*c+1], 2) ^ mul(t[4*c+2], 3) ^ t[4*c+3];
          s[4*c+2] = t[4*c] ^ t[4*c+1] ^ mul(t[4*c+2], 2) ^ mul(t[4*c+3], 3);
          s[4*c+3] = mul(t[4*c], 3) ^ t[4*c+1] ^ t[4*c+2] ^ mul(t[4*c+3], 2);
        end else begin
          for (int q = 0; q < 4; q++) s[4*c+q] = t[4*c+q];
        end
      end
      for (int n = 0; n < 16; n++) s[n] ^= w[16*r + n];
    end
    for (int n = 0; n < 16; n++) o[127 - 8*n -: 8] = s[n];
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
    logic [127:0] e_full, e_red;
    build_sbox();
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    key = 128'h000102030405060708090a0b0c0d0e0f;
    pt  = 128'h00112233445566778899aabbccddeeff;
    run(1'b0, cyc);
    check(ct == 128'h69c4e0d86a7b0430d8cdb78070b4c55a, $sformatf("FIPS-197 C.1 ciphertext %h", ct));
    check(cyc == 22, $sformatf("10-round latency %0d", cyc));
    check(ref_encrypt(key, pt, 0) == ct, "reference model agrees on FIPS-197 C.1");
    for (int it = 0; it < 40; it++) begin
      key = {$urandom(), $urandom(), $urandom(), $urandom()};
      pt  = {$urandom(), $urandom(), $urandom(), $urandom()};
      e_full = ref_encrypt(key, pt, 0);
      e_red  = ref_encrypt(key, pt, 3);
      run(1'b0, cyc);
      check(ct == e_full && !downgraded, "10-round ciphertext");
      check(cyc == 22, "10-round latency");
      run(1'b1, cyc);
      check(ct == e_red && downgraded, "7-round ciphertext with the Trojan active");
      check(ct != e_full, "downgraded ciphertext differs");
      check(cyc == 19, $sformatf("7-round latency %0d", cyc));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
