// tb_ref_pkg: reference models for the testbenches, written independently of the RTL.
// sha_ref runs the SHA-256 compression from a chosen first round; its round constants are
// computed exactly (integer cube roots of the first 64 primes) by ref_init. aes_ref runs
// AES-128 encryption with the rounds after a chosen first one; its S-box is built by ref_init by
// searching each byte's multiplicative inverse. Call ref_init once before using either.
package tb_ref_pkg;

  logic [31:0] kref [64];
  logic [7:0]  sb [256];

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

  function automatic logic [7:0] gmul(input logic [7:0] a, input logic [7:0] b);
    logic [7:0] r;
    r = 0;
    for (int k = 7; k >= 0; k--) begin
      r = {r[6:0], 1'b0} ^ (r[7] ? 8'h1b : 8'h00);
      if (b[k]) r ^= a;
    end
    return r;
  endfunction

  function automatic void ref_init();
    int n;
    bit prime;
    logic [7:0] inv;
    n = 0;
    for (longint unsigned p = 2; n < 64; p++) begin
      prime = 1;
      for (longint unsigned d = 2; d * d <= p; d++) if (p % d == 0) prime = 0;
      if (prime) begin kref[n] = cube_frac(p); n++; end
    end
    for (int x = 0; x < 256; x++) begin
      inv = 0;
      for (int y = 1; y < 256; y++) if (gmul(8'(x), 8'(y)) == 8'h01) inv = 8'(y);
      sb[x] = inv ^ {inv[6:0], inv[7]} ^ {inv[5:0], inv[7:6]} ^ {inv[4:0], inv[7:5]} ^ {inv[3:0], inv[7:4]} ^ 8'h63;
    end
  endfunction

  function automatic logic [31:0] rr(input logic [31:0] x, input int n);
    return (x >> n) | (x << (32 - n));
  endfunction

  function automatic logic [7:0][31:0] sha_ref(input logic [7:0][31:0] hv,
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

  function automatic logic [127:0] aes_ref(input logic [127:0] k128, input logic [127:0] p128, input int first);
    logic [7:0] w [176];
    logic [7:0] s [16], t [16], tmp [4];
    logic [7:0] rc, t0;
    logic [127:0] o;
    rc = 8'h01;
    for (int n = 0; n < 16; n++) w[n] = k128[127 - 8*n -: 8];
    for (int n = 16; n < 176; n += 4) begin
      for (int q = 0; q < 4; q++) tmp[q] = w[n - 4 + q];
      if (n % 16 == 0) begin
        t0 = tmp[0];
        tmp[0] = sb[tmp[1]] ^ rc; tmp[1] = sb[tmp[2]]; tmp[2] = sb[tmp[3]]; tmp[3] = sb[t0];
        rc = gmul(rc, 8'h02);
      end
      for (int q = 0; q < 4; q++) w[n + q] = w[n - 16 + q] ^ tmp[q];
    end
    for (int n = 0; n < 16; n++) s[n] = p128[127 - 8*n -: 8] ^ w[n];
    for (int r = first + 1; r <= 10; r++) begin
      for (int n = 0; n < 16; n++) s[n] = sb[s[n]];
      for (int c = 0; c < 4; c++) for (int rw = 0; rw < 4; rw++) t[rw + 4*c] = s[rw + 4*((c + rw) % 4)];
      for (int c = 0; c < 4; c++) begin
        if (r != 10) begin
          s[4*c]   = gmul(t[4*c], 2) ^ gmul(t[4*c+1], 3) ^ t[4*c+2] ^ t[4*c+3];
          s[4*c+1] = t[4*c] ^ gmul(t[4*c+1], 2) ^ gmul(t[4*c+2], 3) ^ t[4*c+3];
          s[4*c+2] = t[4*c] ^ t[4*c+1] ^ gmul(t[4*c+2], 2) ^ gmul(t[4*c+3], 3);
          s[4*c+3] = gmul(t[4*c], 3) ^ t[4*c+1] ^ t[4*c+2] ^ gmul(t[4*c+3], 2);
        end else begin
          for (int q = 0; q < 4; q++) s[4*c+q] = t[4*c+q];
        end
      end
      for (int n = 0; n < 16; n++) s[n] ^= w[16*r + n];
    end
    for (int n = 0; n < 16; n++) o[127 - 8*n -: 8] = s[n];
    return o;
  endfunction

endpackage
