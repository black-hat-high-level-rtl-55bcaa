// tb_blackhat_hls_top: end-to-end test of the whole design at its default sizes.
// Each core is first run with its Trojan dormant and checked against known answers; then its
// trigger is fired the way an attacker would: 65,536 executions for the two counter-armed
// cores (run back to back with minimal work), the four secret input words for the two
// detector-armed cores. The same work is then repeated and the Trojan's effect checked:
//   FIR     same sum, one bubble cycle more per tap (32 -> 40 cycles for 8 taps)
//   ADPCM   same results, one fake operation on each shared unit per run
//   SHA-256 18 rounds instead of 64: different digest, 115 -> 69 cycles
//   AES-128 7 rounds instead of 10: different ciphertext, 22 -> 19 cycles
// Every mechanism (bubble, fake add, fake multiply, counter arming, sequence detection, both
// downgrades) is counted, and one that never happened counts as a failure.
module tb_blackhat_hls_top;
  localparam logic [3:0][31:0] SHA_SEQ = {32'h5eed_c0de, 32'h0bad_f00d, 32'hdead_beef, 32'hcafe_babe};
  localparam logic [3:0][31:0] AES_SEQ = {32'h7a11_0ff5, 32'h3c3c_a5a5, 32'h0f1e_2d3c, 32'hbadc_0ffe};
  localparam logic [7:0][31:0] IV = {32'h5be0cd19, 32'h1f83d9ab, 32'h9b05688c, 32'h510e527f,
                                     32'ha54ff53a, 32'h3c6ef372, 32'hbb67ae85, 32'h6a09e667};
  localparam logic [7:0][31:0] ABC_DIGEST = {32'hf20015ad, 32'hb410ff61, 32'h96177a9c, 32'hb00361a3,
                                             32'h5dae2223, 32'h414140de, 32'h8f01cfea, 32'hba7816bf};

  logic clk = 1'b0, rst_n = 1'b0;
  logic fir_mem_we = 0, fir_mem_sel = 0, fir_start = 0;
  logic [2:0] fir_mem_addr = 0;
  logic [31:0] fir_mem_wdata = 0, fir_sum_in = 0, fir_result;
  logic [3:0] fir_ntaps = 0;
  logic fir_busy, fir_done, fir_in_bubble, fir_trojan;
  logic [15:0] fir_exec_count, adpcm_exec_count;
  logic adpcm_start = 0;
  logic signed [31:0] adpcm_d_spl = 0, adpcm_d_szl = 0, adpcm_d_det1 = 0, adpcm_tmp2 = 0, adpcm_tmp3 = 0;
  logic adpcm_busy, adpcm_done, adpcm_add_fake, adpcm_mul_fake, adpcm_trojan;
  logic signed [31:0] adpcm_d_sl, adpcm_d_dlt, adpcm_dl, adpcm_rl;
  logic sha_start = 0;
  logic [7:0][31:0] sha_state_in = '0, sha_state_out;
  logic [15:0][31:0] sha_block = '0;
  logic sha_busy, sha_done, sha_downgraded, sha_trojan;
  logic aes_start = 0;
  logic [127:0] aes_key = '0, aes_pt = '0, aes_ct;
  logic aes_busy, aes_done, aes_downgraded, aes_trojan;

  int checks = 0, failures = 0;
  int n_bubble = 0, n_add_fake = 0, n_mul_fake = 0, n_sha_down = 0, n_aes_down = 0;
  bit fir_armed = 0, adpcm_armed = 0, sha_armed = 0, aes_armed = 0;
  logic [31:0] h [8], z [8];

  always #5 clk = ~clk;

  blackhat_hls_top dut (.*);

  always @(posedge clk) begin
    if (rst_n && fir_in_bubble) n_bubble++;
    if (adpcm_add_fake) n_add_fake++;
    if (adpcm_mul_fake) n_mul_fake++;
    if (sha_done && sha_downgraded) n_sha_down++;
    if (aes_done && aes_downgraded) n_aes_down++;
    if (fir_trojan) fir_armed = 1;
    if (adpcm_trojan) adpcm_armed = 1;
    if (sha_trojan) sha_armed = 1;
    if (aes_trojan) aes_armed = 1;
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------- FIR
  task automatic fir_run8(input logic [31:0] exp_sum, input int exp_cycles);
    int c;
    @(negedge clk);
    fir_ntaps = 4'd8; fir_sum_in = 0; fir_start = 1;
    @(negedge clk) fir_start = 0;
    c = 0;
    while (!fir_done && c < 1000) begin @(negedge clk); c++; end
    check(fir_result == exp_sum, $sformatf("FIR sum %h vs %h", fir_result, exp_sum));
    check(c == exp_cycles, $sformatf("FIR 8-tap latency %0d vs %0d", c, exp_cycles));
  endtask

  task automatic fir_flow();
    logic [31:0] s;
    s = 0;
    for (int k = 0; k < 16; k++) begin
      @(negedge clk);
      fir_mem_we = 1; fir_mem_sel = k[3]; fir_mem_addr = k[2:0];
      fir_mem_wdata = $urandom_range(0, 4000) - 2000;
      if (k < 8) h[k] = fir_mem_wdata; else z[k-8] = fir_mem_wdata;
    end
    @(negedge clk) fir_mem_we = 0;
    for (int k = 0; k < 8; k++) s += h[k] * z[k];
    fir_run8(s, 32);
    check(!fir_trojan && n_bubble == 0, "FIR dormant: no bubbles");
    // age the core: empty runs back to back until the execution counter arms the Trojan
    fir_ntaps = 0; fir_start = 1;
    while (!fir_trojan) @(negedge clk);
    fir_start = 0;
    check(fir_exec_count == 16'd0, "FIR armed after 65,536 executions (counter wrapped)");
    @(negedge clk);
    fir_run8(s, 40);
  endtask

  // ---------------------------------------------------------------- ADPCM
  task automatic adpcm_run(input bit exp_fake);
    int f0, c;
    logic signed [31:0] e_sl, e_dl;
    e_sl = adpcm_d_spl + adpcm_d_szl;
    e_dl = 32'((longint'(adpcm_d_det1) * longint'(adpcm_tmp3)) >>> 15);
    f0 = n_add_fake;
    @(negedge clk) adpcm_start = 1;
    @(negedge clk) adpcm_start = 0;
    c = 0;
    while (!adpcm_done && c < 100) begin @(negedge clk); c++; end
    check(c == 3, "ADPCM three-cycle schedule");
    check(adpcm_d_sl == e_sl && adpcm_dl == e_dl && adpcm_rl == e_dl + e_sl &&
          adpcm_d_dlt == 32'((longint'(adpcm_d_det1) * longint'(adpcm_tmp2)) >>> 15), "ADPCM results");
    check((n_add_fake - f0) == (exp_fake ? 1 : 0), "ADPCM fake operations only when armed");
  endtask

  task automatic adpcm_flow();
    adpcm_d_spl = -1234; adpcm_d_szl = 567; adpcm_d_det1 = 32; adpcm_tmp2 = -20456; adpcm_tmp3 = 24808;
    adpcm_run(0);
    adpcm_start = 1;
    while (!adpcm_trojan) @(negedge clk);
    adpcm_start = 0;
    repeat (6) @(negedge clk);
    adpcm_run(1);
  endtask

  // ---------------------------------------------------------------- SHA-256
  task automatic sha_run(input logic [31:0] w0, input int exp_cycles, input bit exp_down,
                         output logic [7:0][31:0] dig);
    int c;
    sha_state_in = IV;
    sha_block = '0;
    sha_block[0] = w0;
    sha_block[15] = 32'h18;
    @(negedge clk) sha_start = 1;
    @(negedge clk) sha_start = 0;
    c = 1;
    while (!sha_done && c < 1000) begin @(negedge clk); c++; end
    check(c == exp_cycles, $sformatf("SHA latency %0d vs %0d", c, exp_cycles));
    check(sha_downgraded == exp_down, "SHA downgrade flag");
    dig = sha_state_out;
  endtask

  task automatic sha_flow();
    logic [7:0][31:0] d;
    sha_run(32'h61626380, 115, 0, d);
    check(d == ABC_DIGEST, "SHA-256(abc) while dormant");
    for (int k = 0; k < 3; k++) sha_run(SHA_SEQ[k], 115, 0, d);
    sha_run(SHA_SEQ[3], 69, 1, d);     // the last secret word arms the detector
    check(sha_trojan, "SHA detector armed");
    sha_run(32'h61626380, 69, 1, d);
    check(d != ABC_DIGEST, "downgraded SHA-256(abc) differs");
  endtask

  // ---------------------------------------------------------------- AES-128
  task automatic aes_run(input logic [127:0] p, input int exp_cycles, input bit exp_down);
    int c;
    aes_key = 128'h000102030405060708090a0b0c0d0e0f;
    aes_pt = p;
    @(negedge clk) aes_start = 1;
    @(negedge clk) aes_start = 0;
    c = 1;
    while (!aes_done && c < 1000) begin @(negedge clk); c++; end
    check(c == exp_cycles, $sformatf("AES latency %0d vs %0d", c, exp_cycles));
    check(aes_downgraded == exp_down, "AES downgrade flag");
  endtask

  task automatic aes_flow();
    localparam logic [127:0] PT = 128'h00112233445566778899aabbccddeeff;
    localparam logic [127:0] CT = 128'h69c4e0d86a7b0430d8cdb78070b4c55a;
    aes_run(PT, 22, 0);
    check(aes_ct == CT, "FIPS-197 ciphertext while dormant");
    for (int k = 0; k < 3; k++) aes_run({AES_SEQ[k], 96'h0}, 22, 0);
    aes_run({AES_SEQ[3], 96'h0}, 19, 1);
    check(aes_trojan, "AES detector armed");
    aes_run(PT, 19, 1);
    check(aes_ct != CT, "downgraded ciphertext differs");
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    fork
      fir_flow();
      adpcm_flow();
      sha_flow();
      aes_flow();
    join
    check(n_bubble == 8, $sformatf("FIR bubbles (%0d)", n_bubble));
    check(n_add_fake > 0, "fake additions happened");
    check(n_mul_fake > 0, "fake multiplications happened");
    check(fir_armed && adpcm_armed, "both execution counters armed");
    check(sha_armed && aes_armed, "both sequence detectors armed");
    check(n_sha_down == 2 && n_aes_down == 2, "downgraded runs");
    $display("bubbles %0d, fake add %0d, fake mul %0d, SHA downgraded %0d, AES downgraded %0d",
             n_bubble, n_add_fake, n_mul_fake, n_sha_down, n_aes_down);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
