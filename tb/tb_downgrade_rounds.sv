// tb_downgrade_rounds: runs every round count of the evaluated downgrade configurations on the
// two crypto cores: SHA-256 built for 64, 48 and 18 remaining rounds and AES-128 for 10, 9, 8
// and 7. All instances get the same random inputs, with the Trojan off (every instance must
// give the full-round result in 115 / 22 cycles) and on (each must give the reference result
// for its round count, in 1 + 48 + R + 2 cycles for SHA-256 and 1 + 10 + R + 1 for AES-128).
module tb_downgrade_rounds;
  import tb_ref_pkg::*;
  localparam int NS = 3, NA = 4;
  localparam int SHA_R [NS] = '{64, 48, 18};
  localparam int AES_R [NA] = '{10, 9, 8, 7};

  logic clk = 1'b0, rst_n = 1'b0;
  logic start = 1'b0, trojan = 1'b0;
  logic [7:0][31:0]  state_in;
  logic [15:0][31:0] block;
  logic [127:0]      key, pt;
  logic [7:0][31:0]  s_out [NS];
  logic [127:0]      a_out [NA];
  logic [NS-1:0] s_done, s_busy, s_down;
  logic [NA-1:0] a_done, a_busy, a_down;
  int s_cyc [NS], a_cyc [NA];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  for (genvar g = 0; g < NS; g++) begin : g_sha
    sha256_downgrade #(.ROUNDS(64), .REDUCED_ROUNDS(SHA_R[g])) dut (
      .clk, .rst_n, .start, .state_in, .block, .trojan, .busy(s_busy[g]), .done(s_done[g]),
      .state_out(s_out[g]), .downgraded(s_down[g]));
  end
  for (genvar g = 0; g < NA; g++) begin : g_aes
    aes128_downgrade #(.ROUNDS(10), .REDUCED_ROUNDS(AES_R[g])) dut (
      .clk, .rst_n, .start, .key, .pt, .trojan, .busy(a_busy[g]), .done(a_done[g]),
      .ct(a_out[g]), .downgraded(a_down[g]));
  end

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (100_000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input bit troj);
    int c;
    @(negedge clk);
    trojan = troj; start = 1'b1;
    @(negedge clk) start = 1'b0;
    foreach (s_cyc[g]) s_cyc[g] = 0;
    foreach (a_cyc[g]) a_cyc[g] = 0;
    c = 1;
    while (c < 200) begin
      for (int g = 0; g < NS; g++) if (s_done[g] && s_cyc[g] == 0) s_cyc[g] = c;
      for (int g = 0; g < NA; g++) if (a_done[g] && a_cyc[g] == 0) a_cyc[g] = c;
      @(negedge clk);
      c++;
    end
  endtask

  initial begin
    logic [7:0][31:0] e;
    logic [127:0] ea;
    int r;
    ref_init();
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int it = 0; it < 12; it++) begin
      for (int q = 0; q < 8; q++)  state_in[q] = $urandom();
      for (int q = 0; q < 16; q++) block[q] = $urandom();
      key = {$urandom(), $urandom(), $urandom(), $urandom()};
      pt  = {$urandom(), $urandom(), $urandom(), $urandom()};
      for (int tr = 0; tr < 2; tr++) begin
        run(tr[0]);
        for (int g = 0; g < NS; g++) begin
          r = tr ? SHA_R[g] : 64;
          e = sha_ref(state_in, block, 64 - r);
          check(s_out[g] == e, $sformatf("SHA-256 %0d rounds result", r));
          check(s_cyc[g] == 1 + 48 + r + 2, $sformatf("SHA-256 %0d rounds latency %0d", r, s_cyc[g]));
          check(s_down[g] == tr[0], "SHA-256 downgrade flag");
        end
        for (int g = 0; g < NA; g++) begin
          r = tr ? AES_R[g] : 10;
          ea = aes_ref(key, pt, 10 - r);
          check(a_out[g] == ea, $sformatf("AES-128 %0d rounds result", r));
          check(a_cyc[g] == 1 + 10 + r + 1, $sformatf("AES-128 %0d rounds latency %0d", r, a_cyc[g]));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
