// tb_adpcm_exhaust: self-checking test of the ADPCM decode datapath with the
// battery-exhaustion Trojan.
// For random operands, with the Trojan off and on, it checks the four results against 64-bit
// arithmetic done here, the three-cycle schedule (busy for exactly three cycles, done one cycle
// later), that the shared units run fake operations only in their idle state and only while
// the Trojan is active, and that every operand bit of an idle unit flips in a fake cycle.
module tb_adpcm_exhaust;
  logic clk = 1'b0, rst_n = 1'b0;
  logic start = 1'b0, trojan = 1'b0;
  logic signed [31:0] d_spl, d_szl, d_det1, tmp2, tmp3;
  logic busy, done, add_fake, mul_fake;
  logic signed [31:0] d_sl, d_dlt, dl, rl;
  int checks = 0, failures = 0, add_fakes = 0, mul_fakes = 0;
  logic [31:0] add_a_prev, mul_b_prev;

  always #5 clk = ~clk;

  adpcm_exhaust dut (.clk, .rst_n, .start, .d_spl, .d_szl, .d_det1, .tmp2, .tmp3, .trojan,
                     .busy, .done, .d_sl, .d_dlt, .dl, .rl, .add_fake, .mul_fake);

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  // operand of each unit in the previous cycle, to check full toggling in fake cycles
  always @(posedge clk) begin
    if (add_fake) begin
      add_fakes++;
      check(dut.add_a == ~add_a_prev, "adder operand flips in its idle cycle");
    end
    if (mul_fake) begin
      mul_fakes++;
      check(dut.mul_b == ~mul_b_prev, "multiplier operand flips in its idle cycle");
    end
    check(!add_fake || (trojan && dut.state == dut.C2), "adder fake only in C2 with Trojan");
    check(!mul_fake || (trojan && dut.state == dut.C3), "multiplier fake only in C3 with Trojan");
    add_a_prev <= dut.add_a;
    mul_b_prev <= dut.mul_b;
  end

  initial begin
    repeat (100_000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic signed [31:0] mulsh(input logic signed [31:0] a, input logic signed [31:0] b);
    longint p;
    p = longint'(a) * longint'(b);
    return 32'(p >>> 15);
  endfunction

  task automatic run(input bit troj);
    logic signed [31:0] e_sl, e_dlt, e_dl, e_rl;
    int busy_cycles;
    e_sl  = d_spl + d_szl;
    e_dlt = mulsh(d_det1, tmp2);
    e_dl  = mulsh(d_det1, tmp3);
    e_rl  = e_dl + e_sl;
    @(negedge clk);
    trojan = troj; start = 1'b1;
    @(negedge clk) start = 1'b0;
    busy_cycles = 0;
    while (!done) begin
      if (busy) busy_cycles++;
      @(negedge clk);
      if (busy_cycles > 10) break;
    end
    check(busy_cycles == 3, $sformatf("three-cycle schedule (%0d)", busy_cycles));
    check(d_sl == e_sl && d_dlt == e_dlt && dl == e_dl && rl == e_rl,
          $sformatf("results trojan=%0d: %0d %0d %0d %0d vs %0d %0d %0d %0d",
                    troj, d_sl, d_dlt, dl, rl, e_sl, e_dlt, e_dl, e_rl));
  endtask

  initial begin
    d_spl = 0; d_szl = 0; d_det1 = 0; tmp2 = 0; tmp3 = 0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int it = 0; it < 300; it++) begin
      if (it % 2 == 0) begin
        // magnitudes as in the decoder: 16-bit signals and table values
        d_spl  = $urandom_range(0, 65535) - 32768;
        d_szl  = $urandom_range(0, 65535) - 32768;
        d_det1 = $urandom_range(0, 32767);
        tmp2   = $urandom_range(0, 49151) - 24576;
        tmp3   = $urandom_range(0, 49151) - 24576;
      end else begin
        d_spl = $urandom(); d_szl = $urandom(); d_det1 = $urandom(); tmp2 = $urandom(); tmp3 = $urandom();
      end
      run(1'b0);
      run(1'b1);
    end
    check(add_fakes == 300 && mul_fakes == 300, $sformatf("one fake operation per unit per run with the Trojan (%0d, %0d)", add_fakes, mul_fakes));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
