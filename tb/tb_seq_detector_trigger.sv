// tb_seq_detector_trigger: self-checking test of the input-sequence detector.
// A reference keeps the last four valid samples in a shift window and declares a match when the
// window equals the secret sequence (oldest first); the detector must rise exactly one cycle
// after the first such match. Stimulus mixes random words, values of the sequence in random
// order, partial sequences, repeated first values and cycles with in_valid low.
module tb_seq_detector_trigger;
  localparam logic [3:0][31:0] SEQ = {32'h5eed_c0de, 32'h0bad_f00d, 32'hdead_beef, 32'hcafe_babe};
  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0;
  logic [31:0] in_data = '0;
  logic trigger;
  int checks = 0, failures = 0, fires = 0;
  logic [31:0] win [4];
  bit expect_trig;

  always #5 clk = ~clk;

  seq_detector_trigger dut (.clk, .rst_n, .in_valid, .in_data, .trigger);

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  function automatic logic [31:0] pick();
    int r = $urandom_range(0, 9);
    if (r < 8) return SEQ[r % 4];
    return $urandom();
  endfunction

  // drive one sample, update the reference and compare after the edge
  task automatic sample(input logic v, input logic [31:0] d);
    @(negedge clk);
    in_valid = v;
    in_data  = d;
    if (v && !expect_trig) begin
      win[0] = win[1]; win[1] = win[2]; win[2] = win[3]; win[3] = d;
      if (win[0] == SEQ[0] && win[1] == SEQ[1] && win[2] == SEQ[2] && win[3] == SEQ[3])
        expect_trig = 1'b1;
    end
    @(negedge clk);
    in_valid = 1'b0;
    check(trigger == expect_trig, "trigger against window model");
  endtask

  task automatic do_reset();
    @(negedge clk) rst_n = 1'b0;
    @(negedge clk) rst_n = 1'b1;
    foreach (win[k]) win[k] = 32'h0;
    expect_trig = 1'b0;
  endtask

  initial begin
    repeat (200_000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    do_reset();
    // random traffic, no sequence value: never fires
    for (int k = 0; k < 200; k++) sample(1'b1, $urandom() | 32'h1);
    check(!trigger, "no trigger on random data");
    // partial sequence broken at the last value
    sample(1'b1, SEQ[0]); sample(1'b1, SEQ[1]); sample(1'b1, SEQ[2]); sample(1'b1, SEQ[0]);
    check(!trigger, "broken sequence does not fire");
    // sequence interleaved with invalid cycles, preceded by a repeated first value
    sample(1'b1, SEQ[0]); sample(1'b0, 32'h0); sample(1'b1, SEQ[1]);
    sample(1'b0, SEQ[3]); sample(1'b1, SEQ[2]); sample(1'b1, SEQ[3]);
    check(trigger, "full sequence fires");
    if (trigger) fires++;
    sample(1'b1, 32'h1234);
    check(trigger, "trigger is sticky");
    // random mixes
    for (int run = 0; run < 300; run++) begin
      do_reset();
      for (int k = 0; k < 40; k++) sample($urandom_range(0, 4) != 0, pick());
      if (trigger) fires++;
    end
    check(fires > 1, "random runs fired the trigger at least once");
    $display("random runs that fired: %0d", fires - 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
