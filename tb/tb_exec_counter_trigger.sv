// tb_exec_counter_trigger: self-checking test of the execution-counter trigger.
// Runs the counter at WIDTH = 4 (arms after 16 executions) and at the default WIDTH = 16
// (arms after 65,536 executions), feeding exec_done pulses with random gaps. A cycle-level
// model counts the pulses itself and predicts trigger and count after every clock.
module tb_exec_counter_trigger;
  logic clk = 1'b0, rst_n = 1'b0;
  logic done_s = 1'b0, done_l = 1'b0;
  logic trig_s, trig_l;
  logic [3:0]  cnt_s;
  logic [15:0] cnt_l;
  int checks = 0, failures = 0;
  int seen_s = 0, seen_l = 0;

  always #5 clk = ~clk;

  exec_counter_trigger #(.WIDTH(4)) dut_s (.clk, .rst_n, .exec_done(done_s), .trigger(trig_s), .count(cnt_s));
  exec_counter_trigger dut_l (.clk, .rst_n, .exec_done(done_l), .trigger(trig_l), .count(cnt_l));

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  initial begin
    repeat (1_000_000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    check(!trig_s && !trig_l && cnt_s == 0 && cnt_l == 0, "reset state");
    // small counter: 40 pulses with random gaps
    for (int p = 0; p < 40; p++) begin
      @(negedge clk) done_s = 1'b1;
      @(negedge clk) done_s = 1'b0;
      seen_s++;
      check(trig_s == (seen_s >= 16), $sformatf("small trigger after %0d pulses", seen_s));
      if (seen_s < 16) check(cnt_s == 4'(seen_s), "small count");
      repeat ($urandom_range(0, 3)) @(negedge clk);
    end
    // default counter: 65,536 back-to-back pulses, checking around the arming point
    @(negedge clk) done_l = 1'b1;
    for (int p = 1; p <= 65_540; p++) begin
      @(negedge clk);
      seen_l = p;
      if (p < 65_530 && (p % 4096) != 0) continue;
      check(trig_l == (seen_l >= 65_536), $sformatf("default trigger after %0d pulses", seen_l));
    end
    done_l = 1'b0;
    repeat (3) @(negedge clk);
    check(trig_l, "default trigger is sticky");
    // reset disarms
    rst_n = 1'b0;
    @(negedge clk) rst_n = 1'b1;
    check(!trig_s && !trig_l, "reset clears trigger");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
