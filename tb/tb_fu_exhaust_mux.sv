// tb_fu_exhaust_mux: self-checking test of the bit-flipping operand multiplexer.
// Random operands and random idle/trojan patterns; a model predicts the operand seen by the
// functional unit: the real value unless idle and trojan are both high, and otherwise the
// complement of what the unit saw in the previous cycle. It also counts cycles in which every
// operand bit toggled, which must happen in each fake cycle.
module tb_fu_exhaust_mux;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [31:0] val = '0;
  logic idle = 1'b0, trojan = 1'b0;
  logic [31:0] fu_in;
  logic [31:0] prev;
  int checks = 0, failures = 0, fakes = 0, runs_of_two = 0;
  bit prev_fake;

  always #5 clk = ~clk;

  fu_exhaust_mux dut (.clk, .rst_n, .val, .idle, .trojan, .fu_in);

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s at %0t: fu_in=%h", what, $time, fu_in);
    end
  endtask

  initial begin
    repeat (100_000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    prev = fu_in;
    prev_fake = 1'b0;
    for (int k = 0; k < 5000; k++) begin
      @(negedge clk);
      val    = $urandom();
      idle   = $urandom_range(0, 1);
      trojan = $urandom_range(0, 3) != 0;
      #1;
      if (idle && trojan) begin
        check(fu_in == ~prev, "fake operand is the complement of the previous one");
        fakes++;
        if (prev_fake) runs_of_two++;
      end else begin
        check(fu_in == val, "real operand passes through");
      end
      prev_fake = idle && trojan;
      prev = fu_in;
    end
    check(fakes > 100 && runs_of_two > 20, "fake cycles, also back to back, were exercised");
    $display("fake cycles %0d, consecutive %0d", fakes, runs_of_two);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
