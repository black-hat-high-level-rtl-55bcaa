// tb_fir_degradation: self-checking test of the FIR accelerator with FSM bubbles.
// Two instances: the default one (one bubble per iteration, only while the Trojan is active)
// and a coverage-safe one with three bubbles (one bubble cycle always, three more when active).
// For random coefficients, samples, initial sums and tap counts (including 0 and counts above
// the memory depth, which are clamped) the testbench computes the sum itself and predicts the
// latency from the state count per iteration, with the Trojan off and on. The result must not
// depend on the Trojan; the cycle count must grow by exactly the bubble cycles.
module tb_fir_degradation;
  localparam int DEPTH = 8;
  logic clk = 1'b0, rst_n = 1'b0;
  logic mem_we = 1'b0, mem_sel = 1'b0;
  logic [2:0]  mem_addr = '0;
  logic [31:0] mem_wdata = '0;
  logic start = 1'b0, trojan = 1'b0;
  logic [3:0]  ntaps = '0;
  logic [31:0] sum_in = '0;
  logic busy0, done0, bub0, busy1, done1, bub1;
  logic [31:0] res0, res1;
  logic [31:0] h [DEPTH], z [DEPTH];
  int checks = 0, failures = 0, bubble_cycles0 = 0, bubble_cycles1 = 0;

  always #5 clk = ~clk;

  fir_degradation dut0 (.clk, .rst_n, .mem_we, .mem_sel, .mem_addr, .mem_wdata, .start, .ntaps,
                        .sum_in, .trojan, .busy(busy0), .done(done0), .result(res0), .in_bubble(bub0));
  fir_degradation #(.BUBBLES(3), .COVER_SAFE(1'b1)) dut1 (
                        .clk, .rst_n, .mem_we, .mem_sel, .mem_addr, .mem_wdata, .start, .ntaps,
                        .sum_in, .trojan, .busy(busy1), .done(done1), .result(res1), .in_bubble(bub1));

  always @(posedge clk) begin
    if (bub0) bubble_cycles0++;
    if (bub1) bubble_cycles1++;
  end

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

  task automatic fill();
    for (int s = 0; s < 2; s++)
      for (int a = 0; a < DEPTH; a++) begin
        @(negedge clk);
        mem_we = 1'b1; mem_sel = s[0]; mem_addr = 3'(a);
        mem_wdata = ($urandom_range(0, 3) == 0) ? $urandom() : 32'($urandom_range(0, 2000)) - 1000;
        if (s == 0) h[a] = mem_wdata; else z[a] = mem_wdata;
      end
    @(negedge clk) mem_we = 1'b0;
  endtask

  // one run on both instances; measure cycles from the start edge to done
  task automatic run(input int n, input bit troj);
    logic [31:0] exp_sum;
    int nn, c0, c1, exp0, exp1;
    bit got0, got1;
    nn = (n > DEPTH) ? DEPTH : n;
    exp_sum = sum_in;
    for (int k = 0; k < nn; k++) exp_sum += h[k] * z[k];
    exp0 = nn * (4 + (troj ? 1 : 0));
    exp1 = nn * (4 + (troj ? 4 : 1));
    @(negedge clk);
    trojan = troj; ntaps = 4'(n); start = 1'b1;
    @(posedge clk);
    @(negedge clk) start = 1'b0;
    c0 = 0; c1 = 0; got0 = 0; got1 = 0;
    while (!(got0 && got1)) begin
      if (done0 && !got0) begin
        got0 = 1;
        check(res0 == exp_sum, $sformatf("dut0 sum n=%0d trojan=%0d: %h vs %h", n, troj, res0, exp_sum));
        check(c0 == exp0, $sformatf("dut0 latency n=%0d trojan=%0d: %0d vs %0d", n, troj, c0, exp0));
      end
      if (done1 && !got1) begin
        got1 = 1;
        check(res1 == exp_sum, $sformatf("dut1 sum n=%0d trojan=%0d", n, troj));
        check(c1 == exp1, $sformatf("dut1 latency n=%0d trojan=%0d: %0d vs %0d", n, troj, c1, exp1));
      end
      @(negedge clk);
      if (!got0) c0++;
      if (!got1) c1++;
    end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int it = 0; it < 60; it++) begin
      int n;
      fill();
      n = (it < 3) ? it * 4 : $urandom_range(0, 11);
      sum_in = $urandom();
      run(n, 1'b0);
      run(n, 1'b1);
    end
    // the paper's example: 8 taps
    fill();
    sum_in = 0;
    run(8, 1'b0);
    check(bubble_cycles0 > 0 && bubble_cycles1 > 0, "bubble states were visited");
    $display("bubble cycles: default %0d, coverage-safe %0d", bubble_cycles0, bubble_cycles1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
