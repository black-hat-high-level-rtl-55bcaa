// tb_fir_bubble_sweep: the 8-tap FIR with 1, 4, 8 and 16 bubble cycles per iteration. All four
// instances are loaded with the same random coefficients and samples and run with the Trojan off
// and on. Each must return the same sum, in 32 cycles when off and 8 * (4 + BUBBLES) when on;
// the relative overhead of each is printed.
module tb_fir_bubble_sweep;
  localparam int NB = 4;
  localparam int BUB [NB] = '{1, 4, 8, 16};
  logic clk = 1'b0, rst_n = 1'b0;
  logic mem_we = 1'b0, mem_sel = 1'b0;
  logic [2:0]  mem_addr = '0;
  logic [31:0] mem_wdata = '0;
  logic start = 1'b0, trojan = 1'b0;
  logic [3:0]  ntaps = 4'd8;
  logic [31:0] res [NB];
  logic [NB-1:0] busy, done, bub;
  int cyc [NB];
  logic [31:0] h [8], z [8];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  for (genvar g = 0; g < NB; g++) begin : g_fir
    fir_degradation #(.BUBBLES(BUB[g])) dut (
      .clk, .rst_n, .mem_we, .mem_sel, .mem_addr, .mem_wdata, .start, .ntaps, .sum_in(32'd0),
      .trojan, .busy(busy[g]), .done(done[g]), .result(res[g]), .in_bubble(bub[g]));
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
    @(posedge clk);
    @(negedge clk) start = 1'b0;
    foreach (cyc[g]) cyc[g] = -1;
    c = 0;
    while (c < 400) begin
      for (int g = 0; g < NB; g++) if (done[g] && cyc[g] < 0) cyc[g] = c;
      @(negedge clk);
      c++;
    end
  endtask

  initial begin
    logic [31:0] e;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int it = 0; it < 10; it++) begin
      e = 0;
      for (int k = 0; k < 16; k++) begin
        @(negedge clk);
        mem_we = 1'b1; mem_sel = k[3]; mem_addr = k[2:0]; mem_wdata = $urandom();
        if (k < 8) h[k] = mem_wdata; else z[k-8] = mem_wdata;
      end
      @(negedge clk) mem_we = 1'b0;
      for (int k = 0; k < 8; k++) e += h[k] * z[k];
      run(1'b0);
      for (int g = 0; g < NB; g++) begin
        check(res[g] == e, "sum, Trojan off");
        check(cyc[g] == 32, $sformatf("latency off %0d", cyc[g]));
      end
      run(1'b1);
      for (int g = 0; g < NB; g++) begin
        check(res[g] == e, "sum, Trojan on");
        check(cyc[g] == 8 * (4 + BUB[g]), $sformatf("latency on, %0d bubbles: %0d", BUB[g], cyc[g]));
        if (it == 0) $display("%0d bubbles: %0d -> %0d cycles, overhead %0d%%", BUB[g], 32, cyc[g], (cyc[g] - 32) * 100 / 32);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
