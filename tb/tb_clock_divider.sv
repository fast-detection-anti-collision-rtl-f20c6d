// Testbench for clock_divider: after reset, the tag clock must be high for
// two and low for two system clocks, and the tag_rise / tag_fall enables must
// sit in the cycle that ends with the corresponding tag clock edge. A reset
// in the middle of a period must restart the count at phase 0.
module tb_clock_divider;
  logic clk = 0, reset = 1;
  logic tag_clk, tag_rise, tag_fall;
  logic [1:0] phase;
  int checks = 0, failures = 0;
  int rises = 0, falls = 0;

  clock_divider dut (.clk, .reset, .tag_clk, .tag_rise, .tag_fall, .phase);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // Expected state for the n-th cycle after reset release (n = 0 first).
  task automatic check_cycle(int n);
    int p = n % 4;
    check(phase == 2'(p), $sformatf("phase n=%0d got %0d", n, phase));
    check(tag_clk == (p < 2), $sformatf("tag_clk n=%0d", n));
    check(tag_rise == (p == 3), $sformatf("tag_rise n=%0d", n));
    check(tag_fall == (p == 1), $sformatf("tag_fall n=%0d", n));
  endtask

  // Tag clock period measured between rising edges of tag_clk.
  int last_rise = -1, period = 0, ncyc = 0;
  logic tag_clk_d = 1;
  always @(posedge clk) begin
    ncyc++;
    if (reset) last_rise = -1;
    if (!reset && tag_clk && !tag_clk_d) begin
      if (last_rise >= 0) begin
        period = ncyc - last_rise;
        check(period == 4, $sformatf("tag clock period %0d", period));
      end
      last_rise = ncyc;
    end
    tag_clk_d <= tag_clk;
  end

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) reset = 0;
    for (int n = 0; n < 40; n++) begin
      check_cycle(n);
      if (tag_rise) rises++;
      if (tag_fall) falls++;
      @(negedge clk);
    end
    check(rises == 10 && falls == 10, "enable counts");
    // Reset in the middle of a period.
    @(negedge clk);
    check(phase != 2'd0, "phase nonzero before mid reset");
    reset = 1;
    @(negedge clk) reset = 0;
    for (int n = 0; n < 8; n++) begin
      check_cycle(n);
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
