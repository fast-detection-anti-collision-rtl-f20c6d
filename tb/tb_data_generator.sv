// Testbench for data_generator: load pulses arrive at irregular times; after
// the g-th pulse the four lanes must hold 8g, g, 4g, 12g (mod 256), computed
// here by multiplication. Without a pulse the lanes must hold. The group
// 18,03,0C,24 (hex) must appear after the third pulse.
module tb_data_generator;
  logic clk = 0, reset = 1, load = 0;
  logic [3:0][7:0] tags;
  int checks = 0, failures = 0;

  data_generator dut (.clk, .reset, .load, .tags);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic expect_group(int g);
    int e0 = (8 * g) % 256, e1 = g % 256, e2 = (4 * g) % 256, e3 = (12 * g) % 256;
    check(tags[0] == 8'(e0) && tags[1] == 8'(e1) && tags[2] == 8'(e2) && tags[3] == 8'(e3),
          $sformatf("group %0d got %h %h %h %h", g, tags[0], tags[1], tags[2], tags[3]));
  endtask

  initial begin
    automatic int g = 0;
    repeat (2) @(posedge clk);
    @(negedge clk) reset = 0;
    expect_group(0);
    for (int i = 0; i < 600; i++) begin
      load = ($urandom_range(0, 2) == 0);
      @(negedge clk);
      if (load) g++;
      expect_group(g);
      if (g == 3) check(tags == {8'h24, 8'h0C, 8'h03, 8'h18}, "example group 3");
    end
    check(g > 100, "enough groups generated");
    load = 0;
    reset = 1;
    @(negedge clk) reset = 0;
    expect_group(0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
