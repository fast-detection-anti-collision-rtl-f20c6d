// Testbench for select_generator: the select lines must step 0,1,2,3 and wrap,
// one step per system clock, and restart at 0 after reset.
module tb_select_generator;
  logic clk = 0, reset = 1;
  logic [1:0] sel;
  int checks = 0, failures = 0;

  select_generator dut (.clk, .reset, .sel);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) reset = 0;
    for (int n = 0; n < 37; n++) begin
      check(sel == 2'(n % 4), $sformatf("n=%0d sel=%0d", n, sel));
      @(negedge clk);
    end
    reset = 1;
    @(negedge clk) reset = 0;
    for (int n = 0; n < 9; n++) begin
      check(sel == 2'(n % 4), $sformatf("after reset n=%0d sel=%0d", n, sel));
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (500) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
