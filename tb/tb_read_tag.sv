// Testbench for read_tag: the select lines step 0..3 as the select generator
// drives them and the input group changes once per read cycle (on the edge
// after slot 3, as the fast search output does, and also at other times to
// show the input registers only load on slot 3). data_out must show each
// group's four IDs in lane order 0..3, one per clock, with sel_out equal to
// the lane shown, starting one clock after the group was captured.
module tb_read_tag;
  logic clk = 0, reset = 1;
  logic [1:0] sel, sel_out;
  logic [3:0][7:0] tags_in;
  logic [7:0] data_out;
  int checks = 0, failures = 0;

  read_tag dut (.clk, .reset, .sel, .tags_in, .data_out, .sel_out);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  logic [3:0][7:0] groups[64];

  initial begin
    for (int g = 0; g < 64; g++)
      for (int l = 0; l < 4; l++) groups[g][l] = 8'($urandom);
    sel = 0;
    tags_in = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) reset = 0;
    check(data_out == 0 && sel_out == 0, "reset values");
    // Cycle n: sel = n%4. The group g is present on tags_in while
    // sel = 3 of cycle 4g+3, so it is shown after edges 4g+4 .. 4g+7.
    for (int n = 0; n < 4 * 64; n++) begin
      sel = 2'(n % 4);
      // Present a wrong group except in the slot where it is captured.
      tags_in = (n % 4 == 3) ? groups[n / 4] : ~groups[n / 4];
      @(negedge clk);
      if (n >= 4) begin
        automatic int m = n - 4;
        check(sel_out == 2'(n % 4), $sformatf("sel_out n=%0d", n));
        check(data_out == groups[m / 4][n % 4],
              $sformatf("n=%0d data_out %h exp %h", n, data_out, groups[m / 4][n % 4]));
      end
    end
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
