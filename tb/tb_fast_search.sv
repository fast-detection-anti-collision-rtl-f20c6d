// Testbench for fast_search: groups of four IDs (the example group from the
// design, groups with equal IDs, and random groups) are loaded with the
// load enable and stored two clocks later with the store enable, as the
// tag clock does. The stored min[0..3] must equal the group sorted here by a
// plain insertion sort, and must hold between store pulses.
module tb_fast_search;
  logic clk = 0, reset = 1, load = 0, store = 0;
  logic [3:0][7:0] tags_in, min;
  int checks = 0, failures = 0;
  int perms;

  fast_search dut (.clk, .reset, .load, .store, .tags_in, .min);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic logic [3:0][7:0] ref_sort(logic [3:0][7:0] a);
    logic [7:0] v[4];
    logic [7:0] t;
    logic [3:0][7:0] r;
    for (int i = 0; i < 4; i++) v[i] = a[i];
    for (int i = 1; i < 4; i++)
      for (int j = i; j > 0 && v[j-1] > v[j]; j--) begin
        t = v[j]; v[j] = v[j-1]; v[j-1] = t;
      end
    for (int i = 0; i < 4; i++) r[i] = v[i];
    return r;
  endfunction

  // One read cycle: load, two clocks, store, then check; inputs are changed
  // after the load to show that the search works from its own registers.
  task automatic run_group(logic [3:0][7:0] g);
    logic [3:0][7:0] exp = ref_sort(g);
    logic [3:0][7:0] prev_min;
    tags_in = g; load = 1;
    @(negedge clk) load = 0;
    tags_in = ~g;
    prev_min = min;
    @(negedge clk);
    check(min == prev_min, "output holds before store");
    store = 1;
    @(negedge clk) store = 0;
    check(min == exp, $sformatf("in %h got %h exp %h", g, min, exp));
    @(negedge clk);
    check(min == exp, "output holds after store");
  endtask

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk) reset = 0;
    check(min == '0, "reset value");
    // Example from the design: 18,03,0C,24 -> 03,0C,18,24.
    run_group({8'h24, 8'h0C, 8'h03, 8'h18});
    check(min == {8'h24, 8'h18, 8'h0C, 8'h03}, "example group");
    run_group({8'h30, 8'h10, 8'h04, 8'h20});
    run_group({8'h00, 8'h00, 8'h00, 8'h00});
    run_group({8'h05, 8'h05, 8'h01, 8'h05});
    run_group({8'hFF, 8'h00, 8'hFF, 8'h00});
    run_group({8'h01, 8'h02, 8'h03, 8'h04});
    run_group({8'h04, 8'h03, 8'h02, 8'h01});
    // All 24 orderings of four distinct values.
    perms = 0;
    for (int p = 0; p < 256; p++) begin
      automatic logic [1:0] i0 = 2'(p);
      automatic logic [1:0] i1 = 2'(p >> 2);
      automatic logic [1:0] i2 = 2'(p >> 4);
      automatic logic [1:0] i3 = 2'(p >> 6);
      if (i0 != i1 && i0 != i2 && i0 != i3 && i1 != i2 && i1 != i3 && i2 != i3)
      begin
        run_group({8'(10 * i3 + 7), 8'(10 * i2 + 7), 8'(10 * i1 + 7), 8'(10 * i0 + 7)});
        perms++;
      end
    end
    check(perms == 24, "all orderings tried");
    for (int n = 0; n < 300; n++)
      run_group({8'($urandom), 8'($urandom), 8'($urandom_range(0, 3)), 8'($urandom)});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
