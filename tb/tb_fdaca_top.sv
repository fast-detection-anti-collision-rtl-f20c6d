// End-to-end testbench for fdaca_top at its default parameters (8-bit IDs).
//
// The generator's groups are modelled here as (8g, g, 4g, 12g) mod 2^W for
// the g-th read cycle after reset. Group g is sampled by the fast search at
// the edge 4g+7 after reset release (edge 0 being the first) and must be shown
// on data_out after edges 4g+8 .. 4g+11, sorted smallest first, with sel_out
// 0..3 and one ID every clock. The run covers all 2^W group values of the
// group counter plus a wrap, then resets in the middle of a read cycle and
// checks that the sequence restarts.
//
// Mechanisms counted (each must occur at least once):
//   read cycles      - tag clock periods with four IDs shown
//   reorders         - groups whose lanes arrive out of order and are sorted
//   lane wraps       - groups where the 12g lane wrapped and ends up smallest
//   equal IDs        - groups holding duplicate IDs
//   counter wraps    - the group counter wrapping past 255
//   mid-run resets   - a reset in the middle of a read cycle
// It also checks the example read cycles 03,0C,18,24 and 04,10,20,30.
module tb_fdaca_top;
  localparam int W = 8;                  // default ID width of the top
  localparam int NG = (1 << W) + 4;      // read cycles: every counter value, then a wrap
  localparam longint MOD = longint'(1) << W;
  logic clk = 0, reset = 1;
  logic tag_clk;
  logic [1:0] sel_out;
  logic [W-1:0] data_out;
  int checks = 0, failures = 0;

  fdaca_top dut (.clk, .reset, .tag_clk, .sel_out, .data_out);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  typedef logic [3:0][W-1:0] grp_t;

  function automatic grp_t gen(int g);
    grp_t r;
    r[0] = W'((8 * longint'(g)) % MOD);
    r[1] = W'(longint'(g) % MOD);
    r[2] = W'((4 * longint'(g)) % MOD);
    r[3] = W'((12 * longint'(g)) % MOD);
    return r;
  endfunction

  function automatic grp_t ref_sort(grp_t a);
    logic [W-1:0] v[4];
    logic [W-1:0] t;
    grp_t r;
    for (int i = 0; i < 4; i++) v[i] = a[i];
    for (int i = 1; i < 4; i++)
      for (int j = i; j > 0 && v[j-1] > v[j]; j--) begin
        t = v[j]; v[j] = v[j-1]; v[j-1] = t;
      end
    for (int i = 0; i < 4; i++) r[i] = v[i];
    return r;
  endfunction

  int n_cycles = 0, n_reorder = 0, n_lane_wrap = 0, n_equal = 0;
  int n_counter_wrap = 0, n_mid_reset = 0;
  logic [W-1:0] shown[4];
  int example3 = 0, example4 = 0;

  // Run n_groups read cycles after a reset release; check every clock.
  task automatic run(int n_groups);
    @(negedge clk) reset = 0;
    for (int e = 0; e < 4 * n_groups + 8; e++) begin
      @(negedge clk);
      check(tag_clk == ((e + 1) % 4 < 2), $sformatf("tag_clk after edge %0d", e));
      if (e >= 8) begin
        automatic int g = (e - 8) / 4;
        automatic int s = (e - 8) % 4;
        automatic grp_t grp = gen(g);
        automatic grp_t exp = ref_sort(grp);
        check(sel_out == 2'(s), $sformatf("edge %0d sel_out %0d exp %0d", e, sel_out, s));
        check(data_out == exp[s], $sformatf("edge %0d group %0d slot %0d got %h exp %h",
                                            e, g, s, data_out, exp[s]));
        shown[s] = data_out;
        if (s == 3) begin
          n_cycles++;
          if (grp != exp) n_reorder++;
          if (exp[0] == grp[3] && grp[3] < grp[2] && grp[3] != 0) n_lane_wrap++;
          if (exp[0] == exp[1] || exp[1] == exp[2] || exp[2] == exp[3]) n_equal++;
          if (longint'(g) >= MOD && longint'(g) % MOD == 0) n_counter_wrap++;
          if (shown[0] == W'('h03) && shown[1] == W'('h0C) && shown[2] == W'('h18) && shown[3] == W'('h24))
            example3++;
          if (shown[0] == W'('h04) && shown[1] == W'('h10) && shown[2] == W'('h20) && shown[3] == W'('h30))
            example4++;
        end
      end
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    run(NG);
    // Reset in the middle of a read cycle (after two clocks of it).
    repeat (2) @(negedge clk);
    check(sel_out != 0, "mid-cycle position before reset");
    reset = 1;
    n_mid_reset++;
    @(negedge clk);
    check(data_out == 0 && sel_out == 0, "outputs cleared by reset");
    run(8);
    $display("read cycles %0d, reorders %0d, lane wraps %0d, equal IDs %0d, counter wraps %0d, mid-run resets %0d",
             n_cycles, n_reorder, n_lane_wrap, n_equal, n_counter_wrap, n_mid_reset);
    check(n_cycles > 0, "read cycles occurred");
    check(n_reorder > 0, "reorders occurred");
    check(n_lane_wrap > 0, "lane wraps occurred");
    check(n_equal > 0, "equal IDs occurred");
    check(n_counter_wrap > 0, "counter wrap occurred");
    check(n_mid_reset > 0, "mid-run reset occurred");
    check(example3 == 3 && example4 == 2, $sformatf("example read cycles seen %0d %0d", example3, example4));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (4 * NG + 200) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
