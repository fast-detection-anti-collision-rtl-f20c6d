// Testbench for fdaca_core: an ID source presents a new random group of four
// IDs on data0..data3 after every edge on which tag_rise is high (so each
// group is stable when sampled). data_out must show each sampled group
// sorted smallest first, one ID per clock, in the clocks E+5 .. E+8 after
// the sampling edge E, with sel_out = 0..3 alongside: one identified tag per
// system clock with no gaps. The design's example group 18,03,0C,24 must
// come out as 03,0C,18,24, and the two read cycles of its FPGA run as
// 20,40,60,88 and 24,48,6C,89.
module tb_fdaca_core;
  logic clk = 0, reset = 1;
  logic [7:0] data0, data1, data2, data3, data_out;
  logic [1:0] sel_out;
  logic tag_clk, tag_rise;
  int checks = 0, failures = 0;

  fdaca_core dut (.clk, .reset, .data0, .data1, .data2, .data3,
                  .data_out, .sel_out, .tag_clk, .tag_rise);

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

  localparam int NG = 200;
  logic [3:0][7:0] grp[NG];
  int sample_edge[NG];
  int edge_n = -1;     // index of the most recent clock edge after reset
  int g_next = 0;      // next group to be sampled
  int shown = 0;       // IDs checked on data_out
  int ex_seen = 0;

  // Expected output after edge e: group sampled at edge E with
  // e in E+5 .. E+8, slot e-E-5.
  always @(negedge clk) if (!reset && edge_n >= 0) begin
    for (int g = 0; g < g_next; g++) begin
      automatic int d = edge_n - sample_edge[g] - 5;
      if (d >= 0 && d < 4) begin
        automatic logic [3:0][7:0] s = ref_sort(grp[g]);
        check(sel_out == 2'(d), $sformatf("edge %0d sel_out %0d exp %0d", edge_n, sel_out, d));
        check(data_out == s[d], $sformatf("edge %0d group %0d slot %0d got %h exp %h",
                                          edge_n, g, d, data_out, s[d]));
        shown++;
        if (g == 0) ex_seen++;
        if (g == 2) check(data_out == (d == 0 ? 8'h20 : d == 1 ? 8'h40 : d == 2 ? 8'h60 : 8'h88), "FPGA cycle 1");
        if (g == 3) check(data_out == (d == 0 ? 8'h24 : d == 1 ? 8'h48 : d == 2 ? 8'h6C : 8'h89), "FPGA cycle 2");
      end
    end
  end

  initial begin
    grp[0] = {8'h24, 8'h0C, 8'h03, 8'h18};
    grp[1] = {8'h30, 8'h10, 8'h04, 8'h20};
    // The two read cycles of the design's FPGA run (lane order unknown,
    // presented shuffled): 20,40,60,88 and 24,48,6C,89 once identified.
    grp[2] = {8'h40, 8'h88, 8'h20, 8'h60};
    grp[3] = {8'h89, 8'h24, 8'h6C, 8'h48};
    for (int g = 4; g < NG; g++)
      for (int l = 0; l < 4; l++) grp[g][l] = 8'($urandom);
    {data3, data2, data1, data0} = grp[0];
    repeat (3) @(posedge clk);
    @(negedge clk) reset = 0;
    while (g_next < NG - 1) begin
      @(posedge clk);
      edge_n++;
      if (tag_rise) begin
        sample_edge[g_next] = edge_n;
        g_next++;
        #1 {data3, data2, data1, data0} = grp[g_next];
      end
    end
    repeat (10) @(posedge clk) edge_n++;
    check(shown == 4 * (NG - 1), $sformatf("IDs shown %0d", shown));
    check(ex_seen == 4, "example group shown");
    // Rate: NG-1 groups of 4 IDs over 4*(NG-1) clocks -> one ID per clock.
    check(sample_edge[NG - 2] - sample_edge[0] == 4 * (NG - 2), "one group every 4 clocks");
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
