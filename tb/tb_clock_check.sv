// tb_clock_check: checks the PLL clock-rate check with clocks whose rates the test sets.
//
// Each rising edge of the reference starts one period of n0 edges of clk_0, n90 of clk_90
// (a quarter of a clk_0 period later) and n80 of clk80, 100 ps after the reference edge. The
// nominal setting (8, 8, 2) must give pllclk_runs high; a stopped clock, a 320 MHz clock at
// half or double rate, a 320 MHz clock at 6x (three edges per half period, still accepted) and an 80 MHz clock at
// double rate must give the listed result. The reference is scaled to a 25.6 ns period so
// that all edges fall on whole picoseconds.
module tb_clock_check;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int T = 25600;
  localparam int DLY = 100;

  logic clk40 = 1'b0, rst_n = 1'b1;
  initial #1 rst_n = 1'b0;   // falling edge: asynchronous reset at start-up
  logic clk_0 = 1'b0, clk_90 = 1'b0, clk80 = 1'b0;
  logic pllclk_runs;
  int n0 = 8, n90 = 8, n80 = 2;
  int checks = 0, failures = 0;
  int n_ok = 0, n_err = 0;

  clock_check dut (.clk_0, .clk_90, .clk80, .clk40, .rst_n, .pllclk_runs);

  always #(T/2) clk40 = ~clk40;

  // one reference period of n edges, first edge at 'first' after the reference edge
  task automatic burst(ref logic clk, input int n, input int first);
    if (n == 0) return;
    #(first);
    for (int k = 0; k < n; k++) begin
      clk = 1'b1;
      #(T / (2*n)) clk = 1'b0;
      if (k < n - 1) #(T / (2*n));
    end
  endtask

  always @(posedge clk40) begin
    automatic int a = n0, b = n90, c = n80;
    fork
      burst(clk_0, a, DLY);
      burst(clk_90, b, (b == 0) ? 0 : DLY + T / (4*b));
      burst(clk80, c, DLY);
    join_none
  end

  initial begin : watchdog
    #(longint'(T) * 2000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t: n0=%0d n90=%0d n80=%0d runs=%0d", what, $time, n0, n90, n80,
               pllclk_runs);
    end
  endtask

  task automatic mode(input int a, input int b, input int c, input logic exp_runs);
    @(posedge clk40);
    #(T/4);
    n0 = a; n90 = b; n80 = c;
    repeat (3) @(posedge clk40);
    for (int n = 0; n < 5; n++) begin
      @(posedge clk40);
      check(pllclk_runs == exp_runs, "pllclk_runs");
    end
    if (exp_runs) n_ok++; else n_err++;
  endtask

  initial begin
    repeat (2) @(posedge clk40);
    #1000;
    check(!pllclk_runs, "reset value");
    rst_n = 1'b1;
    mode(8, 8, 2, 1'b1);    // nominal
    mode(0, 8, 2, 1'b0);    // clk_0 stopped
    mode(8, 8, 2, 1'b1);
    mode(8, 0, 2, 1'b0);    // clk_90 stopped
    mode(8, 8, 0, 1'b0);    // clk80 stopped
    mode(8, 8, 4, 1'b0);    // clk80 at double rate
    mode(16, 8, 2, 1'b0);   // clk_0 at double rate
    mode(8, 4, 2, 1'b0);    // clk_90 at half rate
    mode(6, 6, 2, 1'b1);    // 6x: three edges per half period, accepted
    mode(8, 8, 2, 1'b1);
    rst_n = 1'b0;
    #1000 check(!pllclk_runs, "asynchronous reset");
    check(n_ok > 0 && n_err > 0, "both outcomes seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
