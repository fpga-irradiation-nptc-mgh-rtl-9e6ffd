// tb_tdc: checks the TDC with PLL clocks from the behavioural PLL model.
//
// The reference clock is scaled to a 25.6 ns period (39.06 MHz) so that every clock edge and
// the 0.8 ns bins fall on whole picoseconds; the PLL outputs lag the reference by 100 ps. The
// hit input is a copy of the reference delayed by d, swept over all 32 bins with each hit edge
// in the middle of a bin. The expected 32-sample window is computed from the sample times
// (sample j of a window taken 100 ps + 12.8 ns + j*0.8 ns after a reference rising edge),
// and the expected value is the first 0-to-1 transition in it. A constant hit must give
// valid low. The value must be stable every cycle once the pipeline has filled.
module tb_tdc;
  import irradiation_pkg::*;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int T = 25600;
  localparam int DLY = 100;
  localparam int BIN = T / 32;

  logic clk40 = 1'b0, rst_n = 1'b1, hit = 1'b0;
  initial #1 rst_n = 1'b0;   // falling edge: asynchronous reset at start-up
  logic clk_0, clk_90, clk80, lock;
  tdc_value_t chan;
  logic valid;
  logic [TDC_BINS-1:0] window;
  int checks = 0, failures = 0;
  int hit_delay = -1;   // -1: hit held low, -2: held high
  int n_valid = 0, n_invalid = 0;

  pll320_model #(.T_REF_PS(T), .DELAY_PS(DLY)) u_pll (
    .CLKA(clk40), .POWERDOWN(1'b1), .stop_glb(1'b0),
    .GLA(clk80), .GLB(clk_0), .GLC(clk_90), .LOCK(lock)
  );

  tdc dut (.clk_0, .clk_90, .clk80, .clk40, .rst_n, .hit, .chan, .valid, .window);

  always #(T/2) clk40 = ~clk40;

  // hit level at time t after a rising edge of clk40 (clk40 rises at T/2 mod T)
  function automatic logic hit_at(input longint t);
    longint r;
    if (hit_delay == -1) return 1'b0;
    if (hit_delay == -2) return 1'b1;
    r = (t - hit_delay) % T;
    if (r < 0) r += T;
    return r < T/2;
  endfunction

  // hit waveform on a 50 ps grid
  always #50 hit = hit_at(longint'($time) - T/2);

  initial begin : watchdog
    #(longint'(T) * 3000);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t: d=%0d chan=%0d valid=%0d window=%h", what, $time, hit_delay,
               chan, valid, window);
    end
  endtask

  task automatic expect_steady();
    logic [TDC_BINS:0] exp_w;
    int exp_chan;
    logic exp_valid;
    for (int j = 0; j <= TDC_BINS; j++) exp_w[j] = hit_at(DLY + T/2 + j*BIN);
    exp_chan = 0; exp_valid = 1'b0;
    for (int j = 0; j < TDC_BINS; j++)
      if (!exp_valid && !exp_w[j] && exp_w[j+1]) begin
        exp_chan = j; exp_valid = 1'b1;
      end
    repeat (5) @(posedge clk40);
    for (int n = 0; n < 4; n++) begin
      @(negedge clk40);
      check(window == exp_w[TDC_BINS-1:0], "sample window");
      check(valid == exp_valid, "valid");
      if (exp_valid) begin
        check(chan == tdc_value_t'(exp_chan), "TDC value");
        n_valid++;
      end else n_invalid++;
    end
  endtask

  initial begin
    repeat (3) @(posedge clk40);
    #1000 rst_n = 1'b1;
    expect_steady();           // hit low
    for (int m = 0; m < 32; m++) begin
      // edge in the middle of a bin: bin number (16 + m) mod 32
      hit_delay = DLY + m*BIN + BIN/2 - 50;
      expect_steady();
      check(chan == tdc_value_t'((16 + m) % 32), "bin from delay");
    end
    hit_delay = -2;
    expect_steady();           // hit high
    check(n_valid > 0 && n_invalid > 0, "both outcomes seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
