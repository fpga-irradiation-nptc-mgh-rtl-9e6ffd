// tb_hitreg: the PLL checker as on its test board.
//
// The behavioural PLL model makes clk80, clk_0 and clk_90 from the reference and drives the
// checker's reset with its lock output. hit is the reference itself delayed by a fixed time,
// as through the loop-back jumper; the delay is chosen so that the rising edge of hit falls
// in the middle of bin 13. The set value is 13 (hex D on the low switch, 0 on the high one),
// presented inverted as the switch inputs read. The test checks: start-up after lock with
// all outputs good; a wrong set value giving a latched TDC error with the measured value on
// the LED outputs; recovery by powering the PLL down and up; a changed hit delay giving a TDC
// error; and a stopped 320 MHz output giving a latched clock error while the PLL stays
// locked. The reference is scaled to a 25.6 ns period so that all edges fall on whole
// picoseconds.
module tb_hitreg;
  import irradiation_pkg::*;
  timeunit 1ps;
  timeprecision 1ps;

  localparam int T = 25600;
  localparam int DLY = 100;
  localparam int BIN = T / 32;
  localparam tdc_value_t SET = 5'h0D;

  logic clk40 = 1'b0, hit = 1'b0, powerdown_n = 1'b0, stop_glb = 1'b0;
  logic clk_0, clk_90, clk80, lock;
  tdc_value_t tdc_value = ~SET;
  logic all_ok, led_pllclk_runs_n, led_tdc_ok_n, pllclk_runs, tdc_ok, valid;
  tdc_value_t led_tdc, tdc;
  int hit_delay;
  int checks = 0, failures = 0;
  int n_tdc_err = 0, n_clk_err = 0, n_relock = 0;

  pll320_model #(.T_REF_PS(T), .DELAY_PS(DLY)) u_pll (
    .CLKA(clk40), .POWERDOWN(powerdown_n), .stop_glb,
    .GLA(clk80), .GLB(clk_0), .GLC(clk_90), .LOCK(lock)
  );

  hitreg dut (
    .all_ok, .clk40, .clk80, .clk_0, .clk_90, .hit, .led_pllclk_runs_n, .led_tdc,
    .led_tdc_ok_n, .pllclk_runs, .rst_n(lock), .tdc, .tdc_ok, .tdc_value, .valid
  );

  always #(T/2) clk40 = ~clk40;

  // delay that puts the rising edge of hit in the middle of bin b
  function automatic int delay_for_bin(input int b);
    return DLY + ((b + 16) % 32) * BIN + BIN/2 - 50;
  endfunction

  // hit: the reference delayed by hit_delay, on a 50 ps grid (clk40 rises at T/2 mod T)
  always #50 begin
    automatic longint r = (longint'($time) - T/2 - hit_delay) % T;
    if (r < 0) r += T;
    hit = (r < T/2);
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
      $display("FAIL %s at %0t: tdc=%0d valid=%0d tdc_ok=%0d all_ok=%0d runs=%0d led_tdc=%0d",
               what, $time, tdc, valid, tdc_ok, all_ok, pllclk_runs, led_tdc);
    end
  endtask

  task automatic wait_cycles(input int n);
    repeat (n) @(posedge clk40);
    #(T/4);
  endtask

  task automatic expect_good();
    check(tdc == SET && valid, "TDC measures bin 13");
    check(tdc_ok, "tdc_ok");
    check(pllclk_runs && !led_pllclk_runs_n, "PLL clocks run");
    check(!led_tdc_ok_n && led_tdc == SET, "TDC LEDs good");
    check(all_ok, "all_ok");
  endtask

  initial begin
    hit_delay = delay_for_bin(int'(SET));
    wait_cycles(3);
    check(!lock && !all_ok && led_tdc_ok_n && led_pllclk_runs_n, "held in reset while powered down");
    powerdown_n = 1'b1;
    wait_cycles(20);
    check(lock, "PLL locked");
    expect_good();

    // wrong set value: TDC error, latched, shows the measured value
    tdc_value = ~5'd12;
    wait_cycles(4);
    check(!tdc_ok && led_tdc_ok_n && !all_ok && led_tdc == SET, "TDC error");
    check(pllclk_runs, "clock check unaffected");
    tdc_value = ~SET;
    wait_cycles(4);
    check(tdc_ok && led_tdc_ok_n && !all_ok, "TDC error held until reset");
    n_tdc_err++;

    // power-cycle the PLL: lock drops, checker restarts
    powerdown_n = 1'b0;
    wait_cycles(2);
    check(!lock && !all_ok, "reset by lock loss");
    powerdown_n = 1'b1;
    wait_cycles(20);
    expect_good();
    n_relock++;

    // different jumper delay: the edge moves to bin 20
    hit_delay = delay_for_bin(20);
    wait_cycles(5);
    check(tdc == 5'd20 && !tdc_ok && led_tdc_ok_n && led_tdc == 5'd20, "moved hit detected");
    n_tdc_err++;
    hit_delay = delay_for_bin(int'(SET));
    powerdown_n = 1'b0;
    wait_cycles(2);
    powerdown_n = 1'b1;
    wait_cycles(20);
    expect_good();
    n_relock++;

    // one PLL output stops while lock stays high: latched clock error
    stop_glb = 1'b1;
    wait_cycles(4);
    check(lock && !pllclk_runs && led_pllclk_runs_n && !all_ok, "clock error");
    stop_glb = 1'b0;
    wait_cycles(6);
    check(!pllclk_runs && led_pllclk_runs_n, "clock error held until reset");
    n_clk_err++;

    check(n_tdc_err == 2 && n_clk_err == 1 && n_relock == 2, "all cases exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
