// tb_tdc_check: checks the TDC comparison and the error latches against a reference model.
//
// TDC values, valid, and the clock-check result are driven with random errors after the
// start-up phase; a reference model of the start-up counter, the comparison on the falling
// edge and the latches on the rising edge predicts every output after every edge. Scenarios:
// clean start, a single wrong value (latched until reset, with the failing value shown), a
// wrong value while valid is low (ignored), a clock error, an error during start-up (not
// latched), and reset by the lock signal.
module tb_tdc_check;
  import irradiation_pkg::*;

  logic clk40 = 1'b0, rst_n = 1'b1;
  initial #1 rst_n = 1'b0;   // falling edge: asynchronous reset at start-up
  tdc_value_t chan = '0, set_value = 5'd13;
  logic valid = 1'b0, pllclk_runs = 1'b0;
  logic tdc_ok, led_tdc_ok, led_pllclk_runs;
  tdc_value_t led_chan;
  int checks = 0, failures = 0;
  int n_tdc_err = 0, n_clk_err = 0;

  // reference model
  logic m_ok = 1'b0, m_led_ok = 1'b0, m_led_clk = 1'b0;
  tdc_value_t m_led_chan = '0;
  int m_cnt = 0;

  tdc_check dut (
    .clk40, .rst_n, .chan, .valid, .set_value, .pllclk_runs,
    .tdc_ok, .led_chan, .led_tdc_ok, .led_pllclk_runs
  );

  always #10 clk40 = ~clk40;

  always @(negedge clk40 or negedge rst_n)
    if (!rst_n) m_ok = 1'b0;
    else if (valid) m_ok = (chan == set_value);

  always @(posedge clk40 or negedge rst_n)
    if (!rst_n) begin
      m_cnt = 0; m_led_ok = 1'b0; m_led_clk = 1'b0; m_led_chan = '0;
    end else begin
      if (m_cnt == 6) begin
        m_led_chan = chan; m_led_ok = 1'b1; m_led_clk = 1'b1;
      end else if (m_cnt == 7) begin
        if (!m_ok) begin m_led_chan = chan; m_led_ok = 1'b0; end
        if (!pllclk_runs) m_led_clk = 1'b0;
      end
      if (m_cnt < 7) m_cnt++;
    end

  initial begin : watchdog
    repeat (3000) @(posedge clk40);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at %0t", what, $time);
    end
  endtask

  task automatic compare();
    #1;
    check(tdc_ok == m_ok, "tdc_ok");
    check(led_tdc_ok == m_led_ok, "led_tdc_ok");
    check(led_pllclk_runs == m_led_clk, "led_pllclk_runs");
    check(led_chan == m_led_chan, "led_chan");
  endtask

  // drive one clk40 cycle: inputs change a quarter period after the rising edge
  task automatic cycle(input tdc_value_t c, input logic v, input logic runs);
    @(posedge clk40);
    compare();
    #4;
    chan = c; valid = v; pllclk_runs = runs;
    @(negedge clk40);
    compare();
  endtask

  initial begin
    repeat (2) @(posedge clk40);
    #5 rst_n = 1'b1;
    // clean start, with an error during start-up that must not be latched
    for (int i = 0; i < 20; i++) cycle((i == 3) ? 5'd2 : set_value, 1'b1, 1'b1);
    check(led_tdc_ok && led_pllclk_runs, "clean start");
    // wrong value while valid is low: ignored
    cycle(5'd9, 1'b0, 1'b1);
    cycle(set_value, 1'b1, 1'b1);
    check(led_tdc_ok, "invalid value ignored");
    // one wrong value: latched with the value
    cycle(5'd21, 1'b1, 1'b1);
    for (int i = 0; i < 10; i++) cycle(set_value, 1'b1, 1'b1);
    check(!led_tdc_ok && led_chan == 5'd21, "TDC error latched with its value");
    n_tdc_err++;
    // clock error
    cycle(set_value, 1'b1, 1'b0);
    for (int i = 0; i < 5; i++) cycle(set_value, 1'b1, 1'b1);
    check(!led_pllclk_runs, "clock error latched");
    n_clk_err++;
    // lock lost: everything restarts
    @(posedge clk40);
    #3 rst_n = 1'b0;
    #1 compare();
    #4 rst_n = 1'b1;
    for (int i = 0; i < 300; i++)
      cycle(($urandom_range(0, 19) == 0) ? tdc_value_t'($urandom) : set_value,
            $urandom_range(0, 7) != 0, $urandom_range(0, 49) != 0);
    check(n_tdc_err > 0 && n_clk_err > 0, "both errors exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
