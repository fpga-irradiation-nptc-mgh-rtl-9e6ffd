// tb_data_counter: checks the data counter against a reference count.
//
// With the trigger on bit 6, the counter must count up from 0 every cycle, show its LSB as
// data and its MSB as trigger, raise the trigger exactly 64 cycles after reset and then
// stop. Counts each compared value as a check.
module tb_data_counter;
  localparam int unsigned TB = 6;
  logic clk = 1'b0, rst_n = 1'b1;
  initial #1 rst_n = 1'b0;   // falling edge: asynchronous reset at start-up
  logic [TB:0] count;
  logic data, trigger;
  int checks = 0, failures = 0;

  data_counter #(.TRIGGER_BIT(TB)) dut (.clk, .rst_n, .count, .data, .trigger);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (1000) @(posedge clk);
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

  initial begin
    int unsigned ref_cnt = 0;
    repeat (2) @(posedge clk);
    #1 check(count == 0 && !trigger, "reset value");
    rst_n = 1'b1;
    for (int cyc = 1; cyc <= 100; cyc++) begin
      @(posedge clk);
      if (ref_cnt < (1 << TB)) ref_cnt++;
      #1;
      check(count == (TB+1)'(ref_cnt), "count");
      check(data == ref_cnt[0], "data is LSB");
      check(trigger == (cyc >= (1 << TB)), "trigger after 2^TRIGGER_BIT cycles");
    end
    rst_n = 1'b0;
    #1 check(count == 0 && !trigger, "reset clears trigger");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
