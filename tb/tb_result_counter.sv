// tb_result_counter: checks an 8-bit result counter against a reference count under random
// enable and input bits, including the wrap past 255 and the asynchronous reset.
module tb_result_counter;
  localparam int unsigned W = 8;
  logic clk = 1'b0, rst_n = 1'b1, en = 1'b0, hit = 1'b0;
  initial #1 rst_n = 1'b0;   // falling edge: asynchronous reset at start-up
  logic [W-1:0] count;
  int checks = 0, failures = 0;

  result_counter #(.WIDTH(W)) dut (.clk, .rst_n, .en, .hit, .count);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (3000) @(posedge clk);
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
    int unsigned wraps = 0;
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int cyc = 0; cyc < 1500; cyc++) begin
      @(negedge clk);
      check(count == W'(ref_cnt), "count");
      en  = ($urandom_range(0, 9) != 0);
      hit = ($urandom_range(0, 3) != 0);
      if (en && hit) begin
        ref_cnt++;
        if (ref_cnt % (1 << W) == 0) wraps++;
      end
    end
    check(wraps > 0, "counter wrapped at least once");
    @(negedge clk);
    rst_n = 1'b0;
    #1 check(count == 0, "asynchronous reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
