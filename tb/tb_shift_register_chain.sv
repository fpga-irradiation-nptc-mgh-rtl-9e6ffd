// tb_shift_register_chain: checks that a 16-stage chain delays random data by 16 cycles and
// that an upset written into one stage reaches the output after the remaining stages.
module tb_shift_register_chain;
  localparam int unsigned DEPTH = 16;
  logic clk = 1'b0, rst_n = 1'b1, din = 1'b0, dout;
  initial #1 rst_n = 1'b0;   // falling edge: asynchronous reset at start-up
  int checks = 0, failures = 0;
  logic hist [$];

  shift_register_chain #(.DEPTH(DEPTH)) dut (.clk, .rst_n, .din, .dout);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (2000) @(posedge clk);
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
    repeat (2) @(posedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < DEPTH; i++) hist.push_back(1'b0);
    for (int cyc = 0; cyc < 300; cyc++) begin
      @(negedge clk);
      check(dout == hist[0], "dout equals din delayed by DEPTH");
      din = 1'($urandom);
      hist.push_back(din);
      void'(hist.pop_front());
    end
    // upset: flip stage 5, it must reach the output after the remaining stages
    @(negedge clk);
    din = 1'b0;
    hist.push_back(din);
    void'(hist.pop_front());
    dut.stage[5] = ~dut.stage[5];
    hist[DEPTH-2-5] = ~hist[DEPTH-2-5];
    for (int cyc = 0; cyc < 2*DEPTH; cyc++) begin
      @(negedge clk);
      check(dout == hist[0], "upset travels to dout");
      din = 1'($urandom);
      hist.push_back(din);
      void'(hist.pop_front());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
