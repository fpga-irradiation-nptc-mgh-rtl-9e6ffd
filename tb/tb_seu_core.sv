// tb_seu_core: runs the SEU core section through complete runs with an 8-bit run length and
// a 16-stage chain, against a cycle-by-cycle reference model of the counter, chain and
// result count. Run 1 is clean: the voted result must equal the reference and all copies
// agree. Run 2 flips a chain stage in mid-run (an SEU in the target): the result must follow
// the reference that carries the same flip. Run 3 flips a bit in one result copy: the vote
// must hide it and the mismatch flag must show it. Also checks that done rises exactly
// 2^TRIGGER_BIT cycles after reset and that the counts then hold.
module tb_seu_core;
  localparam int unsigned TB = 8;
  localparam int unsigned DEPTH = 16;
  logic clk = 1'b0, rst_n = 1'b1;
  initial #1 rst_n = 1'b0;   // falling edge: asynchronous reset at start-up
  logic [TB:0] data_count, result;
  logic [2:0][TB:0] result_copies;
  logic mismatch, done;
  int checks = 0, failures = 0;
  int n_upset_chain = 0, n_upset_copy = 0, n_trigger = 0;

  seu_core #(.TRIGGER_BIT(TB), .DEPTH(DEPTH)) dut (
    .clk, .rst_n, .data_count, .result, .result_copies, .mismatch, .done
  );

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
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

  // one run; mode 0 clean, 1 chain upset at cycle 100 stage 7, 2 copy upset after the run
  task automatic do_run(input int mode);
    int unsigned ref_cnt, ref_res, done_cycle;
    logic [DEPTH-1:0] ref_chain;
    ref_cnt = 0; ref_res = 0; ref_chain = '0; done_cycle = 0;
    rst_n = 1'b0;
    @(negedge clk);
    rst_n = 1'b1;
    for (int cyc = 1; cyc <= (1 << TB) + 40; cyc++) begin
      @(posedge clk);
      // reference: values before this edge give the state after it
      if (ref_cnt < (1 << TB) && ref_chain[DEPTH-1]) ref_res++;
      ref_chain = {ref_chain[DEPTH-2:0], 1'(ref_cnt & 1)};
      if (ref_cnt < (1 << TB)) ref_cnt++;
      @(negedge clk);
      if (mode == 1 && cyc == 100) begin
        dut.u_chain.stage[7] = ~dut.u_chain.stage[7];
        ref_chain[7] = ~ref_chain[7];
        n_upset_chain++;
      end
      check(data_count == (TB+1)'(ref_cnt), "data counter");
      check(result == (TB+1)'(ref_res), "voted result");
      if (done && done_cycle == 0) done_cycle = cyc;
    end
    check(done_cycle == (1 << TB), "done after 2^TRIGGER_BIT cycles");
    if (done) n_trigger++;
    check(!mismatch, "copies agree");
    if (mode == 2) begin
      dut.g_result[1].u_result_ctr.count[3] = ~dut.g_result[1].u_result_ctr.count[3];
      #1;
      check(mismatch, "copy upset flagged");
      check(result == (TB+1)'(ref_res), "copy upset outvoted");
      n_upset_copy++;
    end
  endtask

  initial begin
    int unsigned clean_res;
    repeat (2) @(posedge clk);
    do_run(0);
    clean_res = int'(result);
    // without upsets: ones fed in up to DEPTH cycles before the trigger
    check(clean_res == ((1 << TB) - DEPTH) / 2, "clean run count");
    do_run(1);
    check(int'(result) != clean_res, "chain upset changes the result");
    do_run(2);
    check(n_upset_chain > 0 && n_upset_copy > 0 && n_trigger == 3, "all cases exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
