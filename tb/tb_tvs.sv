// tb_tvs: checks the triple voter. Three copies with random upsets are voted, and each bit
// of the result is compared with a count of how many copies hold a one in that bit; the
// mismatch flag is compared with a direct comparison of the copies.
module tb_tvs;
  localparam int unsigned W = 12;
  logic [W-1:0] a, b, c, voted;
  logic mismatch;
  int checks = 0, failures = 0;

  tvs #(.WIDTH(W)) dut (.a, .b, .c, .voted, .mismatch);

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s: a=%h b=%h c=%h voted=%h", what, a, b, c, voted);
    end
  endtask

  initial begin
    logic [W-1:0] exp_v;
    for (int n = 0; n < 2000; n++) begin
      logic [W-1:0] base;
      base = W'($urandom);
      a = base; b = base; c = base;
      case (n % 4)
        1: a ^= W'(1 << $urandom_range(0, W-1));  // one upset in one copy
        2: c ^= W'($urandom);                     // many upsets in one copy
        3: begin b = W'($urandom); c = W'($urandom); end  // arbitrary copies
        default: ;
      endcase
      #1;
      for (int i = 0; i < W; i++) exp_v[i] = (int'(a[i]) + int'(b[i]) + int'(c[i])) >= 2;
      check(voted == exp_v, "majority");
      if (n % 4 == 1 || n % 4 == 2) check(voted == base, "single faulty copy outvoted");
      check(mismatch == !(a == b && b == c), "mismatch flag");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
