// tb_dec_n: checks the counter loads (26 for t=0, 31 for t=1) and the
// decrement, including the wrap from 0 to 63 that sets n[5], and that
// counting down from a load sets n[5] after exactly 27 or 32 steps.
module tb_dec_n;
  logic       load, t;
  logic [5:0] n, n_next;
  int checks = 0, failures = 0;

  dec_n dut (.load, .t, .n, .n_next);

  task automatic expect_eq(input logic [5:0] v, input string what);
    checks++;
    if (n_next !== v) begin failures++; $display("FAIL: %s: got %0d expected %0d", what, n_next, v); end
  endtask

  initial begin
    load = 1; t = 0; n = 6'd17; #1; expect_eq(6'd26, "load t=0");
    load = 1; t = 1; n = 6'd3;  #1; expect_eq(6'd31, "load t=1");
    for (int i = 0; i < 64; i++) begin
      load = 0; t = 1'($urandom); n = 6'(i); #1; expect_eq(6'(i - 1), "decrement");
    end
    for (int tt = 0; tt < 2; tt++) begin
      int steps;
      steps = 0;
      load = 1; t = 1'(tt); #1; n = n_next;
      load = 0;
      while (!n[5]) begin #1; n = n_next; steps++; end
      checks++;
      if (steps != ((tt != 0) ? 32 : 27)) begin failures++; $display("FAIL: t=%0d counted %0d words", tt, steps); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
