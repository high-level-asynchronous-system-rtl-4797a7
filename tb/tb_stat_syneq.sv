// tb_stat_syneq: checks the byte compare and both status modes over random
// syndromes, half of them with bytes 0 and 1 forced equal.
module tb_stat_syneq;
  logic        mode_or, n5, stat, eq, stat_next;
  logic [31:0] syn;
  int checks = 0, failures = 0;

  stat_syneq dut (.mode_or, .n5, .stat, .syn, .eq, .stat_next);

  initial begin
    for (int i = 0; i < 400; i++) begin
      logic e_exp, s_exp;
      syn = $urandom;
      if (i[0]) syn[15:8] = syn[7:0];
      {mode_or, n5, stat} = 3'($urandom);
      e_exp = i[0] ? 1'b1 : (syn[7:0] == syn[15:8]);
      s_exp = mode_or ? (stat || e_exp) : n5;
      #1;
      checks++;
      if (eq !== e_exp || stat_next !== s_exp) begin
        failures++;
        $display("FAIL: syn=%08h mode=%0d n5=%0d stat=%0d -> eq=%0d next=%0d", syn, mode_or, n5, stat, eq, stat_next);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
