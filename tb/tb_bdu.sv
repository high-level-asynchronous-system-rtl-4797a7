// tb_bdu: all branch conditions against all status combinations.
module tb_bdu;
  import ecd_pkg::*;
  cond_e cond;
  logic  n5, eq, taken;
  int checks = 0, failures = 0;

  bdu dut (.cond, .n5, .eq, .taken);

  initial begin
    for (int c = 0; c < 8; c++)
      for (int s = 0; s < 4; s++) begin
        logic exp;
        cond = cond_e'(c);
        {n5, eq} = 2'(s);
        case (c)
          1: exp = 1;
          2: exp = (s < 2);          // n5 = 0
          3: exp = (s != 0);         // n5 or eq
          4: exp = (s == 0);
          default: exp = 0;
        endcase
        #1;
        checks++;
        if (taken !== exp) begin failures++; $display("FAIL: cond %0d n5=%0d eq=%0d taken=%0d", c, n5, eq, taken); end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #10000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
