// tb_shuffle: checks the byte permutation against the reference, and that
// two shuffles reverse the byte order and four restore it.
module tb_shuffle;
  import tb_ecd_ref::*;
  logic [31:0] a, y1, y2, y3, y4;
  int checks = 0, failures = 0;

  shuffle u1 (.syn(a),  .y(y1));
  shuffle u2 (.syn(y1), .y(y2));
  shuffle u3 (.syn(y2), .y(y3));
  shuffle u4 (.syn(y3), .y(y4));

  initial begin
    for (int i = 0; i < 200; i++) begin
      a = $urandom;
      #1;
      checks += 3;
      if (y1 !== unpack32(shuf(pack32(a)))) begin failures++; $display("FAIL: shuffle %08h -> %08h", a, y1); end
      if (y2 !== {a[7:0], a[15:8], a[23:16], a[31:24]}) begin failures++; $display("FAIL: double shuffle %08h", y2); end
      if (y4 !== a) begin failures++; $display("FAIL: four shuffles %08h", y4); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
