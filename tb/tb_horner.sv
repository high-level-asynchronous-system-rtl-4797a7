// tb_horner: checks one Horner step against the reference model for random
// syndromes and symbols, with s = 0, and for a known case: alpha^3 * 0x80.
module tb_horner;
  import tb_ecd_ref::*;
  logic [7:0]  s;
  logic [31:0] syn, y;
  int checks = 0, failures = 0;

  horner dut (.s, .syn, .y);

  initial begin
    for (int i = 0; i < 500; i++) begin
      s   = (i % 5 == 0) ? 8'h00 : 8'($urandom);
      syn = $urandom;
      #1;
      checks++;
      if (y !== unpack32(horner_step(pack32(syn), s))) begin
        failures++;
        $display("FAIL: s=%02h syn=%08h y=%08h", s, syn, y);
      end
    end
    // 0x80 * x = 0x1D, * x = 0x3A, * x = 0x74
    s = 8'h00; syn = 32'h80_80_80_80; #1;
    checks++;
    if (y !== 32'h74_3A_1D_80) begin failures++; $display("FAIL: alpha powers y=%08h", y); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
