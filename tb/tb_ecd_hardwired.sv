// tb_ecd_hardwired: end-to-end test of the decoder with hardwired control, on
// blocks of both sizes (all zero, one or two corrupted symbols, random),
// against the reference model, with random handshake delays on every
// channel. Also checks the results arrive exactly once per block and do
// not move during their handshakes.
module tb_ecd_hardwired;
  import tb_ecd_ref::*;
  logic clk = 0, rst_n = 0, start = 0;
  logic       t_req, t_ack, t_data, c_req, c_ack, s_req, s_ack, s_data, e_req, e_ack, l_req, l_ack;
  logic [7:0] c_data, e_data;
  logic [5:0] l_data;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  ecd_hardwired dut (.*);
  tb_ecd_driver env (.*);

  initial begin
    byte_t sym[$];
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    start <= 1;
    for (int b = 0; b < 12; b++) begin
      result_t     r;
      logic        s;
      logic [7:0]  e;
      logic [5:0]  l;
      int unsigned cyc;
      logic        t;
      t = b[0];
      sym = {};
      for (int k = 0; k < (t ? 32 : 27); k++) sym.push_back(b >= 8 ? byte_t'($urandom) : 8'h00);
      if (b >= 2 && b < 8) sym[$urandom_range(sym.size() - 1)] = byte_t'($urandom_range(255, 1));
      if (b >= 6 && b < 8) sym[$urandom_range(sym.size() - 1)] = byte_t'($urandom_range(255, 1));
      r = decode(t, sym);
      env.run_block(t, sym, s, e, l, cyc);
      checks++;
      if (s !== r.stat || e !== r.e || l !== r.l) begin
        failures++;
        $display("FAIL: block %0d: s=%0d e=%02h l=%0d expected s=%0d e=%02h l=%0d", b, s, e, l, r.stat, r.e, r.l);
      end
    end
    repeat (20) @(posedge clk);
    checks += 2;
    if (env.u_s.got.size() + env.u_e.got.size() + env.u_l.got.size() != 0) begin failures++; $display("FAIL: extra results"); end
    if (env.proto_err != 0) begin failures++; $display("FAIL: result data moved"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (200000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
