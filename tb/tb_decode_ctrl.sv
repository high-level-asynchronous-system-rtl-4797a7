// tb_decode_ctrl: DECODE against random-delay models of its units, threads
// and ERR-CHECK, with the word counter modelled in the testbench (loaded by
// the n-register step, decremented by each T0 handshake). Checks the burst
// sequence of each round: {t chan, syn clear}, {t reg}, {n load}, then one
// {T0, T1} fork per word of the block, then {ERR-CHECK}; and the modes.
module tb_decode_ctrl;
  import ecd_pkg::*;
  logic      clk = 0, rst_n = 0, start = 0, n5;
  unit_vec_t dp_req, dp_ack;
  dp_mode_t  mode;
  logic      t0_req, t0_ack, t1_req, t1_ack, err_req, err_ack;
  int checks = 0, failures = 0;
  int n = 0;
  string log[$];
  always #5 clk = ~clk;

  decode_ctrl dut (.*);

  assign n5 = (n < 0);
  for (genvar i = 0; i < NUNITS; i++) begin : g_u
    tb_hs_resp #(.MAX_DELAY(2)) u (.clk, .req(dp_req[i]), .ack(dp_ack[i]));
  end
  tb_hs_resp #(.MAX_DELAY(3)) r0 (.clk, .req(t0_req), .ack(t0_ack));
  tb_hs_resp #(.MAX_DELAY(3)) r1 (.clk, .req(t1_req), .ack(t1_ack));
  tb_hs_resp #(.MAX_DELAY(5)) re (.clk, .req(err_req), .ack(err_ack));

  int words = 27;
  logic [12:0] prev = '0;
  always @(posedge clk) begin
    logic [12:0] cur;
    string s;
    cur = {err_req, t1_req, t0_req, 1'b0, dp_req};
    if ((cur & ~prev) != 0) begin
      s = "";
      if (cur[U_TCH])  s = {s, "TCH "};
      if (cur[U_TREG]) s = {s, "TREG "};
      if (cur[U_NREG]) s = {s, "NREG "};
      if (cur[U_SYN])  s = {s, "SYN "};
      if (cur[10])     s = {s, "T0 "};
      if (cur[11])     s = {s, "T1 "};
      if (cur[12])     s = {s, "ERR "};
      log.push_back(s);
      if (cur[U_NREG]) begin
        checks++;
        if (!mode.n_load) begin failures++; $display("FAIL: n not in load mode"); end
        n = words - 1;
      end
      if (cur[U_SYN]) begin
        checks++;
        if (mode.syn_mode != SYN_ZERO) begin failures++; $display("FAIL: syn not cleared"); end
      end
      if (cur[10]) n--;
    end
    prev <= cur;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    repeat (5) @(posedge clk);
    checks++;
    if (dp_req != 0 || t0_req || err_req) begin failures++; $display("FAIL: started without start"); end
    start <= 1;
    for (int r = 0; r < 4; r++) begin
      string exp[$];
      words = r[0] ? 32 : 27;
      log.delete();
      exp = {"TCH SYN ", "TREG ", "NREG "};
      for (int k = 0; k < words; k++) exp.push_back("T0 T1 ");
      exp.push_back("ERR ");
      do @(posedge clk); while (re.count != r + 1);
      checks++;
      if (log != exp) begin
        failures++;
        $display("FAIL: round %0d: %0d bursts, expected %0d; first %s last %s", r, log.size(), exp.size(),
                 log.size() > 0 ? log[0] : "-", log.size() > 0 ? log[$] : "-");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (50000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
