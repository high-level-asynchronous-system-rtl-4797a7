// tb_errcheck_ctrl: ERR-CHECK against random-delay models of its units and
// threads. The testbench models the counter (loaded by the n step,
// decremented by T2) and makes the syndrome match appear after K steps of
// T3, with K = 0, in the middle and beyond the block (search runs out).
// Checks the burst sequence {n, e}, {syn}, {syn}, min(K, words) forks
// {T2, T3}, {stat}, {syn}, {stat}, {syn}, {stat}, {sel}, the modes of each
// burst, and the final acknowledge to DECODE.
module tb_errcheck_ctrl;
  import ecd_pkg::*;
  logic      clk = 0, rst_n = 0, req = 0, ack, n5, eq;
  unit_vec_t dp_req, dp_ack;
  dp_mode_t  mode;
  logic      t2_req, t2_ack, t3_req, t3_ack;
  int checks = 0, failures = 0;
  int n = 0, steps = 0, k_match = 0;
  string log[$];
  always #5 clk = ~clk;

  errcheck_ctrl dut (.*);

  assign n5 = (n < 0);
  assign eq = (steps >= k_match);
  for (genvar i = 0; i < NUNITS; i++) begin : g_u
    tb_hs_resp #(.MAX_DELAY(2)) u (.clk, .req(dp_req[i]), .ack(dp_ack[i]));
  end
  tb_hs_resp #(.MAX_DELAY(3)) r2 (.clk, .req(t2_req), .ack(t2_ack));
  tb_hs_resp #(.MAX_DELAY(3)) r3 (.clk, .req(t3_req), .ack(t3_ack));

  int words = 27;
  logic [10:0] prev = '0;
  always @(posedge clk) begin
    logic [10:0] cur;
    string s;
    cur = {t3_req, t2_req, dp_req};
    if ((cur & ~prev) != 0) begin
      s = "";
      if (cur[U_NREG]) s = {s, "N "};
      if (cur[U_SYN])  s = {s, $sformatf("SYN%0d ", mode.syn_mode)};
      if (cur[U_STAT]) s = {s, $sformatf("STAT%0d ", mode.stat_or)};
      if (cur[U_EREG]) s = {s, "E "};
      if (cur[U_SEL])  s = {s, "SEL "};
      if (cur[9])      s = {s, "T2 "};
      if (cur[10])     s = {s, "T3 "};
      log.push_back(s);
      if (cur[U_NREG]) begin
        checks++;
        if (!mode.n_load) begin failures++; $display("FAIL: n not in load mode"); end
        n = words - 1;
      end
      if (cur[9]) n--;
      if (cur[10]) steps++;
    end
    prev <= cur;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int r = 0; r < 6; r++) begin
      string exp[$];
      int    kk;
      words   = r[0] ? 32 : 27;
      k_match = (r < 2) ? 0 : (r < 4) ? int'($urandom_range(words - 1, 1)) : 100;
      steps   = 0;
      kk      = (k_match < words) ? k_match : words;
      log.delete();
      exp = {"N E ", "SYN3 ", "SYN3 "};
      for (int k = 0; k < kk; k++) exp.push_back("T2 T3 ");
      exp = {exp, "STAT0 ", "SYN3 ", "STAT1 ", "SYN3 ", "STAT1 ", "SEL "};
      req <= 1;
      do @(posedge clk); while (!ack);
      checks += 2;
      if (log != exp) begin
        failures++;
        $display("FAIL: round %0d (match after %0d): %0d bursts, expected %0d", r, k_match, log.size(), exp.size());
        foreach (log[i]) $display("   %s", log[i]);
      end
      if (dp_req != 0) begin failures++; $display("FAIL: ack with requests up"); end
      req <= 0;
      do @(posedge clk); while (ack);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (50000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
