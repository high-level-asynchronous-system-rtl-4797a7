// tb_ecu: the execution cycle against a model of the RAS acknowledge join
// with random delays. Checks nothing happens before start, that each
// instruction is one full four-phase cycle on req/ack followed by exactly one
// step pulse, that step never comes while req or ack is high, and the
// minimum cycle: FETCH, REQ, REL, NEXT.
module tb_ecu;
  logic clk = 0, rst_n = 0, start = 0, req, ack, step;
  int checks = 0, failures = 0, steps = 0, reqs = 0;
  always #5 clk = ~clk;

  ecu dut (.clk, .rst_n, .start, .req, .ack, .step);
  tb_hs_resp #(.MAX_DELAY(4)) join_model (.clk, .req, .ack);

  logic prev_req = 0;
  always @(posedge clk) begin
    if (rst_n && step) begin steps++; checks++; end
    if (rst_n && req && !prev_req) reqs++;
    prev_req <= req;
    if (rst_n && step && (req || ack)) begin failures++; $display("FAIL: step during handshake"); end
    if (rst_n && req && !prev_req && steps + 1 != reqs) begin failures++; $display("FAIL: req without step before it"); end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    repeat (10) @(posedge clk);
    checks++;
    if (reqs != 0 || steps != 0) begin failures++; $display("FAIL: ran before start"); end
    start <= 1;
    wait (steps == 30);
    checks += 2;
    if (join_model.count != 30 && join_model.count != 31) begin failures++; $display("FAIL: %0d handshakes for 30 steps", join_model.count); end
    if (reqs < 30 || reqs > 31) begin failures++; $display("FAIL: %0d requests", reqs); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (5000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
