// tb_thread_ctrl: a three-step thread against random-delay units. Checks
// the steps run strictly one after another in order 0, 1, 2, each a full
// handshake, and that the thread acknowledges only after the last one.
module tb_thread_ctrl;
  logic       clk = 0, rst_n = 0, req = 0, ack;
  logic [2:0] out_req, out_ack;
  int checks = 0, failures = 0;
  int order[$];
  always #5 clk = ~clk;

  thread_ctrl #(.STEPS(3)) dut (.clk, .rst_n, .req, .ack, .out_req, .out_ack);
  for (genvar i = 0; i < 3; i++) begin : g_u
    tb_hs_resp #(.MAX_DELAY(3)) u (.clk, .req(out_req[i]), .ack(out_ack[i]));
  end

  logic [2:0] prev_req = '0;
  always @(posedge clk) begin
    for (int i = 0; i < 3; i++) if (out_req[i] && !prev_req[i]) order.push_back(i);
    prev_req <= out_req;
    if (rst_n && ($countones(out_req) > 1 || (out_req != 0 && ((out_ack & ~out_req) != 0)))) begin
      failures++; $display("FAIL: steps overlap");
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int r = 0; r < 20; r++) begin
      repeat ($urandom_range(3)) @(posedge clk);
      order.delete();
      req <= 1;
      do @(posedge clk); while (!ack);
      checks += 2;
      if (order.size() != 3 || order[0] != 0 || order[1] != 1 || order[2] != 2) begin
        failures++; $display("FAIL: step order %p", order);
      end
      if (out_req != 0 || out_ack != 0) begin failures++; $display("FAIL: ack before last step ended"); end
      req <= 0;
      do @(posedge clk); while (ack);
    end
    checks++;
    if (g_u[0].u.count != 20 || g_u[2].u.count != 20) begin failures++; $display("FAIL: handshake count"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (20000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
