// tb_next_addr: reset to 0, holds without step, increments on step and
// loads the target on a taken step, against a software counter.
module tb_next_addr;
  logic       clk = 0, rst_n = 0, step = 0, taken = 0;
  logic [3:0] target = '0, addr;
  int checks = 0, failures = 0;
  int model = 0;
  always #5 clk = ~clk;

  next_addr dut (.clk, .rst_n, .step, .taken, .target, .addr);

  initial begin
    repeat (2) @(posedge clk);
    checks++;
    if (addr !== 0) begin failures++; $display("FAIL: reset"); end
    rst_n <= 1;
    for (int i = 0; i < 300; i++) begin
      @(posedge clk);
      #1;
      checks++;
      if (addr !== 4'(model)) begin failures++; $display("FAIL: addr %0d expected %0d", addr, model); end
      step   <= 1'($urandom);
      taken  <= 1'($urandom);
      target <= 4'($urandom);
      #1;
      if (step) model = taken ? int'(target) : (model + 1) % 16;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (10000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
