// tb_hs_reg: four-phase handshakes with random data and random gaps. Checks
// that q takes d on the rising request, that ack rises one cycle after req
// and falls one cycle after req falls, and that q holds while req is low
// even when d changes.
module tb_hs_reg;
  logic        clk = 0, rst_n = 0, req = 0, ack;
  logic [31:0] d = '0, q;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  hs_reg #(.WIDTH(32)) dut (.clk, .rst_n, .req, .ack, .d, .q);

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int i = 0; i < 100; i++) begin
      logic [31:0] v;
      int lat;
      v = $urandom;
      @(posedge clk);
      d <= v; req <= 1;
      lat = 0;
      do begin @(posedge clk); lat++; end while (!ack);
      checks += 2;
      if (q !== v) begin failures++; $display("FAIL: q=%08h expected %08h", q, v); end
      if (lat != 2) begin failures++; $display("FAIL: ack after %0d edges", lat); end
      req <= 0;
      d   <= ~v;
      lat = 0;
      do begin @(posedge clk); lat++; end while (ack);
      repeat ($urandom_range(3)) @(posedge clk);
      checks += 2;
      if (lat != 2) begin failures++; $display("FAIL: ack fell after %0d edges", lat); end
      if (q !== v) begin failures++; $display("FAIL: q changed while idle"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (10000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
