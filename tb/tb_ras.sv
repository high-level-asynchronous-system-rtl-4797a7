// tb_ras: one RAS block in its three uses: disabled (done without touching
// the unit), enabled and unchained (starts at once), enabled and chained
// (waits for pred_done). Checks done only follows a complete unit handshake
// and returns to 0 after greq falls, and that fwd (the early chain
// output) rises once the unit has acknowledged, no later than done.
module tb_ras;
  logic clk = 0, rst_n = 0, greq = 0, en = 0, chain = 0, pred_done = 0, ureq, uack, fwd, done;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  ras dut (.*);
  tb_hs_resp #(.MAX_DELAY(3)) unit_model (.clk, .req(ureq), .ack(uack));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int r = 0; r < 30; r++) begin
      int mode, c0, hs0;
      mode = r % 3;
      en <= (mode != 0); chain <= (mode == 2); pred_done <= 0;
      hs0 = unit_model.count;
      @(posedge clk);
      greq <= 1;
      if (mode == 2) begin
        repeat ($urandom_range(6, 3)) begin
          @(posedge clk);
          check(!ureq && !done, "chained block started before its predecessor");
        end
        pred_done <= 1;
      end
      if (mode != 0) begin
        do @(posedge clk); while (!uack);
        @(posedge clk);
        check(fwd, "fwd not raised after the unit acknowledged");
      end
      c0 = 0;
      do begin @(posedge clk); c0++; end while (!done);
      if (mode == 0) check(c0 <= 2 && unit_model.count == hs0, "disabled block touched its unit or was slow");
      else check(unit_model.count == hs0 + 1 && !uack && !ureq, "done before the unit handshake completed");
      check(fwd, "done without fwd");
      greq <= 0;
      pred_done <= 0;
      do @(posedge clk); while (done);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (5000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
