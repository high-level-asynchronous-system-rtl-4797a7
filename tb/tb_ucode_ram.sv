// tb_ucode_ram: fills the microcode RAM with random words, then mixes
// random writes and reads for many cycles. Every read is checked one clock
// later against a model array, including reads of the address being
// written in the same cycle, which must return the old word.
module tb_ucode_ram;
  import ecd_pkg::*;
  logic       clk = 1'b0;
  logic       we = 1'b0;
  logic [3:0] waddr = '0, raddr = '0;
  uinstr_t    wdata = '0, rdata;
  uinstr_t    model [16];
  uinstr_t    expect_q;
  int         same_addr = 0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  ucode_ram #(.AW(4)) dut (.*);

  function automatic uinstr_t rnd_word();
    return uinstr_t'({$urandom, $urandom});
  endfunction

  initial begin
    for (int a = 0; a < 16; a++) begin
      uinstr_t w;
      w = rnd_word();
      @(negedge clk);
      we <= 1'b1; waddr <= 4'(a); wdata <= w;
      model[a] = w;
    end
    @(negedge clk);
    we <= 1'b0;
    for (int i = 0; i < 400; i++) begin
      logic       do_w;
      logic [3:0] wa, ra;
      uinstr_t    w;
      do_w = 1'($urandom);
      wa = 4'($urandom); ra = (i % 5 == 0) ? wa : 4'($urandom);
      w = rnd_word();
      @(negedge clk);
      we <= do_w; waddr <= wa; wdata <= w; raddr <= ra;
      @(posedge clk);
      expect_q = model[ra];
      if (do_w) model[wa] = w;
      if (do_w && wa == ra) same_addr++;
      #1;
      checks++;
      if (rdata !== expect_q) begin
        failures++;
        $display("FAIL: read %0d at address %0d: got %h expected %h", i, ra, rdata, expect_q);
      end
    end
    checks++;
    if (same_addr == 0) begin failures++; $display("FAIL: no read during write"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (5000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
