// tb_ucode_rom: reads every address and checks the microprogram: one-cycle
// read latency, chain bits only on enabled units whose chain predecessor is
// enabled too, the units, modes and branches of each instruction of the
// decoder program, and that unused addresses jump to 0 doing nothing.
module tb_ucode_rom;
  import ecd_pkg::*;
  logic       clk = 0;
  logic [3:0] addr = '0;
  uinstr_t    data;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  ucode_rom dut (.clk, .addr, .data);

  // predecessor of each unit in the chain order, -1 for none
  const int PRED[9] = '{-1, 0, 1, -1, 3, 4, 5, -1, 6};

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  function automatic unit_vec_t v(input int a, input int b = -1, input int c = -1, input int d = -1);
    v = '0;
    v[a] = 1'b1;
    if (b >= 0) v[b] = 1'b1;
    if (c >= 0) v[c] = 1'b1;
    if (d >= 0) v[d] = 1'b1;
  endfunction

  initial begin
    for (int a = 0; a < 16; a++) begin
      addr <= 4'(a);
      @(posedge clk);
      #1;
      check((data.chain & ~data.en) == '0, $sformatf("addr %0d: chain on a disabled unit", a));
      for (int u = 0; u < NUNITS; u++)
        if (data.chain[u]) check(PRED[u] >= 0 && data.en[PRED[u]], $sformatf("addr %0d: unit %0d chained to nothing", a, u));
      case (a)
        0: check(data.en == v(0, 1, 2, 5) && data.chain == v(1, 2) && data.mode.n_load
                 && data.mode.syn_mode == SYN_ZERO && data.cond == C_NEVER, "addr 0");
        1: check(data.en == v(2, 3, 4, 5) && data.chain == v(4, 5) && !data.mode.n_load
                 && data.mode.syn_mode == SYN_HORNER && data.cond == C_NOT_N5 && data.target == 1, "addr 1");
        2: check(data.en == v(2, 7) && data.mode.n_load && data.cond == C_NEVER, "addr 2");
        3, 4: check(data.en == v(5) && data.mode.syn_mode == SYN_SHUFFLE && data.cond == C_NEVER, "shuffle");
        5: check(data.en == '0 && data.cond == C_FOUND && data.target == 7, "addr 5");
        6: check(data.en == v(2, 5) && !data.mode.n_load && data.mode.syn_mode == SYN_HORNER0
                 && data.cond == C_NOT_FOUND && data.target == 6, "addr 6");
        7: check(data.en == v(6) && !data.mode.stat_or, "addr 7");
        8: check(data.en == v(5, 6) && data.chain == v(6) && data.mode.stat_or
                 && data.mode.syn_mode == SYN_SHUFFLE, "addr 8");
        9: check(data.en == v(5, 6, 8) && data.chain == v(6, 8) && data.mode.stat_or
                 && data.cond == C_ALWAYS && data.target == 0, "addr 9");
        default: check(data.en == '0 && data.cond == C_ALWAYS && data.target == 0, $sformatf("unused addr %0d", a));
      endcase
    end
    // latency: data follows addr one edge later
    addr <= 4'd5;
    @(posedge clk); #1;
    addr <= 4'd9;
    #1;
    check(data.cond == C_FOUND, "data changed before the clock");
    @(posedge clk); #1;
    check(data.cond == C_ALWAYS, "data after the clock");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (1000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
