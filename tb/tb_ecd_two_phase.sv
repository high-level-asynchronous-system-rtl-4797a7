// tb_ecd_two_phase: end-to-end test of the top level built with two-phase
// (transition) signalling on the t, c, s, e and l channels, at the default
// block sizes of 27 and 32 symbols.
//
// It is the full-size test with the channel models switched to two-phase
// and a shorter block list. Both decoder instances get the same blocks, and
// every result (s, e, l) is compared with the reference model. The same
// mechanism counters must each see their event at least once, and the
// cycles per block of each control style are reported.
module tb_ecd_two_phase;
  import tb_ecd_ref::*;
  import ecd_pkg::*;

  localparam int NBLOCKS = 8;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic hw_start = 1'b0, ue_start = 1'b0;
  logic       ue_prog_we = 1'b0;
  logic [3:0] ue_prog_addr = 4'd0;
  uinstr_t    ue_prog_data = '0;
  always #5 clk = ~clk;

  logic       hw_t_req, hw_t_ack, hw_t_data, hw_c_req, hw_c_ack;
  logic [7:0] hw_c_data, hw_e_data;
  logic       hw_s_req, hw_s_ack, hw_s_data, hw_e_req, hw_e_ack, hw_l_req, hw_l_ack;
  logic [5:0] hw_l_data;
  logic       ue_t_req, ue_t_ack, ue_t_data, ue_c_req, ue_c_ack;
  logic [7:0] ue_c_data, ue_e_data;
  logic       ue_s_req, ue_s_ack, ue_s_data, ue_e_req, ue_e_ack, ue_l_req, ue_l_ack;
  logic [5:0] ue_l_data;

  cd_error_decoder #(.TWO_PHASE(1)) dut (.*);

  tb_ecd_driver #(.TWO_PHASE(1)) d_hw (.clk,
    .t_req(hw_t_req), .t_ack(hw_t_ack), .t_data(hw_t_data),
    .c_req(hw_c_req), .c_ack(hw_c_ack), .c_data(hw_c_data),
    .s_req(hw_s_req), .s_ack(hw_s_ack), .s_data(hw_s_data),
    .e_req(hw_e_req), .e_ack(hw_e_ack), .e_data(hw_e_data),
    .l_req(hw_l_req), .l_ack(hw_l_ack), .l_data(hw_l_data));

  tb_ecd_driver #(.TWO_PHASE(1)) d_ue (.clk,
    .t_req(ue_t_req), .t_ack(ue_t_ack), .t_data(ue_t_data),
    .c_req(ue_c_req), .c_ack(ue_c_ack), .c_data(ue_c_data),
    .s_req(ue_s_req), .s_ack(ue_s_ack), .s_data(ue_s_data),
    .e_req(ue_e_req), .e_ack(ue_e_ack), .e_data(ue_e_data),
    .l_req(ue_l_req), .l_ack(ue_l_ack), .l_data(ue_l_data));

  int checks = 0, failures = 0;

  // mechanism counters
  int n_t0 = 0, n_t1 = 0, n_found = 0, n_found_now = 0, n_ran_out = 0;
  int n_sender_wait = 0, n_fork = 0, n_chain = 0, n_branch = 0;
  longint hw_cycles = 0, ue_cycles = 0;
  logic prev_t0 = 1'b0;

  always @(posedge clk) begin
    if ((dut.u_hw.u_dp.req[U_CCH] && !hw_c_req) || (dut.u_ue.u_dp.req[U_CCH] && !ue_c_req))
      n_sender_wait++;
    if (dut.u_hw.t0_req && dut.u_hw.t1_req && !prev_t0) n_fork++;
    prev_t0 <= dut.u_hw.t0_req;
    if (dut.u_ue.step && dut.u_ue.ir.chain != '0) n_chain++;
    if (dut.u_ue.step && dut.u_ue.taken) n_branch++;
  end

  function automatic void check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endfunction

  // block kinds: 0 all zero, 1 one bad symbol, 2 two bad symbols, 3 random
  function automatic void make_block(input int kind, input logic t, ref byte_t sym[$]);
    int words = t ? 32 : 27;
    sym = {};
    for (int k = 0; k < words; k++)
      sym.push_back(kind == 3 ? byte_t'($urandom) : 8'h00);
    if (kind == 1 || kind == 2) sym[$urandom_range(words - 1)] = byte_t'($urandom_range(255, 1));
    if (kind == 2) sym[$urandom_range(words - 1)] = byte_t'($urandom_range(255, 1));
  endfunction

  initial begin
    byte_t   sym[$];
    result_t ref_r;
    logic    hs, us;
    logic [7:0] he, ue;
    logic [5:0] hl, ul;
    int unsigned hc, uc;
    logic t;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    hw_start <= 1'b1;
    ue_start <= 1'b1;
    for (int b = 0; b < NBLOCKS; b++) begin
      t = b[0];
      make_block((b / 2) % 4, t, sym);
      ref_r = decode(t, sym);
      fork
        d_hw.run_block(t, sym, hs, he, hl, hc);
        d_ue.run_block(t, sym, us, ue, ul, uc);
      join
      check(hs == ref_r.stat && he == ref_r.e && hl == ref_r.l,
            $sformatf("hardwired block %0d: got s=%0d e=%02h l=%0d, expected s=%0d e=%02h l=%0d",
                      b, hs, he, hl, ref_r.stat, ref_r.e, ref_r.l));
      check(us == ref_r.stat && ue == ref_r.e && ul == ref_r.l,
            $sformatf("microengine block %0d: got s=%0d e=%02h l=%0d, expected s=%0d e=%02h l=%0d",
                      b, us, ue, ul, ref_r.stat, ref_r.e, ref_r.l));
      if (t) n_t1++; else n_t0++;
      if (ref_r.l[5]) n_ran_out++;
      else if (ref_r.search_steps == 0) n_found_now++;
      else n_found++;
      hw_cycles += longint'(hc);
      ue_cycles += longint'(uc);
    end
    check(d_hw.proto_err == 0 && d_ue.proto_err == 0, "result data changed during a handshake");
    begin
      automatic string names[9] = '{"27-word block", "32-word block", "match after search steps",
                          "match at once", "search ran out", "wait for sender",
                          "wait for receiver", "hardwired thread fork",
                          "chained microinstruction"};
      int    counts[9];
      counts = '{n_t0, n_t1, n_found, n_found_now, n_ran_out, n_sender_wait,
                 int'(d_hw.out_wait_cycles + d_ue.out_wait_cycles), n_fork, n_chain};
      foreach (names[i]) begin
        $display("mechanism %-26s : %0d", names[i], counts[i]);
        check(counts[i] > 0, {"mechanism never happened: ", names[i]});
      end
      $display("mechanism %-26s : %0d", "microcode branch taken", n_branch);
      check(n_branch > 0, "mechanism never happened: microcode branch taken");
    end
    $display("cycles per block: hardwired %0d, microengine %0d",
             hw_cycles / longint'(NBLOCKS), ue_cycles / longint'(NBLOCKS));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
