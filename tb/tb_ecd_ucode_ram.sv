// tb_ecd_ucode_ram: end-to-end test of the top level with the microengine's
// microcode memory built as a RAM, which the testbench programs.
//
// The RAM is loaded twice, each time with the decoder held in reset and
// not started. The first program is the chained one: each fork-join thread
// of the algorithm runs as a chain inside one instruction. The second does
// the same algorithm with no chain bits and one unit operation per thread
// step, so that every step of a thread is its own instruction (16 words).
// Both programs are written here from the algorithm, independently of the
// ROM. Each runs the same blocks (both sizes, all zero, corrupted and
// random) and every result is checked against the reference model. The
// test also checks that the chained program takes fewer cycles per block
// than the unchained one, and reports both, with the hardwired control's
// count from the same blocks as a reference.
module tb_ecd_ucode_ram;
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

  cd_error_decoder #(.UCODE_RAM(1'b1)) dut (.*);

  tb_ecd_driver d_hw (.clk,
    .t_req(hw_t_req), .t_ack(hw_t_ack), .t_data(hw_t_data),
    .c_req(hw_c_req), .c_ack(hw_c_ack), .c_data(hw_c_data),
    .s_req(hw_s_req), .s_ack(hw_s_ack), .s_data(hw_s_data),
    .e_req(hw_e_req), .e_ack(hw_e_ack), .e_data(hw_e_data),
    .l_req(hw_l_req), .l_ack(hw_l_ack), .l_data(hw_l_data));

  tb_ecd_driver d_ue (.clk,
    .t_req(ue_t_req), .t_ack(ue_t_ack), .t_data(ue_t_data),
    .c_req(ue_c_req), .c_ack(ue_c_ack), .c_data(ue_c_data),
    .s_req(ue_s_req), .s_ack(ue_s_ack), .s_data(ue_s_data),
    .e_req(ue_e_req), .e_ack(ue_e_ack), .e_data(ue_e_data),
    .l_req(ue_l_req), .l_ack(ue_l_ack), .l_data(ue_l_data));

  int checks = 0, failures = 0;

  function automatic void check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endfunction

  // one instruction: enabled units, chained units, modes and branch
  function automatic uinstr_t ins(input unit_vec_t en, input unit_vec_t chain,
                                  input logic n_load, input syn_mode_e sm, input logic st_or,
                                  input cond_e c, input int unsigned target);
    uinstr_t w;
    w.en = en;
    w.chain = chain;
    w.mode.n_load = n_load;
    w.mode.syn_mode = sm;
    w.mode.stat_or = st_or;
    w.cond = c;
    w.target = UA_W'(target);
    return w;
  endfunction

  function automatic unit_vec_t b(input unit_e a);
    b = '0;
    b[a] = 1'b1;
  endfunction

  // chained program: threads as chains, 10 words
  function automatic uinstr_t prog_chained(input int a);
    case (a)
      0: return ins(b(U_TCH) | b(U_TREG) | b(U_NREG) | b(U_SYN), b(U_TREG) | b(U_NREG),
                    1, SYN_ZERO, 0, C_NEVER, 0);
      1: return ins(b(U_CCH) | b(U_SREG) | b(U_SYN) | b(U_NREG), b(U_SREG) | b(U_SYN),
                    0, SYN_HORNER, 0, C_NOT_N5, 1);
      2: return ins(b(U_NREG) | b(U_EREG), '0, 1, SYN_ZERO, 0, C_NEVER, 0);
      3: return ins(b(U_SYN), '0, 0, SYN_SHUFFLE, 0, C_NEVER, 0);
      4: return ins(b(U_SYN), '0, 0, SYN_SHUFFLE, 0, C_FOUND, 6);
      5: return ins(b(U_SYN) | b(U_NREG), '0, 0, SYN_HORNER0, 0, C_NOT_FOUND, 5);
      6: return ins(b(U_STAT), '0, 0, SYN_ZERO, 0, C_NEVER, 0);
      7: return ins(b(U_SYN) | b(U_STAT), b(U_STAT), 0, SYN_SHUFFLE, 1, C_NEVER, 0);
      8: return ins(b(U_SYN) | b(U_STAT) | b(U_SEL), b(U_STAT) | b(U_SEL),
                    0, SYN_SHUFFLE, 1, C_ALWAYS, 0);
      default: return ins('0, '0, 0, SYN_ZERO, 0, C_ALWAYS, 0);
    endcase
  endfunction

  // unchained program: every thread step is its own instruction, 16 words
  function automatic uinstr_t prog_plain(input int a);
    case (a)
      0:  return ins(b(U_TCH) | b(U_SYN), '0, 0, SYN_ZERO, 0, C_NEVER, 0);
      1:  return ins(b(U_TREG), '0, 0, SYN_ZERO, 0, C_NEVER, 0);
      2:  return ins(b(U_NREG), '0, 1, SYN_ZERO, 0, C_NEVER, 0);
      3:  return ins(b(U_CCH) | b(U_NREG), '0, 0, SYN_ZERO, 0, C_NEVER, 0);
      4:  return ins(b(U_SREG), '0, 0, SYN_ZERO, 0, C_NEVER, 0);
      5:  return ins(b(U_SYN), '0, 0, SYN_HORNER, 0, C_NOT_N5, 3);
      6:  return ins(b(U_NREG) | b(U_EREG), '0, 1, SYN_ZERO, 0, C_NEVER, 0);
      7:  return ins(b(U_SYN), '0, 0, SYN_SHUFFLE, 0, C_NEVER, 0);
      8:  return ins(b(U_SYN), '0, 0, SYN_SHUFFLE, 0, C_FOUND, 10);
      9:  return ins(b(U_SYN) | b(U_NREG), '0, 0, SYN_HORNER0, 0, C_NOT_FOUND, 9);
      10: return ins(b(U_STAT), '0, 0, SYN_ZERO, 0, C_NEVER, 0);
      11: return ins(b(U_SYN), '0, 0, SYN_SHUFFLE, 0, C_NEVER, 0);
      12: return ins(b(U_STAT), '0, 0, SYN_ZERO, 1, C_NEVER, 0);
      13: return ins(b(U_SYN), '0, 0, SYN_SHUFFLE, 0, C_NEVER, 0);
      14: return ins(b(U_STAT), '0, 0, SYN_ZERO, 1, C_NEVER, 0);
      default: return ins(b(U_SEL), '0, 0, SYN_ZERO, 0, C_ALWAYS, 0);
    endcase
  endfunction

  // hold both decoders in reset, write the program, release and start
  task automatic load_and_start(input bit chained);
    @(negedge clk);
    rst_n = 1'b0;
    hw_start = 1'b0;
    ue_start = 1'b0;
    for (int a = 0; a < 16; a++) begin
      ue_prog_we = 1'b1;
      ue_prog_addr = 4'(a);
      ue_prog_data = chained ? prog_chained(a) : prog_plain(a);
      @(negedge clk);
    end
    ue_prog_we = 1'b0;
    rst_n = 1'b1;
    @(negedge clk);
    hw_start = 1'b1;
    ue_start = 1'b1;
  endtask

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
    longint hw_cycles, ue_cycles[2];
    hw_cycles = 0;
    ue_cycles = '{0, 0};
    repeat (3) @(posedge clk);
    for (int p = 0; p < 2; p++) begin
      load_and_start(p == 0);
      for (int blk = 0; blk < NBLOCKS; blk++) begin
        t = blk[0];
        make_block((blk / 2) % 4, t, sym);
        ref_r = decode(t, sym);
        fork
          d_hw.run_block(t, sym, hs, he, hl, hc);
          d_ue.run_block(t, sym, us, ue, ul, uc);
        join
        check(hs == ref_r.stat && he == ref_r.e && hl == ref_r.l,
              $sformatf("hardwired block %0d: got s=%0d e=%02h l=%0d, expected s=%0d e=%02h l=%0d",
                        blk, hs, he, hl, ref_r.stat, ref_r.e, ref_r.l));
        check(us == ref_r.stat && ue == ref_r.e && ul == ref_r.l,
              $sformatf("%s program block %0d: got s=%0d e=%02h l=%0d, expected s=%0d e=%02h l=%0d",
                        p == 0 ? "chained" : "unchained", blk, us, ue, ul, ref_r.stat, ref_r.e, ref_r.l));
        if (p == 0) hw_cycles += longint'(hc);
        ue_cycles[p] += longint'(uc);
      end
    end
    check(d_hw.proto_err == 0 && d_ue.proto_err == 0, "result data changed during a handshake");
    check(ue_cycles[0] < ue_cycles[1], "chained program not faster than the unchained one");
    $display("cycles per block: hardwired %0d, chained program %0d, unchained program %0d",
             hw_cycles / longint'(NBLOCKS), ue_cycles[0] / longint'(NBLOCKS),
             ue_cycles[1] / longint'(NBLOCKS));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
