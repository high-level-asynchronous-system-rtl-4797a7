// tb_ecd_datapath: runs the decoder's algorithm on the datapath from a
// procedural controller in the testbench, one four-phase burst per step,
// with random-delay senders and receivers on the channels. Checks the
// syndromes after the word loop and after the search, the n register at each stage and the
// results sent on s, e and l against the reference model, for blocks of
// both sizes.
module tb_ecd_datapath;
  import ecd_pkg::*;
  import tb_ecd_ref::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  unit_vec_t  req = '0, ack;
  dp_mode_t   mode = '0;
  logic       n5, eq, t;
  logic [5:0] n_q;
  logic [31:0] syn_q;
  logic       stat_q;
  logic       t_req, t_ack, t_data, c_req, c_ack, s_req, s_ack, s_data, e_req, e_ack, l_req, l_ack;
  logic [7:0] c_data, e_data;
  logic [5:0] l_data;
  int checks = 0, failures = 0;

  ecd_datapath dut (.*);
  tb_ecd_driver env (.*);

  task automatic hs(input unit_vec_t m, input dp_mode_t md);
    mode <= md;
    req  <= m;
    do @(posedge clk); while ((ack & m) != m);
    req <= '0;
    do @(posedge clk); while ((ack & m) != '0);
  endtask

  function automatic unit_vec_t u(input unit_e a);
    u = '0; u[a] = 1'b1;
  endfunction

  function automatic dp_mode_t md(input logic nl, input syn_mode_e sm, input logic so);
    md = '{n_load: nl, syn_mode: sm, stat_or: so};
  endfunction

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    for (int b = 0; b < 6; b++) begin
      byte_t   sym[$];
      result_t r;
      syn_t    sref;
      logic    tb;
      tb = b[0];
      sym = {};
      for (int k = 0; k < (tb ? 32 : 27); k++) sym.push_back(b >= 4 ? byte_t'($urandom) : 8'h00);
      if (b < 4 && b >= 2) sym[$urandom_range(20)] = byte_t'($urandom_range(255, 1));
      r = decode(tb, sym);
      sref = '{default: 8'h00};
      foreach (sym[k]) sref = horner_step(sref, sym[k]);
      fork
        begin
          env.u_t.send(tb);
          foreach (sym[k]) env.u_c.send(sym[k]);
        end
        begin
          hs(u(U_TCH) | u(U_SYN), md(1, SYN_ZERO, 0));
          hs(u(U_TREG), md(1, SYN_ZERO, 0));
          hs(u(U_NREG), md(1, SYN_ZERO, 0));
          check(n_q == (tb ? 6'd31 : 6'd26) && syn_q == 0, "n loaded and syn cleared");
          while (!n5) begin
            hs(u(U_CCH), md(0, SYN_HORNER, 0));
            hs(u(U_SREG), md(0, SYN_HORNER, 0));
            hs(u(U_SYN) | u(U_NREG), md(0, SYN_HORNER, 0));
          end
          check(syn_q == unpack32(sref), $sformatf("syndromes %08h expected %08h", syn_q, unpack32(sref)));
          hs(u(U_NREG) | u(U_EREG), md(1, SYN_SHUFFLE, 0));
          hs(u(U_SYN), md(1, SYN_SHUFFLE, 0));
          hs(u(U_SYN), md(1, SYN_SHUFFLE, 0));
          while (!(n5 || eq)) hs(u(U_SYN) | u(U_NREG), md(0, SYN_HORNER0, 0));
          begin
            syn_t sx;
            sx = shuf(shuf(sref));
            repeat (r.search_steps) sx = horner_step(sx, 8'h00);
            check(syn_q == unpack32(sx), $sformatf("syndromes after the search %08h expected %08h", syn_q, unpack32(sx)));
          end
          hs(u(U_STAT), md(1, SYN_SHUFFLE, 0));
          hs(u(U_SYN), md(1, SYN_SHUFFLE, 1));
          hs(u(U_STAT), md(1, SYN_SHUFFLE, 1));
          hs(u(U_SYN), md(1, SYN_SHUFFLE, 1));
          hs(u(U_STAT), md(1, SYN_SHUFFLE, 1));
          check(syn_q == unpack32(shuf(shuf(shuf(shuf(sref))))) || r.search_steps != 0,
                "four shuffles restore the syndromes when no search step ran");
          hs(u(U_SEL), md(1, SYN_SHUFFLE, 1));
        end
      join
      check(env.u_s.got.size() == 1 && env.u_e.got.size() == 1 && env.u_l.got.size() == 1, "one result on each channel");
      if (env.u_l.got.size() == 1 && env.u_s.got.size() == 1 && env.u_e.got.size() == 1)
        check(env.u_s.got[0] == r.stat && env.u_e.got[0] == r.e && env.u_l.got[0] == r.l,
              $sformatf("block %0d: s=%0d e=%02h l=%0d expected s=%0d e=%02h l=%0d", b,
                        env.u_s.got[0], env.u_e.got[0], env.u_l.got[0], r.stat, r.e, r.l));
      env.u_s.got.delete(); env.u_e.got.delete(); env.u_l.got.delete();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (100000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
