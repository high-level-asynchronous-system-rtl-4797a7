// tb_sel_chan: sends random results through the three output channels to
// random-delay receivers, once with four-phase and once with two-phase
// signalling. Checks every receiver gets its value, that the control
// acknowledge comes only after all three handshakes are complete, and that
// the data outputs hold during each handshake.
module tb_sel_chan;
  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;
  bit done[2] = '{0, 0};
  always #5 clk = ~clk;

  for (genvar P = 0; P < 2; P++) begin : g_mode
    logic       req = 0, ack;
    logic       stat;
    logic [7:0] e;
    logic [5:0] n;
    logic       s_req, s_ack, s_data, e_req, e_ack, l_req, l_ack;
    logic [7:0] e_data;
    logic [5:0] l_data;

    sel_chan #(.TWO_PHASE(P == 1)) dut (.*);
    tb_chan_snk #(.W(1), .MAX_DELAY(4), .TWO_PHASE(P == 1)) ks (.clk, .req(s_req), .ack(s_ack), .data(s_data));
    tb_chan_snk #(.W(8), .MAX_DELAY(4), .TWO_PHASE(P == 1)) ke (.clk, .req(e_req), .ack(e_ack), .data(e_data));
    tb_chan_snk #(.W(6), .MAX_DELAY(4), .TWO_PHASE(P == 1)) kl (.clk, .req(l_req), .ack(l_ack), .data(l_data));

    initial begin
      wait (rst_n);
      @(posedge clk);
      for (int i = 0; i < 50; i++) begin
        logic       vs;
        logic [7:0] ve;
        logic [5:0] vn;
        vs = 1'($urandom); ve = 8'($urandom); vn = 6'($urandom);
        stat <= vs; e <= ve; n <= vn; req <= 1;
        do @(posedge clk); while (!ack);
        checks += 2;
        if (ks.got.size() != 1 || ke.got.size() != 1 || kl.got.size() != 1 ||
            (P == 0 ? (s_ack || e_ack || l_ack) : (s_ack != s_req || e_ack != e_req || l_ack != l_req))) begin
          failures++; $display("FAIL: mode %0d: acknowledged before all channels completed", P);
        end
        if (ks.got.size() > 0 && ke.got.size() > 0 && kl.got.size() > 0 &&
            (ks.got[0] !== vs || ke.got[0] !== ve || kl.got[0] !== vn)) begin
          failures++; $display("FAIL: mode %0d: wrong data", P);
        end
        ks.got.delete(); ke.got.delete(); kl.got.delete();
        stat <= 1'($urandom); e <= 8'($urandom); n <= 6'($urandom);
        req <= 0;
        do @(posedge clk); while (ack);
      end
      checks++;
      if (ks.proto_err + ke.proto_err + kl.proto_err != 0) begin failures++; $display("FAIL: mode %0d: data moved during handshake", P); end
      done[P] = 1;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1;
    wait (done[0] && done[1]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (20000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
