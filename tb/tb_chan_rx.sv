// tb_chan_rx: an 8-bit channel between a random-delay sender and a control
// side that asks for words at random moments, once with four-phase and
// once with two-phase signalling on the sender side. Checks every word
// arrives in order on q, that control is acknowledged only after the
// sender's handshake has completed, and that the sender is never
// acknowledged without a control request.
module tb_chan_rx;
  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;
  bit done[2] = '{0, 0};
  always #5 clk = ~clk;

  for (genvar P = 0; P < 2; P++) begin : g_mode
    logic       ch_req, ch_ack, req = 0, ack;
    logic [7:0] ch_data, q;
    logic [7:0] words[$];
    logic       prev_ack = 0, prev_req = 0;
    int         spurious = 0;

    chan_rx #(.WIDTH(8), .TWO_PHASE(P == 1)) dut (.clk, .rst_n, .ch_req, .ch_ack, .ch_data, .req, .ack, .q);
    tb_chan_src #(.W(8), .MAX_DELAY(4), .TWO_PHASE(P == 1)) src (.clk, .req(ch_req), .ack(ch_ack), .data(ch_data));

    // the channel may only acknowledge the sender while control asks
    always @(posedge clk) begin
      if (rst_n && ch_ack != prev_ack && (P == 1 || ch_ack) && !prev_req) spurious++;
      prev_ack <= ch_ack;
      prev_req <= req;
    end

    initial begin
      for (int i = 0; i < 60; i++) words.push_back(8'($urandom));
      wait (rst_n);
      fork
        foreach (words[i]) src.send(words[i]);
        for (int i = 0; i < 60; i++) begin
          repeat ($urandom_range(5)) @(posedge clk);
          req <= 1;
          do @(posedge clk); while (!ack);
          checks += 2;
          if (q !== words[i]) begin failures++; $display("FAIL: mode %0d word %0d q=%02h expected %02h", P, i, q, words[i]); end
          if (P == 0 ? (ch_req || ch_ack) : (ch_req != ch_ack)) begin
            failures++; $display("FAIL: mode %0d: control ack before sender handshake ended", P);
          end
          req <= 0;
          do @(posedge clk); while (ack);
        end
      join
      checks++;
      if (spurious != 0) begin failures++; $display("FAIL: mode %0d: sender acknowledged without request", P); end
      done[P] = 1;
    end
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1;
    wait (done[0] && done[1]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  initial begin repeat (20000) @(posedge clk); failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule
