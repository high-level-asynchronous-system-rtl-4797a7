// tb_ecd_driver: testbench environment for one error decoder instance.
//
// Holds a sender on each of the t and c channels and a receiver on each of
// the s, e and l channels, all with random handshake delays. run_block(t,
// sym) sends the block-size bit and the symbols, waits for the three
// results and returns them with the number of clock cycles from the start of
// the t handshake to the arrival of the last result. Also counts cycles in
// which the decoder waited for a sender (its acknowledge pending on a
// channel whose request was low) and cycles in which a result request
// waited for the receiver. TWO_PHASE selects transition signalling.
module tb_ecd_driver #(
  parameter int unsigned MAX_DELAY = 3,
  parameter bit          TWO_PHASE = 1'b0
) (
  input  logic       clk,
  output logic       t_req,
  input  logic       t_ack,
  output logic       t_data,
  output logic       c_req,
  input  logic       c_ack,
  output logic [7:0] c_data,
  input  logic       s_req,
  output logic       s_ack,
  input  logic       s_data,
  input  logic       e_req,
  output logic       e_ack,
  input  logic [7:0] e_data,
  input  logic       l_req,
  output logic       l_ack,
  input  logic [5:0] l_data
);
  import tb_ecd_ref::*;

  int unsigned out_wait_cycles = 0;
  int unsigned proto_err;

  tb_chan_src #(.W(1), .MAX_DELAY(MAX_DELAY), .TWO_PHASE(TWO_PHASE)) u_t (.clk, .req(t_req), .ack(t_ack), .data(t_data));
  tb_chan_src #(.W(8), .MAX_DELAY(MAX_DELAY), .TWO_PHASE(TWO_PHASE)) u_c (.clk, .req(c_req), .ack(c_ack), .data(c_data));
  tb_chan_snk #(.W(1), .MAX_DELAY(MAX_DELAY), .TWO_PHASE(TWO_PHASE)) u_s (.clk, .req(s_req), .ack(s_ack), .data(s_data));
  tb_chan_snk #(.W(8), .MAX_DELAY(MAX_DELAY), .TWO_PHASE(TWO_PHASE)) u_e (.clk, .req(e_req), .ack(e_ack), .data(e_data));
  tb_chan_snk #(.W(6), .MAX_DELAY(MAX_DELAY), .TWO_PHASE(TWO_PHASE)) u_l (.clk, .req(l_req), .ack(l_ack), .data(l_data));

  assign proto_err = u_s.proto_err + u_e.proto_err + u_l.proto_err;

  always @(posedge clk)
    if (TWO_PHASE ? (s_req != s_ack || e_req != e_ack || l_req != l_ack)
                  : ((s_req && !s_ack) || (e_req && !e_ack) || (l_req && !l_ack)))
      out_wait_cycles++;

  task automatic run_block(input logic t, input byte_t sym[$],
                           output logic stat, output logic [7:0] e,
                           output logic [5:0] l, output int unsigned cycles);
    longint unsigned c0 = 0;
    fork
      begin
        longint unsigned n = 0;
        forever begin @(posedge clk); n++; c0 = n; end
      end
      begin
        u_t.send(t);
        foreach (sym[k]) u_c.send(sym[k]);
        wait (u_s.got.size() > 0 && u_e.got.size() > 0 && u_l.got.size() > 0);
      end
    join_any
    disable fork;
    stat   = u_s.got.pop_front();
    e      = u_e.got.pop_front();
    l      = u_l.got.pop_front();
    cycles = int'(c0);
  endtask
endmodule
