// tb_chan_src: testbench model of a four-phase bundled-data sender.
//
// send(v) puts v on data, raises req, waits for ack, lowers req and waits
// for ack to fall. Before raising req and before lowering it, it waits a
// random 0..MAX_DELAY cycles, so the receiver sees both fast and slow
// senders. TWO_PHASE=1: send(v) toggles req and waits for ack to equal it.
module tb_chan_src #(
  parameter int unsigned W = 8,
  parameter int unsigned MAX_DELAY = 3,
  parameter bit          TWO_PHASE = 1'b0
) (
  input  logic         clk,
  output logic         req,
  input  logic         ack,
  output logic [W-1:0] data
);
  int unsigned sent = 0;

  initial begin
    req  = 1'b0;
    data = '0;
  end

  task automatic send(input logic [W-1:0] v);
    repeat ($urandom_range(MAX_DELAY)) @(posedge clk);
    data <= v;
    if (TWO_PHASE) begin
      req <= !req;
      @(posedge clk);
      while (ack != req) @(posedge clk);
      sent++;
      return;
    end
    req  <= 1'b1;
    do @(posedge clk); while (!ack);
    repeat ($urandom_range(MAX_DELAY)) @(posedge clk);
    req <= 1'b0;
    do @(posedge clk); while (ack);
    sent++;
  endtask
endmodule
