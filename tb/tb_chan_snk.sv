// tb_chan_snk: testbench model of a four-phase bundled-data receiver.
//
// Acknowledges every request after a random 0..MAX_DELAY cycles, capturing
// data at that moment, and drops ack a random delay after req falls. Every
// received word is pushed into the queue `got`. It also counts protocol
// errors: data changing while req is high and ack has not yet returned to 0.
// TWO_PHASE=1: a word is offered by a req toggle and taken by copying req to
// ack.
module tb_chan_snk #(
  parameter int unsigned W = 8,
  parameter int unsigned MAX_DELAY = 3,
  parameter bit          TWO_PHASE = 1'b0
) (
  input  logic         clk,
  input  logic         req,
  output logic         ack,
  input  logic [W-1:0] data
);
  logic [W-1:0] got[$];
  int unsigned  proto_err = 0;
  logic [W-1:0] held;

  initial begin
    ack = 1'b0;
    // let the sender come out of reset first
    repeat (2) @(posedge clk);
    while (TWO_PHASE) begin
      do @(posedge clk); while (req == ack);
      held = data;
      repeat ($urandom_range(MAX_DELAY)) begin
        @(posedge clk);
        if (data != held) proto_err++;
      end
      got.push_back(data);
      ack <= req;
      @(posedge clk);
    end
    forever begin
      do @(posedge clk); while (!req);
      held = data;
      repeat ($urandom_range(MAX_DELAY)) begin
        @(posedge clk);
        if (data != held) proto_err++;
      end
      got.push_back(data);
      ack <= 1'b1;
      do @(posedge clk); while (req);
      repeat ($urandom_range(MAX_DELAY)) @(posedge clk);
      ack <= 1'b0;
      @(posedge clk);
    end
  end
endmodule
