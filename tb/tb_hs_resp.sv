// tb_hs_resp: testbench model of a passive four-phase unit.
//
// Answers req with ack after a random 1..MAX_DELAY cycles and lowers ack a
// random delay after req falls. `count` is the number of completed
// handshakes; `last_start` the cycle (of the global counter `now`) at which
// the last request was seen.
module tb_hs_resp #(
  parameter int unsigned MAX_DELAY = 3
) (
  input  logic clk,
  input  logic req,
  output logic ack
);
  int unsigned count = 0;

  initial begin
    ack = 1'b0;
    repeat (2) @(posedge clk);
    forever begin
      do @(posedge clk); while (!req);
      repeat ($urandom_range(MAX_DELAY, 1)) @(posedge clk);
      ack <= 1'b1;
      do @(posedge clk); while (req);
      repeat ($urandom_range(MAX_DELAY)) @(posedge clk);
      ack <= 1'b0;
      count++;
    end
  end
endmodule
