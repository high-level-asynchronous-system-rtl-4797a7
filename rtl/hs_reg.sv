// hs_reg: bundled-data register with a four-phase request/acknowledge port.
//
// The register loads d when req rises and answers with ack=1; when req
// falls it returns ack to 0 (return-to-zero, four-phase). d must be stable
// while req is high (bundling constraint). In the self-timed original the
// request is delayed to match the input logic; here all signals are clocked:
// the load happens on the first clock edge that sees req=1 and ack=0, and
// ack follows req one cycle later in both directions. Data and ack reset
// to 0.
module hs_reg #(
  parameter int unsigned WIDTH = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             req,
  output logic             ack,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ack <= 1'b0;
      q   <= '0;
    end else if (req && !ack) begin
      q   <= d;
      ack <= 1'b1;
    end else if (!req && ack) begin
      ack <= 1'b0;
    end
  end

  // four-phase: ack only changes towards req
  a_ack_follows_req: assert property (@(posedge clk) disable iff (!rst_n)
    (ack != $past(ack)) |-> (ack == $past(req)));
endmodule
