// next_addr: microprogram counter of the microengine.
//
// Holds the address of the current microinstruction (0 after reset). On a
// step pulse it moves to the branch target if the branch decision unit says
// taken, else to the next address. The block is named in the design; a
// counter with a branch load is this design's choice.
module next_addr
  import ecd_pkg::*;
#(
  parameter int unsigned AW = UA_W
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          step,
  input  logic          taken,
  input  logic [AW-1:0] target,
  output logic [AW-1:0] addr
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    addr <= '0;
    else if (step) addr <= taken ? target : addr + 1'b1;
  end
endmodule
