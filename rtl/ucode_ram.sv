// ucode_ram: microcode memory of the microengine, in writable (RAM) form.
//
// 2**AW VLIW microinstructions (uinstr_t) with one write port and one
// synchronous read port. A word presented on wdata is stored at waddr on a
// clock edge with we high; rdata is the word at raddr one clock after raddr
// is presented, the same read timing as the ROM, so either memory can sit
// in the microengine. Reading an address in the cycle it is written returns
// the old word. The contents are not reset: the program is loaded through
// the write port before the microengine is started. The RAM form of the
// microcode memory, as the larger but reprogrammable alternative to the
// ROM, follows the design; the port arrangement and the load-before-start
// rule are this design's choices.
module ucode_ram
  import ecd_pkg::*;
#(
  parameter int unsigned AW = UA_W
) (
  input  logic          clk,
  input  logic          we,
  input  logic [AW-1:0] waddr,
  input  uinstr_t       wdata,
  input  logic [AW-1:0] raddr,
  output uinstr_t       rdata
);
  uinstr_t mem [2**AW];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end
endmodule
