// horner: one Horner step on the four syndrome bytes (combinational).
//
// Byte i of the syndrome accumulates the received word evaluated at alpha^i:
//   y[8i+7:8i] = s XOR alpha^i * syn[8i+7:8i],  i = 0..3.
// Feeding the symbols of a block one per step leaves the four syndromes in
// the register; feeding s = 0 steps each syndrome by alpha^i, which is how the
// error search walks through the symbol positions. The bit equations of the
// alpha multiplier follow the design's specification; the structure (a pure
// XOR network, no state) is this design's choice. Bundled-data timing: the
// result is valid one unit delay after syn and s settle.
module horner
  import ecd_pkg::*;
(
  input  logic [SYM_W-1:0] s,
  input  logic [SYN_W-1:0] syn,
  output logic [SYN_W-1:0] y
);
  always_comb begin
    y[7:0]   = s ^ syn[7:0];
    y[15:8]  = s ^ gf_alpha(syn[15:8]);
    y[23:16] = s ^ gf_alpha(gf_alpha(syn[23:16]));
    y[31:24] = s ^ gf_alpha(gf_alpha(gf_alpha(syn[31:24])));
  end
endmodule
