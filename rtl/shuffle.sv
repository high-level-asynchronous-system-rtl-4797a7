// shuffle: byte permutation of the syndrome register (combinational).
//
// Output bytes 0..3 take input bytes 1, 3, 0, 2. Applying it twice reverses
// the byte order and four times restores it, so the error check can bring
// each pair of syndromes into byte positions 0 and 1 for comparison and end
// with the register in its original order. The permutation is the one the
// design specifies; it is pure wiring.
module shuffle
  import ecd_pkg::*;
(
  input  logic [SYN_W-1:0] syn,
  output logic [SYN_W-1:0] y
);
  assign y = {syn[23:16], syn[7:0], syn[31:24], syn[15:8]};
endmodule
