// dec_n: next-value logic of the word counter n (combinational, "Dec(n)").
//
// load=1 sets n to the number of words of the block minus one: WORDS_T1-1 if
// t=1, else WORDS_T0-1. load=0 decrements n. The counter runs down through
// zero to all ones, so n[5] rises after exactly WORDS iterations and ends both
// loops of the decoder. The block sizes (27 or 32 words selected by t) are
// the design's; loading WORDS-1 so that n[5] marks the end is this design's
// reading of the counting scheme.
module dec_n
  import ecd_pkg::*;
#(
  parameter int unsigned WORDS_T0 = 27,
  parameter int unsigned WORDS_T1 = 32
) (
  input  logic           load,
  input  logic           t,
  input  logic [N_W-1:0] n,
  output logic [N_W-1:0] n_next
);
  localparam logic [N_W-1:0] INIT0 = N_W'(WORDS_T0 - 1);
  localparam logic [N_W-1:0] INIT1 = N_W'(WORDS_T1 - 1);

  always_comb begin
    if (load) n_next = t ? INIT1 : INIT0;
    else      n_next = n - N_W'(1);
  end
endmodule
