// stat_syneq: status logic of the error check ("stat or syneq", combinational).
//
// eq is 1 when syndrome bytes 0 and 1 are equal. The next status is n[5]
// (the search ran out without a match) when mode_or=0, and stat OR eq when
// mode_or=1; the check applies the OR form after each of two shuffles so
// that further syndrome pairs are compared. Function as specified; the mode
// encoding is this design's choice.
module stat_syneq
  import ecd_pkg::*;
(
  input  logic             mode_or,
  input  logic             n5,
  input  logic             stat,
  input  logic [SYN_W-1:0] syn,
  output logic             eq,
  output logic             stat_next
);
  always_comb begin
    eq        = (syn[7:0] == syn[15:8]);
    stat_next = mode_or ? (stat | eq) : n5;
  end
endmodule
