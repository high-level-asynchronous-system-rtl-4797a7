// bdu: branch decision unit of the microengine (combinational).
//
// From the branch condition of the current microinstruction and the datapath
// status it decides whether the next instruction is the branch target
// (taken=1) or the following address. Conditions: never, always, n[5]=0
// (more words to read), found (n[5]=1 or syndrome bytes 0 and 1 equal) and
// not found. The unit is named in the design; its conditions and encoding
// are this design's choice, made to run the decoder's two loops.
module bdu
  import ecd_pkg::*;
(
  input  cond_e cond,
  input  logic  n5,
  input  logic  eq,
  output logic  taken
);
  always_comb begin
    unique case (cond)
      C_ALWAYS:    taken = 1'b1;
      C_NOT_N5:    taken = !n5;
      C_FOUND:     taken = n5 || eq;
      C_NOT_FOUND: taken = !(n5 || eq);
      default:     taken = 1'b0;
    endcase
  end
endmodule
