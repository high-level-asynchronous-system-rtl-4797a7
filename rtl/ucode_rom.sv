// ucode_rom: microcode memory of the microengine, in ROM form.
//
// Holds the error decoder's microprogram, one VLIW microinstruction
// (uinstr_t) per address, read synchronously: data is the word at addr one
// clock after addr is presented. Each word enables the RAS blocks of the
// units it uses, says which of them are chained behind their predecessor,
// sets the datapath modes and gives the branch. The program:
//   0  t chan -> t reg -> n reg (load) | syn reg (clear)
//   1  c chan -> s reg -> syn reg (Horner(s)) | n reg (decrement);
//      repeat while n[5] = 0
//   2  n reg (load) | e reg (= syn[7:0])
//   3  syn reg (shuffle)
//   4  syn reg (shuffle)
//   5  no unit; go to 7 if found (n[5] or bytes 0 and 1 equal)
//   6  syn reg (Horner(0)) | n reg (decrement); repeat while not found
//   7  stat reg (= n[5])
//   8  syn reg (shuffle) -> stat reg (stat | eq)
//   9  syn reg (shuffle) -> stat reg (stat | eq) -> sel chan; go to 0
// "->" is a chain and "|" runs in parallel within one instruction. The ROM
// is the default microcode memory (ucode_ram is the writable form). The
// word format and program are this design's choices, derived from the
// decoder's behavioural specification. Addresses above 9 hold an
// instruction that does nothing and jumps to 0.
module ucode_rom
  import ecd_pkg::*;
#(
  parameter int unsigned AW = UA_W
) (
  input  logic          clk,
  input  logic [AW-1:0] addr,
  output uinstr_t       data
);
  function automatic unit_vec_t u(input unit_e a);
    u = '0;
    u[a] = 1'b1;
  endfunction

  function automatic uinstr_t word(input logic [AW-1:0] a);
    uinstr_t w;
    w = '{en: '0, chain: '0,
          mode: '{n_load: 1'b0, syn_mode: SYN_ZERO, stat_or: 1'b0},
          cond: C_NEVER, target: '0};
    unique case (a)
      0: begin
        w.en    = u(U_TCH) | u(U_TREG) | u(U_NREG) | u(U_SYN);
        w.chain = u(U_TREG) | u(U_NREG);
        w.mode.n_load = 1'b1;
      end
      1: begin
        w.en    = u(U_CCH) | u(U_SREG) | u(U_SYN) | u(U_NREG);
        w.chain = u(U_SREG) | u(U_SYN);
        w.mode.syn_mode = SYN_HORNER;
        w.cond = C_NOT_N5; w.target = 1;
      end
      2: begin
        w.en = u(U_NREG) | u(U_EREG);
        w.mode.n_load = 1'b1;
      end
      3, 4: begin
        w.en = u(U_SYN);
        w.mode.syn_mode = SYN_SHUFFLE;
      end
      5: begin
        w.cond = C_FOUND; w.target = 7;
      end
      6: begin
        w.en = u(U_SYN) | u(U_NREG);
        w.mode.syn_mode = SYN_HORNER0;
        w.cond = C_NOT_FOUND; w.target = 6;
      end
      7: begin
        w.en = u(U_STAT);
      end
      8: begin
        w.en    = u(U_SYN) | u(U_STAT);
        w.chain = u(U_STAT);
        w.mode.syn_mode = SYN_SHUFFLE;
        w.mode.stat_or  = 1'b1;
      end
      9: begin
        w.en    = u(U_SYN) | u(U_STAT) | u(U_SEL);
        w.chain = u(U_STAT) | u(U_SEL);
        w.mode.syn_mode = SYN_SHUFFLE;
        w.mode.stat_or  = 1'b1;
        w.cond = C_ALWAYS; w.target = 0;
      end
      default: begin
        w.cond = C_ALWAYS; w.target = 0;
      end
    endcase
    return w;
  endfunction

  always_ff @(posedge clk) data <= word(addr);
endmodule
