// ecd_pkg: types and constants shared by the CD-player error decoder.
//
// The decoder computes four GF(2^8) syndrome bytes over a block of 27 or 32
// received symbols and then searches for an error location. Field arithmetic
// uses the polynomial x^8+x^4+x^3+x^2+1; multiplication by alpha (= x) is the
// shift-and-reduce in gf_alpha. The unit modes below are the mux and
// operation settings that the controllers (hardwired or microcoded) apply to
// the datapath; their encodings are this design's choice.
package ecd_pkg;

  localparam int unsigned SYM_W = 8;   // symbol width (c and e channels)
  localparam int unsigned SYN_W = 32;  // four syndrome bytes
  localparam int unsigned N_W   = 6;   // word counter; n[5] flags "ran out"

  // Source selected for the syndrome register
  typedef enum logic [1:0] {
    SYN_ZERO    = 2'd0,  // syn = 0
    SYN_HORNER  = 2'd1,  // syn = Horner(s, syn)
    SYN_HORNER0 = 2'd2,  // syn = Horner(0, syn)
    SYN_SHUFFLE = 2'd3   // syn = Shuffle(syn)
  } syn_mode_e;

  // Multiply a field element by alpha: shift left, reduce by 0x1D.
  function automatic logic [7:0] gf_alpha(input logic [7:0] a);
    gf_alpha = {a[6:4], a[3:1] ^ {3{a[7]}}, a[0], a[7]};
  endfunction


  // Datapath units that take a four-phase request, one bit each in a
  // unit_vec_t. In the microengine each has its own RAS control block.
  typedef enum int unsigned {
    U_TCH  = 0,  // t channel receive
    U_TREG = 1,  // t register
    U_NREG = 2,  // n register (load or decrement through Dec(n))
    U_CCH  = 3,  // c channel receive
    U_SREG = 4,  // s register
    U_SYN  = 5,  // syn register (source chosen by syn_mode)
    U_STAT = 6,  // stat register (through stat-or-syneq)
    U_EREG = 7,  // e register (= syn[7:0])
    U_SEL  = 8   // send on s, e and l
  } unit_e;
  localparam int unsigned NUNITS = 9;
  typedef logic [NUNITS-1:0] unit_vec_t;

  // Operation modes applied to the datapath while a request is up
  typedef struct packed {
    logic      n_load;   // 1: n = block size - 1, 0: n = n - 1
    syn_mode_e syn_mode;
    logic      stat_or;  // 1: stat = stat | eq, 0: stat = n[5]
  } dp_mode_t;

  // Microengine branch conditions, evaluated after an instruction completes
  typedef enum logic [2:0] {
    C_NEVER     = 3'd0,  // fall through to address + 1
    C_ALWAYS    = 3'd1,
    C_NOT_N5    = 3'd2,  // word loop: more words to read
    C_FOUND     = 3'd3,  // n[5] or syn[7:0] == syn[15:8]
    C_NOT_FOUND = 3'd4
  } cond_e;

  localparam int unsigned UA_W = 4;  // microcode address width

  // VLIW microinstruction: per unit an enable and a chain bit (wait for the
  // unit's predecessor in the same instruction), the datapath modes and the
  // branch.
  typedef struct packed {
    unit_vec_t       en;
    unit_vec_t       chain;
    dp_mode_t        mode;
    cond_e           cond;
    logic [UA_W-1:0] target;
  } uinstr_t;

endpackage
