// ecd_microengine: CD-player error decoder with programmable microengine
// control.
//
// The same datapath as the hardwired version is controlled by one RAS block
// per unit. The execution control unit (ECU) fetches a VLIW microinstruction
// from the microcode memory, raises one global request to all RAS blocks and
// waits for the AND of their done outputs. Within the instruction, every
// enabled unit works in parallel unless its chain bit makes it wait until
// its fixed predecessor's unit has acknowledged (the predecessor's result
// is then valid):
//   t chan -> t reg -> n reg        c chan -> s reg -> syn reg -> stat reg
//   -> sel chan
// so a fork-join thread such as "receive c, load s, Horner step" runs as one
// chain with no return to the central controller between its steps. After
// the instruction the branch decision unit (BDU) and the next-address
// counter select the next instruction. Interface as ecd_hardwired: start
// and the channels t, c (in) and s, e, l (out), four-phase unless
// TWO_PHASE=1. The microcode memory is the fixed ROM by default; with
// UCODE_RAM=1 it is a RAM that is written through prog_we/prog_addr/
// prog_data while start is low, which makes the decoder reprogrammable
// (the prog_* inputs are not used with the ROM). The structure (MEM, next
// addr, BDU, ECU, RAS per unit, shared datapath) and the ROM and RAM
// options follow the design; instruction format, program, load port and
// clocked timing are this design's.
module ecd_microengine
  import ecd_pkg::*;
#(
  parameter int unsigned WORDS_T0  = 27,
  parameter int unsigned WORDS_T1  = 32,
  parameter bit          TWO_PHASE = 1'b0,
  parameter bit          UCODE_RAM = 1'b0
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic             prog_we,
  input  logic [UA_W-1:0]  prog_addr,
  input  uinstr_t          prog_data,
  input  logic             t_req,
  output logic             t_ack,
  input  logic             t_data,
  input  logic             c_req,
  output logic             c_ack,
  input  logic [SYM_W-1:0] c_data,
  output logic             s_req,
  input  logic             s_ack,
  output logic             s_data,
  output logic             e_req,
  input  logic             e_ack,
  output logic [SYM_W-1:0] e_data,
  output logic             l_req,
  input  logic             l_ack,
  output logic [N_W-1:0]   l_data
);
  // chain predecessor of each unit; a unit that is its own predecessor has
  // none and must not be chained
  localparam int unsigned PRED [NUNITS] = '{
    U_TCH, U_TCH, U_TREG, U_CCH, U_CCH, U_SREG, U_SYN, U_EREG, U_STAT};

  uinstr_t          ir;
  logic [UA_W-1:0]  pc;
  logic             greq, gack, step, taken;
  unit_vec_t        dp_req, dp_ack, fwd, done;
  logic             n5, eq, t;
  logic [N_W-1:0]   n_q;
  logic [SYN_W-1:0] syn_q;
  logic             stat_q;

  if (UCODE_RAM) begin : g_ram
    ucode_ram #(.AW(UA_W)) u_mem (
      .clk, .we(prog_we), .waddr(prog_addr), .wdata(prog_data), .raddr(pc), .rdata(ir));
  end else begin : g_rom
    ucode_rom #(.AW(UA_W)) u_mem (.clk, .addr(pc), .data(ir));
  end

  bdu u_bdu (.cond(ir.cond), .n5, .eq, .taken);

  next_addr #(.AW(UA_W)) u_next (
    .clk, .rst_n, .step, .taken, .target(ir.target), .addr(pc));

  ecu u_ecu (.clk, .rst_n, .start, .req(greq), .ack(gack), .step);

  for (genvar i = 0; i < NUNITS; i++) begin : g_ras
    ras u_ras (
      .clk, .rst_n, .greq, .en(ir.en[i]), .chain(ir.chain[i]),
      .pred_done(fwd[PRED[i]]), .ureq(dp_req[i]), .uack(dp_ack[i]),
      .fwd(fwd[i]), .done(done[i]));
  end

  assign gack = &done;

  ecd_datapath #(.WORDS_T0(WORDS_T0), .WORDS_T1(WORDS_T1), .TWO_PHASE(TWO_PHASE)) u_dp (
    .clk, .rst_n, .req(dp_req), .ack(dp_ack), .mode(ir.mode),
    .n5, .eq, .t, .n_q, .syn_q, .stat_q,
    .t_req, .t_ack, .t_data, .c_req, .c_ack, .c_data,
    .s_req, .s_ack, .s_data, .e_req, .e_ack, .e_data, .l_req, .l_ack, .l_data);

  // an instruction's modes must hold while the datapath works
  a_mode_stable: assert property (@(posedge clk) disable iff (!rst_n)
    (greq && $past(greq)) |-> $stable(ir));
endmodule
