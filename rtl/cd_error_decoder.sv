// cd_error_decoder: the CD-player error decoder in both of its control
// styles, side by side.
//
// The decoder reads a block of 27 or 32 8-bit symbols (size chosen by a bit
// on the t channel) on the c channel, accumulates four GF(2^8) syndromes
// with Horner's rule, then steps the syndromes to search for a position
// where two of them agree, and reports a status bit (s), the first syndrome
// (e) and the search counter (l). hw_* is the instance with hardwired
// burst-mode style control (two control partitions and four thread
// controllers); ue_* is the instance with microengine control (microcode ROM
// and one RAS block per datapath unit, threads run as chains). Both use the
// same datapath and give the same results; they differ only in how many
// cycles a block takes. Each has its own start input and its own four-phase
// bundled-data channels; clock and reset are shared. TWO_PHASE=1 switches
// all environment channels to transition signalling (default four-phase).
// UCODE_RAM=1 replaces the microengine's ROM by a RAM, loaded through
// ue_prog_we/ue_prog_addr/ue_prog_data while ue_start is low; with the
// default ROM those inputs are not used.
module cd_error_decoder
  import ecd_pkg::*;
#(
  parameter int unsigned WORDS_T0  = 27,
  parameter int unsigned WORDS_T1  = 32,
  parameter bit          TWO_PHASE = 1'b0,
  parameter bit          UCODE_RAM = 1'b0
) (
  input  logic             clk,
  input  logic             rst_n,
  // hardwired control instance
  input  logic             hw_start,
  input  logic             hw_t_req,
  output logic             hw_t_ack,
  input  logic             hw_t_data,
  input  logic             hw_c_req,
  output logic             hw_c_ack,
  input  logic [SYM_W-1:0] hw_c_data,
  output logic             hw_s_req,
  input  logic             hw_s_ack,
  output logic             hw_s_data,
  output logic             hw_e_req,
  input  logic             hw_e_ack,
  output logic [SYM_W-1:0] hw_e_data,
  output logic             hw_l_req,
  input  logic             hw_l_ack,
  output logic [N_W-1:0]   hw_l_data,
  // microengine control instance
  input  logic             ue_start,
  input  logic             ue_prog_we,
  input  logic [UA_W-1:0]  ue_prog_addr,
  input  uinstr_t          ue_prog_data,
  input  logic             ue_t_req,
  output logic             ue_t_ack,
  input  logic             ue_t_data,
  input  logic             ue_c_req,
  output logic             ue_c_ack,
  input  logic [SYM_W-1:0] ue_c_data,
  output logic             ue_s_req,
  input  logic             ue_s_ack,
  output logic             ue_s_data,
  output logic             ue_e_req,
  input  logic             ue_e_ack,
  output logic [SYM_W-1:0] ue_e_data,
  output logic             ue_l_req,
  input  logic             ue_l_ack,
  output logic [N_W-1:0]   ue_l_data
);
  ecd_hardwired #(.WORDS_T0(WORDS_T0), .WORDS_T1(WORDS_T1), .TWO_PHASE(TWO_PHASE)) u_hw (
    .clk, .rst_n, .start(hw_start),
    .t_req(hw_t_req), .t_ack(hw_t_ack), .t_data(hw_t_data),
    .c_req(hw_c_req), .c_ack(hw_c_ack), .c_data(hw_c_data),
    .s_req(hw_s_req), .s_ack(hw_s_ack), .s_data(hw_s_data),
    .e_req(hw_e_req), .e_ack(hw_e_ack), .e_data(hw_e_data),
    .l_req(hw_l_req), .l_ack(hw_l_ack), .l_data(hw_l_data));

  ecd_microengine #(.WORDS_T0(WORDS_T0), .WORDS_T1(WORDS_T1), .TWO_PHASE(TWO_PHASE),
                    .UCODE_RAM(UCODE_RAM)) u_ue (
    .clk, .rst_n, .start(ue_start),
    .prog_we(ue_prog_we), .prog_addr(ue_prog_addr), .prog_data(ue_prog_data),
    .t_req(ue_t_req), .t_ack(ue_t_ack), .t_data(ue_t_data),
    .c_req(ue_c_req), .c_ack(ue_c_ack), .c_data(ue_c_data),
    .s_req(ue_s_req), .s_ack(ue_s_ack), .s_data(ue_s_data),
    .e_req(ue_e_req), .e_ack(ue_e_ack), .e_data(ue_e_data),
    .l_req(ue_l_req), .l_ack(ue_l_ack), .l_data(ue_l_data));
endmodule
