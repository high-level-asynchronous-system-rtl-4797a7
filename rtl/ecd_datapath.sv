// ecd_datapath: datapath of the CD-player error decoder, shared by the
// hardwired and the microcoded control.
//
// Units (each a four-phase request/acknowledge port, indexed by unit_e):
//   t chan -> t reg          block size select (27 or 32 words)
//   Dec(n) -> n reg          word counter, loaded from t or decremented
//   c chan -> s reg          received symbols
//   Horner/Shuffle -> syn reg four syndrome bytes
//   stat-or-syneq -> stat reg error status
//   e reg                    copy of syndrome byte 0
//   sel chan                 sends stat, e and n on the s, e and l channels
// A control block raises req[u] with the unit's mode held on `mode`, the
// unit does its operation and answers ack[u]; a register loads on the rising
// request and acknowledges a cycle later. TWO_PHASE selects transition
// signalling on the five environment channels (default: four-phase). n5, eq
// and t go back to control for its decisions. The unit set and its connections follow the design's two
// structure diagrams; the mode encodings and the clocked handshake are this
// design's choices.
module ecd_datapath
  import ecd_pkg::*;
#(
  parameter int unsigned WORDS_T0 = 27,
  parameter int unsigned WORDS_T1  = 32,
  parameter bit          TWO_PHASE = 1'b0
) (
  input  logic             clk,
  input  logic             rst_n,
  // control
  input  unit_vec_t        req,
  output unit_vec_t        ack,
  input  dp_mode_t         mode,
  output logic             n5,
  output logic             eq,
  output logic             t,
  // observation of the registers
  output logic [N_W-1:0]   n_q,
  output logic [SYN_W-1:0] syn_q,
  output logic             stat_q,
  // environment channels
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
  logic             tch_q;
  logic [SYM_W-1:0] cch_q, s_q, e_q;
  logic [N_W-1:0]   n_next;
  logic [SYN_W-1:0] horner_y, shuffle_y, syn_next;
  logic             stat_next;
  logic [SYM_W-1:0] horner_s;

  chan_rx #(.WIDTH(1), .TWO_PHASE(TWO_PHASE)) u_tch (
    .clk, .rst_n, .ch_req(t_req), .ch_ack(t_ack), .ch_data(t_data),
    .req(req[U_TCH]), .ack(ack[U_TCH]), .q(tch_q));

  hs_reg #(.WIDTH(1)) u_treg (
    .clk, .rst_n, .req(req[U_TREG]), .ack(ack[U_TREG]), .d(tch_q), .q(t));

  dec_n #(.WORDS_T0(WORDS_T0), .WORDS_T1(WORDS_T1)) u_dec (
    .load(mode.n_load), .t, .n(n_q), .n_next);

  hs_reg #(.WIDTH(N_W)) u_nreg (
    .clk, .rst_n, .req(req[U_NREG]), .ack(ack[U_NREG]), .d(n_next), .q(n_q));

  chan_rx #(.WIDTH(SYM_W), .TWO_PHASE(TWO_PHASE)) u_cch (
    .clk, .rst_n, .ch_req(c_req), .ch_ack(c_ack), .ch_data(c_data),
    .req(req[U_CCH]), .ack(ack[U_CCH]), .q(cch_q));

  hs_reg #(.WIDTH(SYM_W)) u_sreg (
    .clk, .rst_n, .req(req[U_SREG]), .ack(ack[U_SREG]), .d(cch_q), .q(s_q));

  assign horner_s = (mode.syn_mode == SYN_HORNER0) ? '0 : s_q;

  horner u_horner (.s(horner_s), .syn(syn_q), .y(horner_y));
  shuffle u_shuffle (.syn(syn_q), .y(shuffle_y));

  always_comb begin
    unique case (mode.syn_mode)
      SYN_ZERO:    syn_next = '0;
      SYN_SHUFFLE: syn_next = shuffle_y;
      default:     syn_next = horner_y;
    endcase
  end

  hs_reg #(.WIDTH(SYN_W)) u_synreg (
    .clk, .rst_n, .req(req[U_SYN]), .ack(ack[U_SYN]), .d(syn_next), .q(syn_q));

  assign n5 = n_q[N_W-1];

  stat_syneq u_stat (
    .mode_or(mode.stat_or), .n5, .stat(stat_q), .syn(syn_q), .eq, .stat_next);

  hs_reg #(.WIDTH(1)) u_statreg (
    .clk, .rst_n, .req(req[U_STAT]), .ack(ack[U_STAT]), .d(stat_next), .q(stat_q));

  hs_reg #(.WIDTH(SYM_W)) u_ereg (
    .clk, .rst_n, .req(req[U_EREG]), .ack(ack[U_EREG]), .d(syn_q[7:0]), .q(e_q));

  sel_chan #(.E_W(SYM_W), .L_W(N_W), .TWO_PHASE(TWO_PHASE)) u_sel (
    .clk, .rst_n, .req(req[U_SEL]), .ack(ack[U_SEL]),
    .stat(stat_q), .e(e_q), .n(n_q),
    .s_req, .s_ack, .s_data, .e_req, .e_ack, .e_data, .l_req, .l_ack, .l_data);
endmodule
