// ecd_hardwired: CD-player error decoder with hardwired (burst-mode style)
// control.
//
// Control is split into two sequential partitions, DECODE (read the block
// and accumulate the four syndromes) and ERR-CHECK (search for a location
// and report), plus four thread controllers for the branches of the two
// forks: T0 (n = n - 1) and T1 (receive c, load s, syn = Horner(s, syn))
// under DECODE, T2 (n = n - 1) and T3 (syn = Horner(0, syn)) under
// ERR-CHECK. A datapath unit requested by more than one controller gets the
// OR of their requests, and its acknowledge goes back to all of them; the
// controllers never request the same unit at the same time. The mode of a
// shared unit comes from the controller whose request is up.
// Interface: start (level, sampled once after reset) and the five
// environment channels t, c (inputs) and s, e, l (outputs), four-phase
// bundled data by default, transition signalling with TWO_PHASE=1. A block
// takes a number of clock cycles that grows with the block size and the
// length of the error search; the original is self-timed, so its cycle
// counts are not the original's timing.
module ecd_hardwired
  import ecd_pkg::*;
#(
  parameter int unsigned WORDS_T0 = 27,
  parameter int unsigned WORDS_T1  = 32,
  parameter bit          TWO_PHASE = 1'b0
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
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
  unit_vec_t        dp_req, dp_ack, dec_req, err_req_v;
  dp_mode_t         dp_mode, dec_mode, err_mode;
  logic             n5, eq, t;
  logic [N_W-1:0]   n_q;
  logic [SYN_W-1:0] syn_q;
  logic             stat_q;

  logic t0_req, t0_ack, t1_req, t1_ack, t2_req, t2_ack, t3_req, t3_ack;
  logic de_req, de_ack;
  logic [0:0] t0_out_req, t2_out_req, t3_out_req;
  logic [2:0] t1_out_req;

  decode_ctrl u_decode (
    .clk, .rst_n, .start, .n5,
    .dp_req(dec_req), .dp_ack, .mode(dec_mode),
    .t0_req, .t0_ack, .t1_req, .t1_ack, .err_req(de_req), .err_ack(de_ack));

  errcheck_ctrl u_errcheck (
    .clk, .rst_n, .req(de_req), .ack(de_ack), .n5, .eq,
    .dp_req(err_req_v), .dp_ack, .mode(err_mode),
    .t2_req, .t2_ack, .t3_req, .t3_ack);

  thread_ctrl #(.STEPS(1)) u_t0 (
    .clk, .rst_n, .req(t0_req), .ack(t0_ack),
    .out_req(t0_out_req), .out_ack(dp_ack[U_NREG]));

  thread_ctrl #(.STEPS(3)) u_t1 (
    .clk, .rst_n, .req(t1_req), .ack(t1_ack),
    .out_req(t1_out_req), .out_ack({dp_ack[U_SYN], dp_ack[U_SREG], dp_ack[U_CCH]}));

  thread_ctrl #(.STEPS(1)) u_t2 (
    .clk, .rst_n, .req(t2_req), .ack(t2_ack),
    .out_req(t2_out_req), .out_ack(dp_ack[U_NREG]));

  thread_ctrl #(.STEPS(1)) u_t3 (
    .clk, .rst_n, .req(t3_req), .ack(t3_ack),
    .out_req(t3_out_req), .out_ack(dp_ack[U_SYN]));

  // request merge (OR) and mode selection
  always_comb begin
    dp_req          = dec_req | err_req_v;
    dp_req[U_NREG]  = dp_req[U_NREG] | t0_out_req[0] | t2_out_req[0];
    dp_req[U_CCH]   = dp_req[U_CCH]  | t1_out_req[0];
    dp_req[U_SREG]  = dp_req[U_SREG] | t1_out_req[1];
    dp_req[U_SYN]   = dp_req[U_SYN]  | t1_out_req[2] | t3_out_req[0];

    dp_mode.n_load  = dec_req[U_NREG] | err_req_v[U_NREG];
    if (t1_out_req[2])      dp_mode.syn_mode = SYN_HORNER;
    else if (t3_out_req[0]) dp_mode.syn_mode = SYN_HORNER0;
    else if (dec_req[U_SYN]) dp_mode.syn_mode = dec_mode.syn_mode;
    else                    dp_mode.syn_mode = err_mode.syn_mode;
    dp_mode.stat_or = err_mode.stat_or;
  end

  ecd_datapath #(.WORDS_T0(WORDS_T0), .WORDS_T1(WORDS_T1), .TWO_PHASE(TWO_PHASE)) u_dp (
    .clk, .rst_n, .req(dp_req), .ack(dp_ack), .mode(dp_mode),
    .n5, .eq, .t, .n_q, .syn_q, .stat_q,
    .t_req, .t_ack, .t_data, .c_req, .c_ack, .c_data,
    .s_req, .s_ack, .s_data, .e_req, .e_ack, .e_data, .l_req, .l_ack, .l_data);
endmodule
