// decode_ctrl: first control partition of the hardwired decoder (DECODE).
//
// After start it repeats, forever:
//   step 0  receive t on the t channel, and in parallel clear syn
//   step 1  copy t into the t register
//   step 2  load n with the block size minus one
//   step 3  fork thread T0 (n = n - 1) and thread T1 (receive a symbol,
//           syn = Horner(s, syn)); join; repeat while n[5] = 0
//   step 4  hand over to ERR-CHECK and wait until it has sent the results
// Each step is a burst: the step's requests rise together, the step ends
// when all its acknowledges have risen, the requests have fallen and all
// acknowledges have fallen again; the loop test reads n[5] after that.
// The sequence is the first half of the design's specification; writing the
// burst-mode machine as a clocked step sequencer is this design's choice.
// Port bundles: dp_req/dp_ack use the unit_e bits U_TCH, U_TREG, U_NREG and
// U_SYN only (the other request bits are tied to 0); the mode output is
// valid whenever one of them is up.
module decode_ctrl
  import ecd_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      start,
  input  logic      n5,
  output unit_vec_t dp_req,
  input  unit_vec_t dp_ack,
  output dp_mode_t  mode,
  output logic      t0_req,
  input  logic      t0_ack,
  output logic      t1_req,
  input  logic      t1_ack,
  output logic      err_req,
  input  logic      err_ack
);
  // local handshake ports: units, then threads, then ERR-CHECK
  localparam int unsigned NH = NUNITS + 3;
  localparam int unsigned H_T0 = NUNITS, H_T1 = NUNITS + 1, H_ERR = NUNITS + 2;

  typedef enum logic [1:0] {S_WAIT_START, S_HI, S_LO} state_e;
  state_e          state;
  logic [2:0]      step;
  logic [2:0]      nxt;
  logic [NH-1:0]   mask, hreq, hack;

  // requests of each step
  function automatic logic [NH-1:0] step_mask(input logic [2:0] s);
    step_mask = '0;
    unique case (s)
      3'd0:    begin step_mask[U_TCH] = 1'b1; step_mask[U_SYN] = 1'b1; end
      3'd1:    step_mask[U_TREG] = 1'b1;
      3'd2:    step_mask[U_NREG] = 1'b1;
      3'd3:    begin step_mask[H_T0] = 1'b1; step_mask[H_T1] = 1'b1; end
      default: step_mask[H_ERR] = 1'b1;
    endcase
  endfunction

  assign mask = step_mask(step);

  // next step: the word loop repeats until n[5]; after ERR-CHECK start over
  always_comb begin
    if (step == 3'd3 && !n5) nxt = 3'd3;
    else if (step == 3'd4)   nxt = 3'd0;
    else                     nxt = step + 3'd1;
  end

  assign hack    = {err_ack, t1_ack, t0_ack, dp_ack};
  assign dp_req  = hreq[NUNITS-1:0];
  assign t0_req  = hreq[H_T0];
  assign t1_req  = hreq[H_T1];
  assign err_req = hreq[H_ERR];
  // only n is loaded and syn cleared by this partition
  assign mode    = '{n_load: 1'b1, syn_mode: SYN_ZERO, stat_or: 1'b0};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_WAIT_START;
      step  <= '0;
      hreq  <= '0;
    end else begin
      unique case (state)
        S_WAIT_START: if (start) begin
          hreq  <= mask;
          state <= S_HI;
        end
        S_HI: if ((hack & mask) == mask) begin
          hreq  <= '0;
          state <= S_LO;
        end
        S_LO: if ((hack & mask) == '0) begin
          step  <= nxt;
          state <= S_HI;
          hreq  <= step_mask(nxt);
        end
        default: state <= S_WAIT_START;
      endcase
    end
  end
endmodule
