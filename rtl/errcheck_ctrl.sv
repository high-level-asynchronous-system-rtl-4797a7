// errcheck_ctrl: second control partition of the hardwired decoder
// (ERR-CHECK).
//
// Started by DECODE through a four-phase pair (req/ack). It runs
//   step 0   load n with the block size minus one, and copy syn[7:0] to e
//   step 1,2 syn = Shuffle(syn), twice
//   step 3   test: if n[5] or syn[7:0] == syn[15:8], go to step 5
//   step 4   fork thread T2 (n = n - 1) and thread T3 (syn = Horner(0, syn));
//            join; back to step 3
//   step 5   stat = n[5]
//   step 6   syn = Shuffle(syn)      step 7   stat = stat | eq
//   step 8   syn = Shuffle(syn)      step 9   stat = stat | eq
//   step 10  send stat, e and n on the s, e and l channels
// and then raises ack; ack falls after req falls. Steps are bursts of
// requests as in DECODE; step 3 has no requests and only decides. The
// sequence is the second half of the design's specification, with the
// search loop running while neither n[5] nor the syndrome match holds; the
// clocked sequencer form is this design's choice. dp_req/dp_ack use the
// unit_e bits U_NREG, U_SYN, U_STAT, U_EREG and U_SEL (the other request
// bits are tied to 0); mode is valid while any of them is up.
module errcheck_ctrl
  import ecd_pkg::*;
(
  input  logic      clk,
  input  logic      rst_n,
  input  logic      req,
  output logic      ack,
  input  logic      n5,
  input  logic      eq,
  output unit_vec_t dp_req,
  input  unit_vec_t dp_ack,
  output dp_mode_t  mode,
  output logic      t2_req,
  input  logic      t2_ack,
  output logic      t3_req,
  input  logic      t3_ack
);
  localparam int unsigned NH = NUNITS + 2;
  localparam int unsigned H_T2 = NUNITS, H_T3 = NUNITS + 1;
  localparam logic [3:0] LAST = 4'd10;

  typedef enum logic [1:0] {S_IDLE, S_HI, S_LO, S_DONE} state_e;
  state_e        state;
  logic [3:0]    step, nxt;
  logic [NH-1:0] mask, hreq, hack;

  function automatic logic [NH-1:0] step_mask(input logic [3:0] s);
    step_mask = '0;
    unique case (s)
      4'd0:         begin step_mask[U_NREG] = 1'b1; step_mask[U_EREG] = 1'b1; end
      4'd1, 4'd2,
      4'd6, 4'd8:   step_mask[U_SYN] = 1'b1;
      4'd3:         step_mask = '0;
      4'd4:         begin step_mask[H_T2] = 1'b1; step_mask[H_T3] = 1'b1; end
      4'd5, 4'd7,
      4'd9:         step_mask[U_STAT] = 1'b1;
      default:      step_mask[U_SEL] = 1'b1;
    endcase
  endfunction

  assign mask   = step_mask(step);
  assign hack   = {t3_ack, t2_ack, dp_ack};
  assign dp_req = hreq[NUNITS-1:0];
  assign t2_req = hreq[H_T2];
  assign t3_req = hreq[H_T3];

  // n is only loaded here (T2 decrements it); syn only shuffled (T3 steps it)
  always_comb begin
    mode          = '{n_load: 1'b1, syn_mode: SYN_SHUFFLE, stat_or: 1'b1};
    mode.stat_or  = (step != 4'd5);
  end

  always_comb begin
    if (step == 4'd3)      nxt = (n5 || eq) ? 4'd5 : 4'd4;
    else if (step == 4'd4) nxt = 4'd3;
    else                   nxt = step + 4'd1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      step  <= '0;
      hreq  <= '0;
      ack   <= 1'b0;
    end else begin
      unique case (state)
        S_IDLE: if (req) begin
          step  <= '0;
          hreq  <= step_mask(4'd0);
          state <= S_HI;
        end
        S_HI: if ((hack & mask) == mask) begin
          hreq  <= '0;
          state <= S_LO;
        end
        S_LO: if ((hack & mask) == '0) begin
          if (step == LAST) begin
            ack   <= 1'b1;
            state <= S_DONE;
          end else begin
            step  <= nxt;
            hreq  <= step_mask(nxt);
            state <= S_HI;
          end
        end
        S_DONE: if (!req) begin
          ack   <= 1'b0;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
