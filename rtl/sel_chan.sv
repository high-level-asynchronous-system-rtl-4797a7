// sel_chan: sending end of the three result channels s, e and l.
//
// One control request sends the status bit on s, the saved syndrome byte on
// e and the counter n (the error location) on l, all at once. Each channel is
// four-phase with the decoder as the active side: request and data go up
// together, the receiver acknowledges, the request returns to zero and the
// receiver drops its acknowledge. The three handshakes are joined: control
// sees ack=1 only when all three have completed, and ack returns to 0 after
// req falls. Data outputs are latched when req rises and held until the next
// send. With TWO_PHASE=1 each channel uses transition signalling instead:
// the request toggles and the send is complete when every acknowledge equals
// its request; there is no return to zero. Sending the three concurrently
// follows the design's specification; the joined acknowledge, the register
// timing and the two-phase option's details are this design's choices.
module sel_chan #(
  parameter int unsigned E_W       = 8,
  parameter int unsigned L_W       = 6,
  parameter bit          TWO_PHASE = 1'b0
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           req,
  output logic           ack,
  input  logic           stat,
  input  logic [E_W-1:0] e,
  input  logic [L_W-1:0] n,
  output logic           s_req,
  input  logic           s_ack,
  output logic           s_data,
  output logic           e_req,
  input  logic           e_ack,
  output logic [E_W-1:0] e_data,
  output logic           l_req,
  input  logic           l_ack,
  output logic [L_W-1:0] l_data
);
  typedef enum logic [1:0] {S_IDLE, S_WAIT_HI, S_WAIT_LO, S_DONE} state_e;
  state_e state;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= S_IDLE;
      ack    <= 1'b0;
      s_req  <= 1'b0;
      e_req  <= 1'b0;
      l_req  <= 1'b0;
      s_data <= 1'b0;
      e_data <= '0;
      l_data <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (req) begin
          s_data <= stat;
          e_data <= e;
          l_data <= n;
          s_req  <= TWO_PHASE ? !s_req : 1'b1;
          e_req  <= TWO_PHASE ? !e_req : 1'b1;
          l_req  <= TWO_PHASE ? !l_req : 1'b1;
          state  <= S_WAIT_HI;
        end
        S_WAIT_HI: if (TWO_PHASE) begin
          if (s_ack == s_req && e_ack == e_req && l_ack == l_req) begin
            ack   <= 1'b1;
            state <= S_DONE;
          end
        end else if (s_ack && e_ack && l_ack) begin
          s_req <= 1'b0;
          e_req <= 1'b0;
          l_req <= 1'b0;
          state <= S_WAIT_LO;
        end
        S_WAIT_LO: if (!s_ack && !e_ack && !l_ack) begin
          ack   <= 1'b1;
          state <= S_DONE;
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
