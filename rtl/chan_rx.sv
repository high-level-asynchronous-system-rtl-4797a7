// chan_rx: receiving end of a four-phase bundled-data input channel.
//
// Used for the t channel (WIDTH=1, block size select) and the c channel
// (WIDTH=8, received symbols). The environment is the active sender: it puts
// a word on ch_data and raises ch_req. Control asks for a word by raising
// req. When both are high the channel latches ch_data into q and raises
// ch_ack; once the sender has lowered ch_req the channel lowers ch_ack and
// only then acknowledges control (ack=1). q holds the word afterwards, so a
// register chained behind the channel can copy it at leisure. ack returns to
// 0 after req falls. All outputs are registered; reset clears them.
// With TWO_PHASE=1 the environment side uses transition signalling
// instead: a new word is offered by toggling ch_req, and the channel accepts
// it by copying ch_req to ch_ack, with no return to zero; control is then
// acknowledged at once. Four-phase is the default, as in the decoder built
// from this design; two-phase is the other protocol the microengine
// architecture supports. Which side is active, and latching inside the
// channel, are this design's choices; the channel itself is the design's
// "t chan"/"c chan".
module chan_rx #(
  parameter int unsigned WIDTH     = 8,
  parameter bit          TWO_PHASE = 1'b0
) (
  input  logic             clk,
  input  logic             rst_n,
  // environment side
  input  logic             ch_req,
  output logic             ch_ack,
  input  logic [WIDTH-1:0] ch_data,
  // control side
  input  logic             req,
  output logic             ack,
  output logic [WIDTH-1:0] q
);
  typedef enum logic [1:0] {S_IDLE, S_ENV_LO, S_DONE} state_e;
  state_e state;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= S_IDLE;
      ch_ack <= 1'b0;
      ack    <= 1'b0;
      q      <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (TWO_PHASE) begin
          if (req && (ch_req != ch_ack)) begin
            q      <= ch_data;
            ch_ack <= ch_req;
            ack    <= 1'b1;
            state  <= S_DONE;
          end
        end else if (req && ch_req) begin
          q      <= ch_data;
          ch_ack <= 1'b1;
          state  <= S_ENV_LO;
        end
        S_ENV_LO: if (!ch_req) begin
          ch_ack <= 1'b0;
          ack    <= 1'b1;
          state  <= S_DONE;
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
