// thread_ctrl: controller of one fork-join thread in the hardwired decoder
// (T0..T3).
//
// When its main controller raises req, the thread runs STEPS four-phase
// handshakes on out_req/out_ack one after another (step i: raise
// out_req[i], wait for out_ack[i], lower it, wait for out_ack[i] to fall),
// then raises ack; ack falls after req falls. Every step is a full
// handshake, so the thread carries the control overhead that chaining would
// remove. Splitting the fork branches into their own controllers follows
// the design; the step sequencer form and the register timing are this
// design's choices. Used with STEPS=3 for the symbol thread (c chan, s reg,
// syn reg) and STEPS=1 for the others.
module thread_ctrl #(
  parameter int unsigned STEPS = 3
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             req,
  output logic             ack,
  output logic [STEPS-1:0] out_req,
  input  logic [STEPS-1:0] out_ack
);
  localparam int unsigned SW = (STEPS > 1) ? $clog2(STEPS) : 1;

  typedef enum logic [1:0] {S_IDLE, S_HI, S_LO, S_DONE} state_e;
  state_e        state;
  logic [SW-1:0] step;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      step    <= '0;
      ack     <= 1'b0;
      out_req <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (req) begin
          step        <= '0;
          out_req[0]  <= 1'b1;
          state       <= S_HI;
        end
        S_HI: if (out_ack[step]) begin
          out_req[step] <= 1'b0;
          state         <= S_LO;
        end
        S_LO: if (!out_ack[step]) begin
          if (32'(step) == STEPS - 1) begin
            ack   <= 1'b1;
            state <= S_DONE;
          end else begin
            out_req[step + 1'b1] <= 1'b1;
            step                 <= step + 1'b1;
            state                <= S_HI;
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
