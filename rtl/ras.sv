// ras: RAS (request, acknowledge and sequencing) block, the local control of
// one datapath unit in the microengine.
//
// Each instruction cycle the execution control unit raises the global
// request greq. If the instruction does not enable this unit (en=0) the
// block reports done at once. Otherwise it starts a four-phase handshake on
// ureq/uack, immediately when chain=0, or, when chain=1, only after its
// predecessor in the chain (pred_done) has finished; this is how a fork-join
// thread becomes a chain inside one instruction. After the unit has
// acknowledged and returned to zero the block raises done, which feeds its
// successor's pred_done and the ECU's acknowledge join. done falls after
// greq falls. The role of the block follows the design; the fixed
// predecessor per unit and the clocked timing are this design's choices.
module ras (
  input  logic clk,
  input  logic rst_n,
  input  logic greq,
  input  logic en,
  input  logic chain,
  input  logic pred_done,
  output logic ureq,
  input  logic uack,
  output logic fwd,
  output logic done
);
  typedef enum logic [1:0] {S_IDLE, S_HI, S_LO, S_DONE} state_e;
  state_e state;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      ureq  <= 1'b0;
      fwd   <= 1'b0;
      done  <= 1'b0;
    end else begin
      unique case (state)
        S_IDLE: if (greq) begin
          if (!en) begin
            fwd   <= 1'b1;
            done  <= 1'b1;
            state <= S_DONE;
          end else if (!chain || pred_done) begin
            ureq  <= 1'b1;
            state <= S_HI;
          end
        end
        S_HI: if (uack) begin
          ureq  <= 1'b0;
          fwd   <= 1'b1;
          state <= S_LO;
        end
        S_LO: if (!uack) begin
          done  <= 1'b1;
          state <= S_DONE;
        end
        S_DONE: if (!greq) begin
          fwd   <= 1'b0;
          done  <= 1'b0;
          state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
