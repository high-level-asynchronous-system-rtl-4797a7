// ecu: execution control unit of the microengine.
//
// After reset it waits for start (level, sampled once). Then, for every
// microinstruction: one cycle to read the microcode word at the current
// address (FETCH), raise the global request req to all RAS blocks (REQ),
// wait until the joined acknowledge ack is high, i.e. every RAS is done,
// lower req and wait until ack has fallen (REL), and pulse step for one cycle
// so the address advances or branches (NEXT). The branch decision is taken
// during NEXT, after the whole instruction has completed, so it sees the
// updated n[5] and syndrome. The unit and its start/req/ack signals are
// named in the design; this cycle is this design's choice.
module ecu (
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  output logic req,
  input  logic ack,
  output logic step
);
  typedef enum logic [2:0] {S_WAIT_START, S_FETCH, S_REQ, S_REL, S_NEXT} state_e;
  state_e state;

  assign step = (state == S_NEXT);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_WAIT_START;
      req   <= 1'b0;
    end else begin
      unique case (state)
        S_WAIT_START: if (start) state <= S_FETCH;
        S_FETCH: begin
          req   <= 1'b1;
          state <= S_REQ;
        end
        S_REQ: if (ack) begin
          req   <= 1'b0;
          state <= S_REL;
        end
        S_REL: if (!ack) state <= S_NEXT;
        S_NEXT: state <= S_FETCH;
        default: state <= S_WAIT_START;
      endcase
    end
  end
endmodule
