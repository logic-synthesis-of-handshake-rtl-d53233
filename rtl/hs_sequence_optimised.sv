// SequenceOptimised handshake component, #[0:[1;2]] for N = 2 active ports.
//
// When the passive activation port (act_*) is requested, the N active ports
// (out_*) are handshaken one after another.  Every port but the last goes
// through its full four-phase cycle before the next one starts.  The last
// port only completes its up phase; then act is acknowledged, and the down
// phase of the last port is overlapped with the down phase of act:
//   act_req+ ; (out[i] req+ ack+ req- ack-) for i < N-1 ;
//   out[N-1] req+ ; out[N-1] ack+ ; act_ack+ ; act_req- ;
//   out[N-1] req- ; out[N-1] ack- ; act_ack-
// This is the published expansion of the component.  The state machine and
// its one-clock reaction time per event are this design's choices.
module hs_sequence_optimised #(
  parameter int unsigned N = 2   // number of sequenced active ports
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         act_req,
  output logic         act_ack,
  output logic [N-1:0] out_req,
  input  logic [N-1:0] out_ack
);

  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1;

  typedef enum logic [2:0] {S_IDLE, S_UP, S_DN, S_HOLD, S_LAST_DN} state_e;

  state_e        state;
  logic [IW-1:0] idx;   // port currently handshaken

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      idx     <= '0;
      out_req <= '0;
      act_ack <= 1'b0;
    end else begin
      unique case (state)
        S_IDLE:
          if (act_req && !act_ack) begin
            idx        <= '0;
            out_req[0] <= 1'b1;
            state      <= S_UP;
          end
        S_UP:
          if (out_ack[idx]) begin
            if (idx == IW'(N - 1)) begin
              act_ack <= 1'b1;           // last port: acknowledge early
              state   <= S_HOLD;
            end else begin
              out_req[idx] <= 1'b0;
              state        <= S_DN;
            end
          end
        S_DN:
          if (!out_ack[idx]) begin
            idx              <= idx + 1'b1;
            out_req[idx + 1] <= 1'b1;
            state            <= S_UP;
          end
        S_HOLD:
          if (!act_req) begin
            out_req[N-1] <= 1'b0;
            state        <= S_LAST_DN;
          end
        S_LAST_DN:
          if (!out_ack[N-1]) begin
            act_ack <= 1'b0;
            state   <= S_IDLE;
          end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
