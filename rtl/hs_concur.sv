// Concur handshake component, #[0:[1||2]] for N = 2 active ports.
//
// When the passive activation port (act_*) is requested, every active port
// (out_*) is requested at once and each runs its complete four-phase cycle
// independently of the others.  When all of them are back at zero, act is
// acknowledged; act_req falling then lowers act_ack:
//   act_req+ ; || over i of (out[i] req+ ack+ req- ack-) ; act_ack+ ;
//   act_req- ; act_ack-
// This is the published expansion of the component.  A per-port "done" mask
// records which ports have finished; the state machine and its one-clock
// reaction time per event are this design's choices.
module hs_concur #(
  parameter int unsigned N = 2   // number of concurrent active ports
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         act_req,
  output logic         act_ack,
  output logic [N-1:0] out_req,
  input  logic [N-1:0] out_ack
);

  typedef enum logic [1:0] {S_IDLE, S_RUN, S_HOLD} state_e;

  state_e       state;
  logic [N-1:0] done;       // port i has completed its cycle
  logic [N-1:0] done_next;

  // A port is finished when its request was withdrawn and its acknowledge
  // has followed.
  always_comb begin
    done_next = done | (~out_req & ~out_ack);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      done    <= '0;
      out_req <= '0;
      act_ack <= 1'b0;
    end else begin
      unique case (state)
        S_IDLE:
          if (act_req && !act_ack) begin
            out_req <= '1;
            done    <= '0;
            state   <= S_RUN;
          end
        S_RUN: begin
          out_req <= out_req & ~out_ack;   // withdraw each answered request
          done    <= done_next;
          if (&done_next) begin
            act_ack <= 1'b1;
            state   <= S_HOLD;
          end
        end
        S_HOLD:
          if (!act_req) begin
            act_ack <= 1'b0;
            state   <= S_IDLE;
          end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
