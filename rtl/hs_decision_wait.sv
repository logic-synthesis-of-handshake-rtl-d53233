// DecisionWait handshake component, #[0:[1:3|2:4]] for N = 2 choices.
//
// Once the passive activation port (act_*) is requested, the component waits
// for a request on one of its N passive input ports (inp_*).  The chosen
// input i is passed on to active output i (out_*): inp[i] encloses out[i],
// and act is acknowledged with it:
//   act_req+ ; inp[i] req+ ; out[i] req+ ; out[i] ack+ ; inp[i] ack+ ; act_ack+ ;
//   act_req- ; inp[i] req- ; out[i] req- ; out[i] ack- ; inp[i] ack- ; act_ack-
// This is the published expansion of the component.  The inputs are a choice:
// the environment is expected to request only one of them per activation.  If
// several are requested together the lowest index is taken and the others
// wait for a later activation; that tie-break is this design's choice.
// As in the expansion, act_ack follows inp_ack[i] one step later on both
// edges.  The
// output request is withdrawn only when both act_req and the chosen inp_req
// have fallen, which keeps the rising and falling edges of every port
// alternating (the consistency condition) whatever order the environment
// lowers them in.
module hs_decision_wait #(
  parameter int unsigned N = 2   // number of choices
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         act_req,
  output logic         act_ack,
  input  logic [N-1:0] inp_req,
  output logic [N-1:0] inp_ack,
  output logic [N-1:0] out_req,
  input  logic [N-1:0] out_ack
);

  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1;

  typedef enum logic [2:0] {S_IDLE, S_UP, S_ACK_UP, S_HOLD, S_DN, S_ACK_DN} state_e;

  state_e        state;
  logic [IW-1:0] sel;       // chosen port
  logic [IW-1:0] first;     // lowest requesting input

  always_comb begin
    first = '0;
    for (int i = N - 1; i >= 0; i--) begin
      if (inp_req[i]) first = IW'(i);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      sel     <= '0;
      act_ack <= 1'b0;
      inp_ack <= '0;
      out_req <= '0;
    end else begin
      unique case (state)
        S_IDLE:
          if (act_req && !act_ack && (|(inp_req & ~inp_ack))) begin
            sel            <= first;
            out_req[first] <= 1'b1;
            state          <= S_UP;
          end
        S_UP:
          if (out_ack[sel]) begin
            inp_ack[sel] <= 1'b1;
            state        <= S_ACK_UP;
          end
        S_ACK_UP: begin
          act_ack <= 1'b1;               // activation after the input
          state   <= S_HOLD;
        end
        S_HOLD:
          if (!act_req && !inp_req[sel]) begin
            out_req[sel] <= 1'b0;
            state        <= S_DN;
          end
        S_DN:
          if (!out_ack[sel]) begin
            inp_ack[sel] <= 1'b0;
            state        <= S_ACK_DN;
          end
        S_ACK_DN: begin
          act_ack <= 1'b0;
          state   <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
