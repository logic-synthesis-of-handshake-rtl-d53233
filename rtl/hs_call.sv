// Call handshake component, #[[0:2|1:2]] for N = 2 callers.
//
// N passive ports (inp_*) share one active port (out_*).  A request on caller
// i is forwarded to the output, and the output's acknowledge is returned to
// caller i only; the down phase follows the same path:
//   inp[i] req+ ; out req+ ; out ack+ ; inp[i] ack+ ;
//   inp[i] req- ; out req- ; out ack- ; inp[i] ack-
// This is the published expansion.  The callers are a choice: the
// environment must not request two of them at once.  If it does, the lowest
// index is served first and the other waits, so nothing is lost; this
// tie-break is this design's choice.  The selected caller is held in a
// register for the whole cycle, which plays the role of the csc signals that
// separate "called from 0" from "called from 1" in the gate-level version.
module hs_call #(
  parameter int unsigned N = 2   // number of callers
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] inp_req,
  output logic [N-1:0] inp_ack,
  output logic         out_req,
  input  logic         out_ack
);

  localparam int unsigned IW = (N > 1) ? $clog2(N) : 1;

  typedef enum logic [1:0] {S_IDLE, S_UP, S_HOLD, S_DN} state_e;

  state_e        state;
  logic [IW-1:0] sel;
  logic [IW-1:0] first;

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
      inp_ack <= '0;
      out_req <= 1'b0;
    end else begin
      unique case (state)
        S_IDLE:
          if (|(inp_req & ~inp_ack)) begin
            sel     <= first;
            out_req <= 1'b1;
            state   <= S_UP;
          end
        S_UP:
          if (out_ack) begin
            inp_ack[sel] <= 1'b1;
            state        <= S_HOLD;
          end
        S_HOLD:
          if (!inp_req[sel]) begin
            out_req <= 1'b0;
            state   <= S_DN;
          end
        S_DN:
          if (!out_ack) begin
            inp_ack[sel] <= 1'b0;
            state        <= S_IDLE;
          end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
