// Fetch handshake component (Balsa assignment "inp -> out").
//
// On a request of the passive activation port (act_*) the component pulls a
// word from its input channel (inp_*: inp_req out, inp_ack and inp_data in)
// and pushes that word on its output channel (out_*: out_req and out_data
// out, out_ack in).  When the output is acknowledged, act is acknowledged.
// act_req falling withdraws both requests, and act_ack falls when both
// acknowledges have fallen:
//   act_req+ ; inp_req+ ; inp_ack+ ; out_req+ ; out_ack+ ; act_ack+ ;
//   act_req- ; (inp_req- ; inp_ack-) || (out_req- ; out_ack-) ; act_ack-
// There is no storage: out_data is inp_data, which the pull source keeps
// valid while inp_ack is high, and out_req is only high while inp_ack is.
//
// This is the usual Balsa fetch; the text names it without giving its
// insides, so the sequence above is this design's reading of its function.
module hs_fetch #(
  parameter int unsigned W = hs_pkg::BYTE_W   // data width
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         act_req,
  output logic         act_ack,
  output logic         inp_req,
  input  logic         inp_ack,
  input  logic [W-1:0] inp_data,
  output logic         out_req,
  input  logic         out_ack,
  output logic [W-1:0] out_data
);

  typedef enum logic [2:0] {S_IDLE, S_PULL, S_PUSH, S_HOLD, S_RTZ} state_e;

  state_e state;

  assign out_data = inp_data;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      act_ack <= 1'b0;
      inp_req <= 1'b0;
      out_req <= 1'b0;
    end else begin
      unique case (state)
        S_IDLE:
          if (act_req && !act_ack) begin
            inp_req <= 1'b1;
            state   <= S_PULL;
          end
        S_PULL:
          if (inp_ack) begin
            out_req <= 1'b1;
            state   <= S_PUSH;
          end
        S_PUSH:
          if (out_ack) begin
            act_ack <= 1'b1;
            state   <= S_HOLD;
          end
        S_HOLD:
          if (!act_req) begin
            inp_req <= 1'b0;
            out_req <= 1'b0;
            state   <= S_RTZ;
          end
        S_RTZ:
          if (!inp_ack && !out_ack) begin
            act_ack <= 1'b0;
            state   <= S_IDLE;
          end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
