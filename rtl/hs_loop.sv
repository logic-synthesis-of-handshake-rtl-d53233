// Loop handshake component (Balsa "loop ... end").
//
// A request on the passive activation port (act_*) starts an endless series
// of four-phase handshakes on the active port (out_*): whenever out_req
// equals out_ack the request is inverted, so the output goes req+ ack+ req-
// ack- again and again.  The activation is never acknowledged, exactly as a
// Balsa procedure whose body is an unterminated loop never returns; act_ack
// therefore stays 0 (it is kept as a port so that the channel is complete).
// Only reset stops the loop.
//
// Timing: out_req answers each out_ack edge one clock later.
module hs_loop (
  input  logic clk,
  input  logic rst_n,
  input  logic act_req,
  output logic act_ack,
  output logic out_req,
  input  logic out_ack
);

  logic running;

  assign act_ack = 1'b0;   // an endless loop never completes

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      running <= 1'b0;
      out_req <= 1'b0;
    end else begin
      if (act_req) running <= 1'b1;
      if ((running || act_req) && (out_req == out_ack)) out_req <= ~out_req;
    end
  end

endmodule
