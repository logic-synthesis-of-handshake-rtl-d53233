// Synch handshake component, #[0:1:2] for N = 2 passive ports.
//
// N passive synchronisation ports (inp_*) all have to request before the
// single active port (out_*) is requested; the acknowledge of the active port
// is returned to every passive port.  Return to zero works the same way: the
// output request falls once every input request has fallen.  The request join
// is a Muller C-element (rises when all inputs are 1, falls when all are 0,
// holds otherwise), which is the standard implementation of this component.
//
// Timing: out_req follows the last input request edge by one clock; each
// inp_ack follows out_ack by one clock.  Reset puts every wire at 0.
// The behaviour (join of passive requests, broadcast of the acknowledge) is
// the component's published function; the C-element form and the one-clock
// wire delays are this design's choices.
module hs_synch #(
  parameter int unsigned N = 2   // number of passive ports
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] inp_req,
  output logic [N-1:0] inp_ack,
  output logic         out_req,
  input  logic         out_ack
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_req <= 1'b0;
      inp_ack <= '0;
    end else begin
      if (&inp_req)      out_req <= 1'b1;
      else if (~|inp_req) out_req <= 1'b0;
      inp_ack <= {N{out_ack}};
    end
  end

endmodule
