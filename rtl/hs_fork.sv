// Fork handshake component, #[0:[1,2]] for N = 2 active ports.
//
// A request on the passive port 0 (act_*) is forwarded to all N active ports
// (out_*) at once; the up phases of the outputs run concurrently and port 0 is
// acknowledged once every output has acknowledged.  The down phase mirrors
// it: act_req falling lowers every output request, and act_ack falls once
// every output acknowledge has fallen ("concurrency with synchronised
// phases").  The acknowledge join is a Muller C-element.
//
// Timing: out_req follows act_req by one clock; act_ack follows the last
// output acknowledge edge by one clock.  Reset puts every wire at 0.
module hs_fork #(
  parameter int unsigned N = 2   // number of active ports
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         act_req,
  output logic         act_ack,
  output logic [N-1:0] out_req,
  input  logic [N-1:0] out_ack
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_req <= '0;
      act_ack <= 1'b0;
    end else begin
      out_req <= {N{act_req}};
      if (&out_ack)       act_ack <= 1'b1;
      else if (~|out_ack) act_ack <= 1'b0;
    end
  end

endmodule
