// Testbench helper: independent four-phase rule monitor.
// Counts violations (req changing while req != ack, ack changing while
// ack == req) and completed cycles (ack falling).
module tb_hs_mon (
  input  logic clk,
  input  logic rst_n,
  input  logic req,
  input  logic ack,
  output int   errors,
  output int   cycles
);
  logic req_q, ack_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      req_q  <= 1'b0;
      ack_q  <= 1'b0;
      errors <= 0;
      cycles <= 0;
    end else begin
      req_q <= req;
      ack_q <= ack;
      if ((req != req_q) && (req_q != ack_q)) errors <= errors + 1;
      if ((ack != ack_q) && (ack_q == req_q)) errors <= errors + 1;
      if (ack_q && !ack) cycles <= cycles + 1;
    end
  end
endmodule
