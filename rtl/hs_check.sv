// Four-phase handshake rule checker (simulation assertions only).
//
// Watches one channel: req may change only while req == ack (the passive
// side has answered the previous edge), and ack may change only while
// ack != req (there is a request edge to answer).  Any other change is a
// protocol violation.  The checker holds no state of its own beyond the
// sampled previous values of the two wires; it drives nothing.
module hs_check (
  input logic clk,
  input logic rst_n,
  input logic req,
  input logic ack
);

  a_req_waits_for_ack : assert property (@(posedge clk) disable iff (!rst_n)
    (req != $past(req)) |-> ($past(req) == $past(ack)))
    else $error("hs_check: request changed before the acknowledge answered");

  a_ack_answers_req : assert property (@(posedge clk) disable iff (!rst_n)
    (ack != $past(ack)) |-> ($past(ack) != $past(req)))
    else $error("hs_check: acknowledge changed without a request edge");

endmodule
