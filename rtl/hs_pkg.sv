// Shared constants for the handshake-component library.
//
// Every channel in this library uses the four-phase (return-to-zero)
// handshake: the active side raises req, the passive side answers with ack,
// then req and ack fall in the same order.  Data, where a channel has it,
// travels with the request (push channel) or with the acknowledge (pull
// channel).  The circuits are speed-independent controllers; here each
// request and acknowledge wire is driven from a flip-flop clocked by a free
// running emulation clock, so one clock period stands for one arbitrary gate
// delay.  Because the controllers do not depend on delays, the order of
// handshake events is the same as in a clockless implementation.
package hs_pkg;

  // Width of a Balsa "byte", the data type of the two-buffer example.
  parameter int unsigned BYTE_W = 8;

  // Phase of a four-phase channel as seen from its two wires.
  typedef enum logic [1:0] {
    PH_IDLE    = 2'b00,  // req=0 ack=0
    PH_REQ_UP  = 2'b10,  // req=1 ack=0
    PH_ACK_UP  = 2'b11,  // req=1 ack=1
    PH_REQ_DN  = 2'b01   // req=0 ack=1
  } phase_e;

endpackage
