// Cluster0 of the two-synchronized-buffers circuit: gate-level control.
//
// Three control components of the Balsa handshake netlist are merged into one
// speed-independent controller:
//   SequenceOptimised  act(16) -> [ c15 ; c10 ]
//   Concur             c15     -> [ rd1(14) || rd2(12) ]
//   Concur             c10     -> [ wr1(9)  || wr2(7)  ]
// Channels 15 and 10 are internal to the cluster and disappear.  Seen from
// its ports the cluster does, for every activation:
//   act_req+ ; (rd1 full cycle || rd2 full cycle) ;
//   (wr1 full cycle || wr2 full cycle) ; act_ack+ ; act_req- ; act_ack-
// Channel numbers in brackets are those of the Balsa netlist.
//
// The logic is the mapped netlist of the cluster: eight non-input signals,
// three of them state signals (csc1..csc3) that give every reachable state a
// distinct code.  csc1 remembers that rd1 has finished its up phase (set by
// rd1_ack, cleared by wr2_ack), csc3 the same for rd2 (set by rd2_ack,
// cleared by wr1_ack), and csc2 is high between activations and falls once
// the read phase is under way (set by act_req low, cleared by act_req with
// csc3).  Gate by gate (x = inverter/nand/nor intermediate nodes):
//   x252 = ~csc2            x253 = ~csc3          x249 = ~csc1
//   x254 = ~(x253 & x252)   x202 = ~(wr2_ack | x249)
//   x324 = ~(csc2 & x253)   x198 = ~(wr1_ack | x253)
//   x191 = ~(csc1 | rd1_req)  x196 = csc2 & act_req
//   x192 = ~(rd1_req | x196)  x194 = ~(csc2 | csc3)
//   x193 = ~(wr1_req | x194)
//   act_ack = ~(x254 | csc1 | wr2_ack | wr1_ack)
//   csc1    = x202 | rd1_ack          csc2 = ~(act_req & x324)
//   csc3    = x198 | rd2_ack          rd2_req = ~(x191 | x252)
//   rd1_req = ~(csc1 | x192)          wr2_req = ~(x193 | x249)
//   wr1_req = ~(rd1_ack | x253 | rd2_ack | rd1_req)
// The equations are those of the published example; the intermediate node
// names keep the published numbers.
//
// Delay model: each of the eight non-input signals is the output of one
// gate whose delay is one clock, i.e. it is a flip-flop loaded with its
// equation evaluated on the present values; the x nodes are combinational.
// A speed-independent circuit works for any gate delays, so this is one legal
// timing of the circuit and produces the same handshake order.  The reset
// state is the idle state of the specification: all requests and
// acknowledges 0, csc1 = csc3 = 0 and csc2 = 1 (csc2 is 1 whenever act_req
// is 0).
module seq_par_cluster0 (
  input  logic clk,
  input  logic rst_n,
  // activation (channel 16), passive
  input  logic act_req,
  output logic act_ack,
  // rd1: start of the fetch i1 -> x1 (channel 14), active
  output logic rd1_req,
  input  logic rd1_ack,
  // rd2: start of the fetch i2 -> x2 (channel 12), active
  output logic rd2_req,
  input  logic rd2_ack,
  // wr1: start of the fetch x1 -> o1 (channel 9), active
  output logic wr1_req,
  input  logic wr1_ack,
  // wr2: start of the fetch x2 -> o2 (channel 7), active
  output logic wr2_req,
  input  logic wr2_ack
);

  logic csc1, csc2, csc3;

  // intermediate gates of the mapped netlist
  logic x191, x192, x193, x194, x196, x198, x202, x249, x252, x253, x254, x324;
  // next values of the gate outputs that carry state
  logic act_ack_d, csc1_d, csc2_d, csc3_d, rd1_req_d, rd2_req_d, wr1_req_d, wr2_req_d;

  always_comb begin
    x252 = ~csc2;
    x253 = ~csc3;
    x249 = ~csc1;
    x254 = ~(x253 & x252);
    x202 = ~(wr2_ack | x249);
    x324 = ~(csc2 & x253);
    x198 = ~(wr1_ack | x253);
    x191 = ~(csc1 | rd1_req);
    x196 = csc2 & act_req;
    x192 = ~(rd1_req | x196);
    x194 = ~(csc2 | csc3);
    x193 = ~(wr1_req | x194);

    act_ack_d = ~(x254 | csc1 | wr2_ack | wr1_ack);
    csc1_d    = x202 | rd1_ack;
    csc2_d    = ~(act_req & x324);
    csc3_d    = x198 | rd2_ack;
    rd2_req_d = ~(x191 | x252);
    rd1_req_d = ~(csc1 | x192);
    wr2_req_d = ~(x193 | x249);
    wr1_req_d = ~(rd1_ack | x253 | rd2_ack | rd1_req);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      act_ack <= 1'b0;
      csc1    <= 1'b0;
      csc2    <= 1'b1;
      csc3    <= 1'b0;
      rd1_req <= 1'b0;
      rd2_req <= 1'b0;
      wr1_req <= 1'b0;
      wr2_req <= 1'b0;
    end else begin
      act_ack <= act_ack_d;
      csc1    <= csc1_d;
      csc2    <= csc2_d;
      csc3    <= csc3_d;
      rd1_req <= rd1_req_d;
      rd2_req <= rd2_req_d;
      wr1_req <= wr1_req_d;
      wr2_req <= wr2_req_d;
    end
  end

endmodule
