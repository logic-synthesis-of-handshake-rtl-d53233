// Two synchronized buffers ("seq_par"), clustered handshake circuit.
//
// Behaviour: after activation the circuit repeats forever
//   (read i1 into x1 || read i2 into x2) ; (write x1 to o1 || write x2 to o2)
// i.e. two one-word buffers that take their inputs together and then deliver
// their outputs together.  i1 and i2 are pull channels (the circuit requests,
// the environment acknowledges with data); o1 and o2 are push channels (the
// circuit requests with data, the environment acknowledges).  All channels
// use the four-phase handshake.
//
// Structure (Balsa handshake netlist after clustering; channel numbers of the
// unclustered netlist in brackets):
//   Loop        act(1)  -> cluster activation (16)
//   Cluster0    (16)    -> rd1(14), rd2(12), wr1(9), wr2(7)
//   Fetch       rd1(14): i1(2)   -> x1 write (13)
//   Fetch       rd2(12): i2(4)   -> x2 write (11)
//   Fetch       wr1(9) : x1 read (8) -> o1(3)
//   Fetch       wr2(7) : x2 read (6) -> o2(5)
//   Variable    x1, x2: 8 bits, one read port each
// Cluster0 is the gate-level controller that replaces the SequenceOptimised
// and the two Concur components of the original netlist.
//
// The activation is never acknowledged (the body is an endless loop).  The
// structure and widths are those of the published example.  Every handshake
// wire is a flip-flop output on the emulation clock; hs_check assertions
// watch the internal channels.
module seq_par #(
  parameter int unsigned W = hs_pkg::BYTE_W   // word width of i1, i2, o1, o2
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         act_req,
  output logic         act_ack,
  output logic         i1_req,
  input  logic         i1_ack,
  input  logic [W-1:0] i1_data,
  output logic         o1_req,
  input  logic         o1_ack,
  output logic [W-1:0] o1_data,
  output logic         i2_req,
  input  logic         i2_ack,
  input  logic [W-1:0] i2_data,
  output logic         o2_req,
  input  logic         o2_ack,
  output logic [W-1:0] o2_data
);

  logic         c16_req, c16_ack;                    // loop -> cluster
  logic         rd1_req, rd1_ack, rd2_req, rd2_ack;  // cluster -> input fetches
  logic         wr1_req, wr1_ack, wr2_req, wr2_ack;  // cluster -> output fetches
  logic         x1w_req, x1w_ack, x2w_req, x2w_ack;  // variable write ports
  logic [W-1:0] x1w_data, x2w_data;
  logic         x1r_req, x1r_ack, x2r_req, x2r_ack;  // variable read ports
  logic [W-1:0] x1r_data, x2r_data;

  hs_loop u_loop (
    .clk, .rst_n,
    .act_req, .act_ack,
    .out_req(c16_req), .out_ack(c16_ack)
  );

  seq_par_cluster0 u_cluster0 (
    .clk, .rst_n,
    .act_req(c16_req), .act_ack(c16_ack),
    .rd1_req, .rd1_ack, .rd2_req, .rd2_ack,
    .wr1_req, .wr1_ack, .wr2_req, .wr2_ack
  );

  hs_fetch #(.W(W)) u_fetch_i1 (
    .clk, .rst_n,
    .act_req(rd1_req), .act_ack(rd1_ack),
    .inp_req(i1_req), .inp_ack(i1_ack), .inp_data(i1_data),
    .out_req(x1w_req), .out_ack(x1w_ack), .out_data(x1w_data)
  );

  hs_fetch #(.W(W)) u_fetch_i2 (
    .clk, .rst_n,
    .act_req(rd2_req), .act_ack(rd2_ack),
    .inp_req(i2_req), .inp_ack(i2_ack), .inp_data(i2_data),
    .out_req(x2w_req), .out_ack(x2w_ack), .out_data(x2w_data)
  );

  hs_variable #(.W(W), .R(1)) u_x1 (
    .clk, .rst_n,
    .wr_req(x1w_req), .wr_ack(x1w_ack), .wr_data(x1w_data),
    .rd_req(x1r_req), .rd_ack(x1r_ack), .rd_data(x1r_data)
  );

  hs_variable #(.W(W), .R(1)) u_x2 (
    .clk, .rst_n,
    .wr_req(x2w_req), .wr_ack(x2w_ack), .wr_data(x2w_data),
    .rd_req(x2r_req), .rd_ack(x2r_ack), .rd_data(x2r_data)
  );

  hs_fetch #(.W(W)) u_fetch_o1 (
    .clk, .rst_n,
    .act_req(wr1_req), .act_ack(wr1_ack),
    .inp_req(x1r_req), .inp_ack(x1r_ack), .inp_data(x1r_data),
    .out_req(o1_req), .out_ack(o1_ack), .out_data(o1_data)
  );

  hs_fetch #(.W(W)) u_fetch_o2 (
    .clk, .rst_n,
    .act_req(wr2_req), .act_ack(wr2_ack),
    .inp_req(x2r_req), .inp_ack(x2r_ack), .inp_data(x2r_data),
    .out_req(o2_req), .out_ack(o2_ack), .out_data(o2_data)
  );

  // protocol watch on the internal channels
  hs_check u_chk_c16 (.clk, .rst_n, .req(c16_req), .ack(c16_ack));
  hs_check u_chk_rd1 (.clk, .rst_n, .req(rd1_req), .ack(rd1_ack));
  hs_check u_chk_rd2 (.clk, .rst_n, .req(rd2_req), .ack(rd2_ack));
  hs_check u_chk_wr1 (.clk, .rst_n, .req(wr1_req), .ack(wr1_ack));
  hs_check u_chk_wr2 (.clk, .rst_n, .req(wr2_req), .ack(wr2_ack));
  hs_check u_chk_x1w (.clk, .rst_n, .req(x1w_req), .ack(x1w_ack));
  hs_check u_chk_x2w (.clk, .rst_n, .req(x2w_req), .ack(x2w_ack));
  hs_check u_chk_x1r (.clk, .rst_n, .req(x1r_req), .ack(x1r_ack));
  hs_check u_chk_x2r (.clk, .rst_n, .req(x2r_req), .ack(x2r_ack));

endmodule
