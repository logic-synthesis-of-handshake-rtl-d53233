// Top level: clustered two-buffer circuit plus the selected control
// handshake components.
//
// The design has two parts that stand side by side, each with its own ports:
//  * sp_*   : seq_par, the two synchronized buffers, built from Loop, Fetch,
//             Variable and the gate-level control cluster Cluster0.  This is
//             the worked circuit of the clustering flow.
//  * the control components chosen for clustering (those without data
//    ports, except Loop), one instance each at two ports:
//      syn_* Synch, seq_* SequenceOptimised, con_* Concur,
//      dw_*  DecisionWait, frk_* Fork, cal_* Call.
//    They are the building blocks from which clusters of other circuits are
//    composed; their ports are brought out so that they can be driven and
//    observed directly.
//  * ex_*   : csc_example_ctrl, the small three-input, two-output
//             controller used to illustrate state coding; it is unrelated
//             to the other two parts.
// All channels are four-phase; every handshake wire is a flip-flop output on
// clk.  rst_n is an asynchronous active-low reset to the all-zero idle state.
module hs_top #(
  parameter int unsigned W = hs_pkg::BYTE_W,  // seq_par word width
  parameter int unsigned N = 2                // ports per library component
) (
  input  logic         clk,
  input  logic         rst_n,
  // seq_par
  input  logic         sp_act_req,
  output logic         sp_act_ack,
  output logic         sp_i1_req,
  input  logic         sp_i1_ack,
  input  logic [W-1:0] sp_i1_data,
  output logic         sp_o1_req,
  input  logic         sp_o1_ack,
  output logic [W-1:0] sp_o1_data,
  output logic         sp_i2_req,
  input  logic         sp_i2_ack,
  input  logic [W-1:0] sp_i2_data,
  output logic         sp_o2_req,
  input  logic         sp_o2_ack,
  output logic [W-1:0] sp_o2_data,
  // Synch
  input  logic [N-1:0] syn_inp_req,
  output logic [N-1:0] syn_inp_ack,
  output logic         syn_out_req,
  input  logic         syn_out_ack,
  // SequenceOptimised
  input  logic         seq_act_req,
  output logic         seq_act_ack,
  output logic [N-1:0] seq_out_req,
  input  logic [N-1:0] seq_out_ack,
  // Concur
  input  logic         con_act_req,
  output logic         con_act_ack,
  output logic [N-1:0] con_out_req,
  input  logic [N-1:0] con_out_ack,
  // DecisionWait
  input  logic         dw_act_req,
  output logic         dw_act_ack,
  input  logic [N-1:0] dw_inp_req,
  output logic [N-1:0] dw_inp_ack,
  output logic [N-1:0] dw_out_req,
  input  logic [N-1:0] dw_out_ack,
  // Fork
  input  logic         frk_act_req,
  output logic         frk_act_ack,
  output logic [N-1:0] frk_out_req,
  input  logic [N-1:0] frk_out_ack,
  // Call
  input  logic [N-1:0] cal_inp_req,
  output logic [N-1:0] cal_inp_ack,
  output logic         cal_out_req,
  input  logic         cal_out_ack,
  // example controller
  input  logic         ex_a,
  input  logic         ex_b,
  input  logic         ex_c,
  output logic         ex_x,
  output logic         ex_y
);

  seq_par #(.W(W)) u_seq_par (
    .clk, .rst_n,
    .act_req(sp_act_req), .act_ack(sp_act_ack),
    .i1_req(sp_i1_req), .i1_ack(sp_i1_ack), .i1_data(sp_i1_data),
    .o1_req(sp_o1_req), .o1_ack(sp_o1_ack), .o1_data(sp_o1_data),
    .i2_req(sp_i2_req), .i2_ack(sp_i2_ack), .i2_data(sp_i2_data),
    .o2_req(sp_o2_req), .o2_ack(sp_o2_ack), .o2_data(sp_o2_data)
  );

  hs_synch #(.N(N)) u_synch (
    .clk, .rst_n,
    .inp_req(syn_inp_req), .inp_ack(syn_inp_ack),
    .out_req(syn_out_req), .out_ack(syn_out_ack)
  );

  hs_sequence_optimised #(.N(N)) u_sequence (
    .clk, .rst_n,
    .act_req(seq_act_req), .act_ack(seq_act_ack),
    .out_req(seq_out_req), .out_ack(seq_out_ack)
  );

  hs_concur #(.N(N)) u_concur (
    .clk, .rst_n,
    .act_req(con_act_req), .act_ack(con_act_ack),
    .out_req(con_out_req), .out_ack(con_out_ack)
  );

  hs_decision_wait #(.N(N)) u_decision_wait (
    .clk, .rst_n,
    .act_req(dw_act_req), .act_ack(dw_act_ack),
    .inp_req(dw_inp_req), .inp_ack(dw_inp_ack),
    .out_req(dw_out_req), .out_ack(dw_out_ack)
  );

  hs_fork #(.N(N)) u_fork (
    .clk, .rst_n,
    .act_req(frk_act_req), .act_ack(frk_act_ack),
    .out_req(frk_out_req), .out_ack(frk_out_ack)
  );

  hs_call #(.N(N)) u_call (
    .clk, .rst_n,
    .inp_req(cal_inp_req), .inp_ack(cal_inp_ack),
    .out_req(cal_out_req), .out_ack(cal_out_ack)
  );

  csc_example_ctrl u_example (
    .clk, .rst_n,
    .a(ex_a), .b(ex_b), .c(ex_c), .x(ex_x), .y(ex_y)
  );

endmodule
