// Testbench helper: the two synchronized buffers built from the unclustered
// handshake netlist, i.e. with SequenceOptimised (16 -> 15 ; 10) and two
// Concur components (15 -> 14 || 12, 10 -> 9 || 7) in place of Cluster0.
// Same ports and behaviour as seq_par; used to show that clustering the
// control does not change what the circuit does.
module tb_seq_par_hcnet #(
  parameter int unsigned W = 8
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
  logic         c16_req, c16_ack, c15_req, c15_ack, c10_req, c10_ack;
  logic         rd1_req, rd1_ack, rd2_req, rd2_ack, wr1_req, wr1_ack, wr2_req, wr2_ack;
  logic         x1w_req, x1w_ack, x2w_req, x2w_ack, x1r_req, x1r_ack, x2r_req, x2r_ack;
  logic [W-1:0] x1w_data, x2w_data, x1r_data, x2r_data;

  hs_loop u_loop (.clk, .rst_n, .act_req, .act_ack, .out_req(c16_req), .out_ack(c16_ack));
  hs_sequence_optimised #(.N(2)) u_seq (.clk, .rst_n, .act_req(c16_req), .act_ack(c16_ack),
    .out_req({c10_req, c15_req}), .out_ack({c10_ack, c15_ack}));
  hs_concur #(.N(2)) u_con_rd (.clk, .rst_n, .act_req(c15_req), .act_ack(c15_ack),
    .out_req({rd2_req, rd1_req}), .out_ack({rd2_ack, rd1_ack}));
  hs_concur #(.N(2)) u_con_wr (.clk, .rst_n, .act_req(c10_req), .act_ack(c10_ack),
    .out_req({wr2_req, wr1_req}), .out_ack({wr2_ack, wr1_ack}));
  hs_fetch #(.W(W)) u_f1 (.clk, .rst_n, .act_req(rd1_req), .act_ack(rd1_ack),
    .inp_req(i1_req), .inp_ack(i1_ack), .inp_data(i1_data), .out_req(x1w_req), .out_ack(x1w_ack), .out_data(x1w_data));
  hs_fetch #(.W(W)) u_f2 (.clk, .rst_n, .act_req(rd2_req), .act_ack(rd2_ack),
    .inp_req(i2_req), .inp_ack(i2_ack), .inp_data(i2_data), .out_req(x2w_req), .out_ack(x2w_ack), .out_data(x2w_data));
  hs_variable #(.W(W), .R(1)) u_x1 (.clk, .rst_n, .wr_req(x1w_req), .wr_ack(x1w_ack), .wr_data(x1w_data),
    .rd_req(x1r_req), .rd_ack(x1r_ack), .rd_data(x1r_data));
  hs_variable #(.W(W), .R(1)) u_x2 (.clk, .rst_n, .wr_req(x2w_req), .wr_ack(x2w_ack), .wr_data(x2w_data),
    .rd_req(x2r_req), .rd_ack(x2r_ack), .rd_data(x2r_data));
  hs_fetch #(.W(W)) u_f3 (.clk, .rst_n, .act_req(wr1_req), .act_ack(wr1_ack),
    .inp_req(x1r_req), .inp_ack(x1r_ack), .inp_data(x1r_data), .out_req(o1_req), .out_ack(o1_ack), .out_data(o1_data));
  hs_fetch #(.W(W)) u_f4 (.clk, .rst_n, .act_req(wr2_req), .act_ack(wr2_ack),
    .inp_req(x2r_req), .inp_ack(x2r_ack), .inp_data(x2r_data), .out_req(o2_req), .out_ack(o2_ack), .out_data(o2_data));
endmodule
