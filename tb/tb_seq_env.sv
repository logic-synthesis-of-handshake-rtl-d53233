// Testbench helper: drives and checks one hs_sequence_optimised instance of
// N ports (see tb_hs_sequence_optimised).  Counts its own checks and
// failures; the end-of-run count checks are made when en falls.
module tb_seq_env #(
  parameter int N = 2
) (
  input logic clk,
  input logic rst_n,
  input logic en
);
  int checks = 0, failures = 0;
  logic         act_req, act_ack, act_req_q, act_ack_q;
  logic [N-1:0] out_req, out_ack, out_req_q, out_ack_q;
  int           act_done, resp_done [N], mon_err [N+1], mon_cyc [N+1];

  hs_sequence_optimised #(.N(N)) dut (.clk, .rst_n, .act_req, .act_ack, .out_req, .out_ack);

  tb_hs_drv #(.MAXD(4)) u_drv (.clk, .rst_n, .en, .req(act_req), .ack(act_ack), .done(act_done));
  tb_hs_mon u_mon_act (.clk, .rst_n, .req(act_req), .ack(act_ack), .errors(mon_err[N]), .cycles(mon_cyc[N]));
  for (genvar i = 0; i < N; i++) begin : g_out
    tb_hs_resp #(.MAXD(4)) u_resp (.clk, .rst_n, .req(out_req[i]), .ack(out_ack[i]), .done(resp_done[i]));
    tb_hs_mon u_mon (.clk, .rst_n, .req(out_req[i]), .ack(out_ack[i]), .errors(mon_err[i]), .cycles(mon_cyc[i]));
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL N=%0d t=%0t %s", N, $time, what); end
  endtask

  function automatic int busy(input logic [N-1:0] r, input logic [N-1:0] a);
    int b = 0;
    for (int i = 0; i < N; i++) if (r[i] || a[i]) b++;
    return b;
  endfunction

  always_ff @(posedge clk) begin
    act_req_q <= act_req;
    act_ack_q <= act_ack;
    out_req_q <= out_req;
    out_ack_q <= out_ack;
    if (rst_n) begin
      check(busy(out_req, out_ack) <= 1, "two outputs active at once");
      for (int i = 1; i < N; i++)
        if (out_req[i] && !out_req_q[i])
          check(resp_done[i-1] == resp_done[i] + 1, "output started before its predecessor finished");
      if (act_ack && !act_ack_q) begin
        check(out_req_q[N-1] && out_ack_q[N-1], "act_ack rose outside the last output's up phase");
        for (int i = 0; i < N - 1; i++) check(resp_done[i] == act_done + 1, "act_ack rose before an earlier output completed");
      end
      if (!out_req[N-1] && out_req_q[N-1]) check(!act_req_q, "last output lowered before act_req fell");
      if (!act_ack && act_ack_q) check(!out_req_q[N-1] && !out_ack_q[N-1], "act_ack fell before the last output returned to zero");
    end
  end

  always @(negedge en) begin
    repeat (60) @(posedge clk);
    for (int i = 0; i <= N; i++) check(mon_err[i] == 0, "four-phase rule broken");
    for (int i = 0; i < N; i++) check(resp_done[i] == act_done, "output cycles differ from activations");
  end
endmodule
