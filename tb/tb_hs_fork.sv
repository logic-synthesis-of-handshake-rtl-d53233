// Self-checking test of hs_fork (N = 2).
// A random-delay driver activates port 0, random-delay responders answer
// the outputs.  Checked every clock: the output requests follow act_req;
// act_ack rises only when every output has acknowledged and falls only when
// every output acknowledge has fallen; four-phase rules on all channels;
// one output cycle per activation on every output.
module tb_hs_fork;
  localparam int N = 2;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic         act_req, act_ack, act_ack_q, en;
  logic [N-1:0] out_req, out_ack, out_ack_q;
  int           act_done, resp_done [N], mon_err [N+1], mon_cyc [N+1];

  hs_fork #(.N(N)) dut (.clk, .rst_n, .act_req, .act_ack, .out_req, .out_ack);

  tb_hs_drv #(.MAXD(4)) u_drv (.clk, .rst_n, .en, .req(act_req), .ack(act_ack), .done(act_done));
  tb_hs_mon u_mon_act (.clk, .rst_n, .req(act_req), .ack(act_ack), .errors(mon_err[N]), .cycles(mon_cyc[N]));
  for (genvar i = 0; i < N; i++) begin : g_out
    tb_hs_resp #(.MAXD(5)) u_resp (.clk, .rst_n, .req(out_req[i]), .ack(out_ack[i]), .done(resp_done[i]));
    tb_hs_mon u_mon (.clk, .rst_n, .req(out_req[i]), .ack(out_ack[i]), .errors(mon_err[i]), .cycles(mon_cyc[i]));
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL t=%0t %s", $time, what); end
  endtask

  logic act_req_q;
  always_ff @(posedge clk) begin
    act_req_q <= act_req;
    act_ack_q <= act_ack;
    out_ack_q <= out_ack;
    if (rst_n) begin
      check(out_req == {N{act_req_q}}, "output requests do not follow act_req");
      if (act_ack && !act_ack_q) check(&out_ack_q, "act_ack rose before all outputs acknowledged");
      if (!act_ack && act_ack_q) check(~|out_ack_q, "act_ack fell before all outputs returned to zero");
    end
  end

  initial begin
    en = 1'b1;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (act_done >= 40);
    en = 1'b0;
    repeat (60) @(posedge clk);
    for (int i = 0; i <= N; i++) check(mon_err[i] == 0, "four-phase rule broken");
    for (int i = 0; i < N; i++) check(resp_done[i] == act_done, "output cycles differ from activations");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
