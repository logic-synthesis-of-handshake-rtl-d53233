// Self-checking test of hs_concur (N = 2).
// A random-delay driver activates port 0, random-delay responders answer
// the outputs.  Checked every clock against the published expansion: all
// outputs are requested together after act_req rises; act_ack rises only
// when every output has completed a full cycle for this activation; act_ack
// falls only after act_req fell; no output is requested while act is
// acknowledged.  It also counts activations in which the two outputs were
// in their up phase at the same time, to show that they really overlap.
module tb_hs_concur;
  localparam int N = 2;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, overlaps = 0;

  logic         act_req, act_ack, act_req_q, act_ack_q, en;
  logic [N-1:0] out_req, out_ack, out_req_q;
  int           act_done, resp_done [N], mon_err [N+1], mon_cyc [N+1];

  hs_concur #(.N(N)) dut (.clk, .rst_n, .act_req, .act_ack, .out_req, .out_ack);

  tb_hs_drv #(.MAXD(4)) u_drv (.clk, .rst_n, .en, .req(act_req), .ack(act_ack), .done(act_done));
  tb_hs_mon u_mon_act (.clk, .rst_n, .req(act_req), .ack(act_ack), .errors(mon_err[N]), .cycles(mon_cyc[N]));
  for (genvar i = 0; i < N; i++) begin : g_out
    tb_hs_resp #(.MAXD(6)) u_resp (.clk, .rst_n, .req(out_req[i]), .ack(out_ack[i]), .done(resp_done[i]));
    tb_hs_mon u_mon (.clk, .rst_n, .req(out_req[i]), .ack(out_ack[i]), .errors(mon_err[i]), .cycles(mon_cyc[i]));
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL t=%0t %s", $time, what); end
  endtask

  always_ff @(posedge clk) begin
    act_req_q <= act_req;
    act_ack_q <= act_ack;
    out_req_q <= out_req;
    if (rst_n) begin
      if (out_req != out_req_q && (out_req & ~out_req_q) != '0)
        check(out_req == '1 && out_req_q == '0 && act_req_q && !act_ack_q, "outputs not requested together on activation");
      if (act_ack && !act_ack_q)
        for (int i = 0; i < N; i++) check(resp_done[i] == act_done + 1 && !out_req[i] && !out_ack[i], "act_ack rose before every output completed");
      if (!act_ack && act_ack_q) check(!act_req_q, "act_ack fell before act_req fell");
      if (act_ack) check(out_req == '0, "output requested while act is acknowledged");
      if (&out_ack) overlaps <= overlaps + 1;
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
    check(overlaps > 0, "outputs never overlapped");
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
