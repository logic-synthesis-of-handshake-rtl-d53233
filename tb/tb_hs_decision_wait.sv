// Self-checking test of hs_decision_wait (N = 2).
// The activation is driven continuously; each input port has its own
// driver, enabled in turn so that only one of them is requesting at a time
// (the component's choice assumption), with a random choice per activation.
// Checked every clock against the published expansion: output i is
// requested only while act and input i are both requested; input i is
// acknowledged only after output i acknowledged and act is acknowledged
// with it; every edge of output i lies inside the enclosing handshake of
// input i; act_ack moves only after the chosen input's acknowledge made
// the same move; four-phase rules on all channels; the number of cycles of every
// output equals that of its input, and their sum is the number of
// activations.  Both choices must have been taken.
module tb_hs_decision_wait;
  localparam int N = 2;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic         act_req, act_ack, act_ack_q, en_act;
  logic [N-1:0] inp_req, inp_ack, out_req, out_ack, out_ack_q, out_req_q, inp_req_q, inp_ack_q;
  logic [N-1:0] en_inp;
  int           act_done, inp_done [N], resp_done [N], mon_err [2*N+1], mon_cyc [2*N+1];

  hs_decision_wait #(.N(N)) dut (.clk, .rst_n, .act_req, .act_ack, .inp_req, .inp_ack, .out_req, .out_ack);

  tb_hs_drv #(.MAXD(4)) u_drv_act (.clk, .rst_n, .en(en_act), .req(act_req), .ack(act_ack), .done(act_done));
  tb_hs_mon u_mon_act (.clk, .rst_n, .req(act_req), .ack(act_ack), .errors(mon_err[2*N]), .cycles(mon_cyc[2*N]));
  for (genvar i = 0; i < N; i++) begin : g_port
    tb_hs_drv #(.MAXD(4)) u_drv (.clk, .rst_n, .en(en_inp[i]), .req(inp_req[i]), .ack(inp_ack[i]), .done(inp_done[i]));
    tb_hs_resp #(.MAXD(4)) u_resp (.clk, .rst_n, .req(out_req[i]), .ack(out_ack[i]), .done(resp_done[i]));
    tb_hs_mon u_mon_i (.clk, .rst_n, .req(inp_req[i]), .ack(inp_ack[i]), .errors(mon_err[i]), .cycles(mon_cyc[i]));
    tb_hs_mon u_mon_o (.clk, .rst_n, .req(out_req[i]), .ack(out_ack[i]), .errors(mon_err[N+i]), .cycles(mon_cyc[N+i]));
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
    out_req_q <= out_req;
    inp_req_q <= inp_req;
    inp_ack_q <= inp_ack;
    if (rst_n) begin
      for (int i = 0; i < N; i++) begin
        if (out_req[i] && !out_req_q[i]) check(act_req_q && inp_req_q[i], "output requested without act and its input");
        if (!out_req[i] && out_req_q[i]) check(!act_req_q && !inp_req_q[i], "output withdrawn before act and its input fell");
        if (out_req[i] || out_ack[i]) check(inp_req[i] || inp_ack[i], "output active outside its input handshake");
        if (inp_ack[i] != inp_ack_q[i]) check(inp_ack[i] == out_ack_q[i], "input ack does not follow its output ack");
      end
      if (act_ack != act_ack_q) check(act_ack == |inp_ack_q && act_ack == |inp_ack, "act_ack does not follow the chosen input's acknowledge");
    end
  end

  int choice_count [N];
  initial begin
    for (int i = 0; i < N; i++) choice_count[i] = 0;
    en_act = 1'b1;
    en_inp = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < 40; k++) begin
      automatic int c = $urandom_range(N - 1, 0);
      automatic int prev_done = inp_done[c];
      choice_count[c]++;
      en_inp[c] = 1'b1;
      wait (inp_req[c]);
      @(posedge clk);
      en_inp[c] = 1'b0;
      wait (inp_done[c] == prev_done + 1);
      @(posedge clk);
    end
    en_act = 1'b0;
    repeat (60) @(posedge clk);
    for (int i = 0; i < 2 * N + 1; i++) check(mon_err[i] == 0, "four-phase rule broken");
    for (int i = 0; i < N; i++) begin
      check(resp_done[i] == inp_done[i], "output cycles differ from input cycles");
      check(inp_done[i] == choice_count[i], "input cycles differ from the choices made");
      check(choice_count[i] > 0, "a choice was never taken");
    end
    check(act_done == resp_done[0] + resp_done[1], "activations differ from decisions");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
