// Self-checking test of hs_call (N = 2).
// Two random-delay callers run independently; most of the time only one is
// enabled (the component's choice assumption), but phases with both enabled
// are included so that simultaneous calls occur and must be served one
// after the other.  Checked every clock: the output is requested only while
// some caller is requested and unanswered; exactly one caller is
// acknowledged per output cycle and only after the output acknowledged; a
// caller's acknowledge falls only after the output returned to zero; every
// output cycle serves exactly one call.  Four-phase rules on all channels.
module tb_hs_call;
  localparam int N = 2;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, both_waiting = 0;

  logic [N-1:0] inp_req, inp_ack, inp_ack_q, en;
  logic         out_req, out_ack, out_req_q, out_ack_q;
  int           inp_done [N], resp_done, mon_err [N+1], mon_cyc [N+1];

  hs_call #(.N(N)) dut (.clk, .rst_n, .inp_req, .inp_ack, .out_req, .out_ack);

  for (genvar i = 0; i < N; i++) begin : g_in
    tb_hs_drv #(.MAXD(5)) u_drv (.clk, .rst_n, .en(en[i]), .req(inp_req[i]), .ack(inp_ack[i]), .done(inp_done[i]));
    tb_hs_mon u_mon (.clk, .rst_n, .req(inp_req[i]), .ack(inp_ack[i]), .errors(mon_err[i]), .cycles(mon_cyc[i]));
  end
  tb_hs_resp #(.MAXD(3)) u_resp (.clk, .rst_n, .req(out_req), .ack(out_ack), .done(resp_done));
  tb_hs_mon u_mon_out (.clk, .rst_n, .req(out_req), .ack(out_ack), .errors(mon_err[N]), .cycles(mon_cyc[N]));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL t=%0t %s", $time, what); end
  endtask

  always_ff @(posedge clk) begin
    inp_ack_q <= inp_ack;
    out_req_q <= out_req;
    out_ack_q <= out_ack;
    if (rst_n) begin
      check($countones(inp_ack) <= 1, "two callers acknowledged at once");
      if (&(inp_req & ~inp_ack)) both_waiting <= both_waiting + 1;
      for (int i = 0; i < N; i++) begin
        if (inp_ack[i] && !inp_ack_q[i]) check(out_ack_q && out_req_q, "caller acknowledged before the output acknowledged");
        if (!inp_ack[i] && inp_ack_q[i]) check(!out_ack_q && !out_req_q, "caller released before the output returned to zero");
      end
    end
  end

  initial begin
    en = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < 30; k++) begin
      en = (k % 5 == 4) ? 2'b11 : (2'b01 << $urandom_range(1, 0));
      repeat ($urandom_range(30, 5)) @(posedge clk);
    end
    en = '0;
    repeat (60) @(posedge clk);
    for (int i = 0; i <= N; i++) check(mon_err[i] == 0, "four-phase rule broken");
    check(inp_done[0] + inp_done[1] == resp_done, "output cycles differ from the calls made");
    check(inp_done[0] > 0 && inp_done[1] > 0, "a caller was never served");
    check(both_waiting > 0, "simultaneous calls never happened");
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
