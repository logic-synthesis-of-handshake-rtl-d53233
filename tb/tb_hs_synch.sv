// Self-checking test of hs_synch (N = 2).
// Two random-delay active drivers request the passive ports, a random-delay
// responder answers the output.  Checked every clock: the output request
// rises only after both inputs requested and falls only after both withdrew;
// every input acknowledge follows the output acknowledge; the four-phase
// rules hold on all channels.  At the end the number of output cycles must
// equal the number of cycles of each input.
module tb_hs_synch;
  localparam int N = 2;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [N-1:0] inp_req, inp_ack, inp_req_q;
  logic         out_req, out_ack, out_req_q, out_ack_q;
  logic [N-1:0] inp_ack_q;
  int           drv_done [N];
  int           mon_err  [N+1];
  int           mon_cyc  [N+1];
  int           resp_done;
  logic         en;

  hs_synch #(.N(N)) dut (.clk, .rst_n, .inp_req, .inp_ack, .out_req, .out_ack);

  for (genvar i = 0; i < N; i++) begin : g_in
    tb_hs_drv #(.MAXD(4)) u_drv (.clk, .rst_n, .en, .req(inp_req[i]), .ack(inp_ack[i]), .done(drv_done[i]));
    tb_hs_mon u_mon (.clk, .rst_n, .req(inp_req[i]), .ack(inp_ack[i]), .errors(mon_err[i]), .cycles(mon_cyc[i]));
  end
  tb_hs_resp #(.MAXD(3)) u_resp (.clk, .rst_n, .req(out_req), .ack(out_ack), .done(resp_done));
  tb_hs_mon u_mon_out (.clk, .rst_n, .req(out_req), .ack(out_ack), .errors(mon_err[N]), .cycles(mon_cyc[N]));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL t=%0t %s", $time, what);
    end
  endtask

  always_ff @(posedge clk) begin
    inp_req_q <= inp_req;
    inp_ack_q <= inp_ack;
    out_req_q <= out_req;
    out_ack_q <= out_ack;
    if (rst_n) begin
      if (out_req && !out_req_q) check(&inp_req_q, "out_req rose before all inputs requested");
      if (!out_req && out_req_q) check(~|inp_req_q, "out_req fell before all inputs withdrew");
      for (int i = 0; i < N; i++) begin
        if (inp_ack[i] != inp_ack_q[i]) check(inp_ack[i] == out_ack_q, "input ack does not follow output ack");
      end
    end
  end

  initial begin
    en = 1'b1;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (resp_done >= 40);
    en = 1'b0;
    repeat (60) @(posedge clk);
    for (int i = 0; i < N; i++) begin
      check(drv_done[i] == resp_done, $sformatf("port %0d: %0d cycles vs %0d output cycles", i, drv_done[i], resp_done));
      check(mon_err[i] == 0, "four-phase rule broken on an input");
    end
    check(mon_err[N] == 0, "four-phase rule broken on the output");
    check(mon_cyc[N] == resp_done, "monitor and responder disagree");
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
