// Self-checking test of hs_loop.
// Before activation the output must stay idle.  After one activation
// request the output must run cycle after cycle (checked over a fixed
// window against a random-delay responder: the number of cycles must grow
// steadily and the four-phase rules must hold), and the activation must
// never be acknowledged.
module tb_hs_loop;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic act_req, act_ack, out_req, out_ack;
  int   resp_done, mon_err, mon_cyc;

  hs_loop dut (.clk, .rst_n, .act_req, .act_ack, .out_req, .out_ack);
  tb_hs_resp #(.MAXD(3)) u_resp (.clk, .rst_n, .req(out_req), .ack(out_ack), .done(resp_done));
  tb_hs_mon u_mon (.clk, .rst_n, .req(out_req), .ack(out_ack), .errors(mon_err), .cycles(mon_cyc));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL t=%0t %s", $time, what); end
  endtask

  always_ff @(posedge clk) if (rst_n) check(!act_ack, "activation acknowledged");

  initial begin
    int c0;
    act_req = 1'b0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (20) @(posedge clk);
    check(!out_req && resp_done == 0, "output ran before activation");
    act_req = 1'b1;
    for (int k = 0; k < 5; k++) begin
      c0 = resp_done;
      repeat (100) @(posedge clk);
      // one cycle takes 4 edges of at most 1 + 3 clocks each
      check(resp_done - c0 >= 100 / 16, $sformatf("only %0d cycles in 100 clocks", resp_done - c0));
    end
    check(mon_err == 0, "four-phase rule broken");
    check(mon_cyc == resp_done, "monitor and responder disagree");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
