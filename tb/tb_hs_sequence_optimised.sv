// Self-checking test of hs_sequence_optimised (N = 2 and N = 3).
// A random-delay driver activates port 0, random-delay responders answer
// the outputs.  Checked every clock against the published expansion:
// only one output is ever away from the idle phase, port i+1 starts only
// after port i has finished, every output but the last completes before
// act_ack rises, act_ack rises while the last output is acknowledged, the
// last output is lowered only after act_req fell, and act_ack falls only
// after the last output is back to zero.  Four-phase rules on all channels;
// one cycle per activation on every output.
module tb_hs_sequence_optimised;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL t=%0t %s", $time, what); end
  endtask

  logic en;
  tb_seq_env #(.N(2)) u_env2 (.clk, .rst_n, .en);
  tb_seq_env #(.N(3)) u_env3 (.clk, .rst_n, .en);

  initial begin
    en = 1'b1;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (u_env2.act_done >= 40 && u_env3.act_done >= 40);
    en = 1'b0;
    repeat (80) @(posedge clk);
    checks   += u_env2.checks + u_env3.checks;
    failures += u_env2.failures + u_env3.failures;
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
