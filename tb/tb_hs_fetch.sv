// Self-checking test of hs_fetch (8 bits).
// A random-delay driver activates the fetch, a random-delay pull source
// answers the input with the word f(k) = k*29+7 (mod 256) for transfer k,
// and a random-delay push sink takes the output.  Checked: the pushed word
// equals the pulled one for every transfer; the input is requested only
// after activation, the output only after the input answered, act_ack only
// after the output answered, the requests are withdrawn only after act_req
// fell, and act_ack falls only after both channels are back at zero.
module tb_hs_fetch;
  localparam int W = 8;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic         act_req, act_ack, inp_req, inp_ack, out_req, out_ack, en;
  logic         act_req_q, act_ack_q, inp_req_q, inp_ack_q, out_req_q, out_ack_q;
  logic [W-1:0] inp_data, out_data;
  int           act_done, inp_done, out_done, mon_err [3], mon_cyc [3], words_ok;

  function automatic logic [W-1:0] word(input int k);
    return W'(k * 29 + 7);
  endfunction

  hs_fetch #(.W(W)) dut (.clk, .rst_n, .act_req, .act_ack, .inp_req, .inp_ack, .inp_data, .out_req, .out_ack, .out_data);

  tb_hs_drv  #(.MAXD(4)) u_drv (.clk, .rst_n, .en, .req(act_req), .ack(act_ack), .done(act_done));
  tb_hs_resp #(.MAXD(4)) u_src (.clk, .rst_n, .req(inp_req), .ack(inp_ack), .done(inp_done));
  tb_hs_resp #(.MAXD(4)) u_snk (.clk, .rst_n, .req(out_req), .ack(out_ack), .done(out_done));
  tb_hs_mon u_mon0 (.clk, .rst_n, .req(act_req), .ack(act_ack), .errors(mon_err[0]), .cycles(mon_cyc[0]));
  tb_hs_mon u_mon1 (.clk, .rst_n, .req(inp_req), .ack(inp_ack), .errors(mon_err[1]), .cycles(mon_cyc[1]));
  tb_hs_mon u_mon2 (.clk, .rst_n, .req(out_req), .ack(out_ack), .errors(mon_err[2]), .cycles(mon_cyc[2]));

  // the source drives its word only while it acknowledges
  assign inp_data = inp_ack ? word(inp_done) : 8'hxx;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL t=%0t %s", $time, what); end
  endtask

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) words_ok <= 0;
    else begin
      if (out_ack && !out_ack_q) begin
        check(out_data == word(out_done), $sformatf("word %0d: got %h", out_done, out_data));
        if (out_data == word(out_done)) words_ok <= words_ok + 1;
      end
    end
  end

  always_ff @(posedge clk) begin
    act_req_q <= act_req; act_ack_q <= act_ack;
    inp_req_q <= inp_req; inp_ack_q <= inp_ack;
    out_req_q <= out_req; out_ack_q <= out_ack;
    if (rst_n) begin
      if (inp_req && !inp_req_q) check(act_req_q, "input requested without activation");
      if (out_req && !out_req_q) check(inp_ack_q, "output requested before the input answered");
      if (act_ack && !act_ack_q) check(out_ack_q, "act_ack before the output answered");
      if (!inp_req && inp_req_q) check(!act_req_q, "input withdrawn before act_req fell");
      if (!out_req && out_req_q) check(!act_req_q, "output withdrawn before act_req fell");
      if (!act_ack && act_ack_q) check(!inp_ack_q && !out_ack_q, "act_ack fell before both channels returned to zero");
    end
  end

  initial begin
    en = 1'b1;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (act_done >= 50);
    en = 1'b0;
    repeat (60) @(posedge clk);
    for (int i = 0; i < 3; i++) check(mon_err[i] == 0, "four-phase rule broken");
    check(inp_done == act_done && out_done == act_done, "transfers differ from activations");
    check(words_ok == act_done, "not every word arrived intact");
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
