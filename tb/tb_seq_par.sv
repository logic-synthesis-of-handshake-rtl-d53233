// Self-checking test of seq_par, the two synchronized buffers.
// After one activation request, random-delay pull sources offer the words
// a(k) = k*37+5 and b(k) = k*91+200 (mod 256) on i1 and i2, and random-
// delay push sinks take o1 and o2.  Checked: o1 delivers a(0), a(1), ... and
// o2 delivers b(0), b(1), ... in order; the k-th outputs start only after
// both k-th inputs were taken; the (k+1)-th inputs are requested only after
// both k-th outputs completed; the activation is never acknowledged; the
// four-phase rules hold on the four external channels.
module tb_seq_par;
  localparam int W = 8;
  localparam int ITER = 50;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic         act_req, act_ack;
  logic [3:0]   req, ack, req_q, ack_q;   // 0 i1, 1 i2, 2 o1, 3 o2
  logic [W-1:0] i1_data, i2_data, o1_data, o2_data;
  int           done [4], mon_err [4], mon_cyc [4];

  function automatic logic [W-1:0] a_word(input int k); return W'(k * 37 + 5);   endfunction
  function automatic logic [W-1:0] b_word(input int k); return W'(k * 91 + 200); endfunction

  seq_par dut (
    .clk, .rst_n, .act_req, .act_ack,
    .i1_req(req[0]), .i1_ack(ack[0]), .i1_data,
    .o1_req(req[2]), .o1_ack(ack[2]), .o1_data,
    .i2_req(req[1]), .i2_ack(ack[1]), .i2_data,
    .o2_req(req[3]), .o2_ack(ack[3]), .o2_data
  );

  for (genvar i = 0; i < 4; i++) begin : g_ch
    tb_hs_resp #(.MAXD(5)) u_resp (.clk, .rst_n, .req(req[i]), .ack(ack[i]), .done(done[i]));
    tb_hs_mon u_mon (.clk, .rst_n, .req(req[i]), .ack(ack[i]), .errors(mon_err[i]), .cycles(mon_cyc[i]));
  end

  assign i1_data = ack[0] ? a_word(done[0]) : 8'hxx;
  assign i2_data = ack[1] ? b_word(done[1]) : 8'hxx;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL t=%0t %s", $time, what); end
  endtask

  always_ff @(posedge clk) begin
    req_q <= req;
    ack_q <= ack;
    if (rst_n) begin
      check(!act_ack, "activation acknowledged");
      if (ack[2] && !ack_q[2]) check(o1_data == a_word(done[2]), $sformatf("o1 word %0d: %h", done[2], o1_data));
      if (ack[3] && !ack_q[3]) check(o2_data == b_word(done[3]), $sformatf("o2 word %0d: %h", done[3], o2_data));
      for (int i = 2; i < 4; i++)
        if (req[i] && !req_q[i]) check(done[0] == done[i] + 1 && done[1] == done[i] + 1, "output started before both inputs were taken");
      for (int i = 0; i < 2; i++)
        if (req[i] && !req_q[i]) check(done[2] == done[i] && done[3] == done[i], "input requested before both outputs completed");
    end
  end

  initial begin
    act_req = 1'b0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    repeat (5) @(posedge clk);
    check(req == '0, "channels active before activation");
    act_req = 1'b1;
    wait (done[2] >= ITER && done[3] >= ITER);
    repeat (5) @(posedge clk);
    for (int i = 0; i < 4; i++) check(mon_err[i] == 0, "four-phase rule broken");
    check(done[0] - done[2] <= 1 && done[1] - done[3] <= 1, "buffers drifted apart");
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
