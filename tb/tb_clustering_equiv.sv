// Clustering preserves behaviour: seq_par (control = gate-level Cluster0)
// and the same circuit built from the unclustered components
// (tb_seq_par_hcnet) are run side by side, each with its own random-delay
// sources and sinks offering the same word streams a(k) = k*37+5 and
// b(k) = k*91+200 (mod 256).  Both must deliver exactly those streams on o1
// and o2, in order, and both must keep the buffers synchronized (the k-th
// outputs start only after both k-th inputs were taken, and the next
// inputs are requested only after both outputs completed).  The average
// number of clocks per iteration of each version is printed for
// information; with one clock per gate event the clustered control removes
// the handshakes on the two internal channels.
module tb_clustering_equiv;
  localparam int W = 8;
  localparam int ITER = 60;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL t=%0t %s", $time, what); end
  endtask

  function automatic logic [W-1:0] a_word(input int k); return W'(k * 37 + 5);   endfunction
  function automatic logic [W-1:0] b_word(input int k); return W'(k * 91 + 200); endfunction

  logic         act_req;
  logic [1:0]   act_ack;
  logic [3:0]   req [2], ack [2], ack_q [2], req_q [2];   // per version: i1, i2, o1, o2
  logic [W-1:0] i1_data [2], i2_data [2], o1_data [2], o2_data [2];
  int           done [2][4], mon_err [2][4], mon_cyc [2][4], finish_clk [2];

  seq_par u_clustered (
    .clk, .rst_n, .act_req, .act_ack(act_ack[0]),
    .i1_req(req[0][0]), .i1_ack(ack[0][0]), .i1_data(i1_data[0]),
    .o1_req(req[0][2]), .o1_ack(ack[0][2]), .o1_data(o1_data[0]),
    .i2_req(req[0][1]), .i2_ack(ack[0][1]), .i2_data(i2_data[0]),
    .o2_req(req[0][3]), .o2_ack(ack[0][3]), .o2_data(o2_data[0])
  );
  tb_seq_par_hcnet u_unclustered (
    .clk, .rst_n, .act_req, .act_ack(act_ack[1]),
    .i1_req(req[1][0]), .i1_ack(ack[1][0]), .i1_data(i1_data[1]),
    .o1_req(req[1][2]), .o1_ack(ack[1][2]), .o1_data(o1_data[1]),
    .i2_req(req[1][1]), .i2_ack(ack[1][1]), .i2_data(i2_data[1]),
    .o2_req(req[1][3]), .o2_ack(ack[1][3]), .o2_data(o2_data[1])
  );

  for (genvar v = 0; v < 2; v++) begin : g_v
    for (genvar i = 0; i < 4; i++) begin : g_ch
      tb_hs_resp #(.MAXD(5)) u_r (.clk, .rst_n, .req(req[v][i]), .ack(ack[v][i]), .done(done[v][i]));
      tb_hs_mon  u_m (.clk, .rst_n, .req(req[v][i]), .ack(ack[v][i]), .errors(mon_err[v][i]), .cycles(mon_cyc[v][i]));
    end
    assign i1_data[v] = ack[v][0] ? a_word(done[v][0]) : 8'hxx;
    assign i2_data[v] = ack[v][1] ? b_word(done[v][1]) : 8'hxx;

    always_ff @(posedge clk) begin
      req_q[v] <= req[v];
      ack_q[v] <= ack[v];
      if (rst_n) begin
        check(!act_ack[v], "activation acknowledged");
        if (ack[v][2] && !ack_q[v][2]) check(o1_data[v] == a_word(done[v][2]), $sformatf("version %0d: o1 word %0d wrong", v, done[v][2]));
        if (ack[v][3] && !ack_q[v][3]) check(o2_data[v] == b_word(done[v][3]), $sformatf("version %0d: o2 word %0d wrong", v, done[v][3]));
        for (int i = 2; i < 4; i++)
          if (req[v][i] && !req_q[v][i]) check(done[v][0] == done[v][i] + 1 && done[v][1] == done[v][i] + 1, "output before both inputs");
        for (int i = 0; i < 2; i++)
          if (req[v][i] && !req_q[v][i]) check(done[v][2] == done[v][i] && done[v][3] == done[v][i], "input before both outputs");
      end
    end
  end

  int clk_count = 0;
  always_ff @(posedge clk) clk_count <= clk_count + 1;

  initial begin
    act_req = 1'b0;
    finish_clk[0] = 0;
    finish_clk[1] = 0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    act_req = 1'b1;
    fork
      begin wait (done[0][2] >= ITER && done[0][3] >= ITER); finish_clk[0] = clk_count; end
      begin wait (done[1][2] >= ITER && done[1][3] >= ITER); finish_clk[1] = clk_count; end
    join
    repeat (5) @(posedge clk);
    for (int v = 0; v < 2; v++)
      for (int i = 0; i < 4; i++) check(mon_err[v][i] == 0, "four-phase rule broken");
    $display("clocks per iteration: clustered %0d.%02d, unclustered %0d.%02d",
             finish_clk[0] / ITER, (finish_clk[0] * 100 / ITER) % 100,
             finish_clk[1] / ITER, (finish_clk[1] * 100 / ITER) % 100);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
