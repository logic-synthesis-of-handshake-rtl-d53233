// Self-checking test of seq_par_cluster0, the gate-level control cluster.
// A random-delay driver activates the cluster; random-delay responders
// answer its four active channels.  The expected behaviour is the
// composition of its three source components: for every activation
//   (rd1 full cycle || rd2 full cycle) ; (wr1 full cycle || wr2 full cycle) ;
//   act_ack+ ; act_req- ; act_ack-
// Checked every clock: read channels start only on a fresh activation and
// never together with a write channel; writes start only once both reads
// of this activation are complete; act_ack rises only after both writes of
// this activation are complete and falls only after act_req fell; nothing
// is requested while act is acknowledged.  Four-phase rules on all
// channels, one cycle of every channel per activation, and the two reads
// (and the two writes) must be seen overlapping at least once.
module tb_seq_par_cluster0;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0, rd_overlap = 0, wr_overlap = 0;

  logic       act_req, act_ack, act_req_q, act_ack_q, en;
  logic [3:0] req, ack, req_q;          // 0 rd1, 1 rd2, 2 wr1, 3 wr2
  int         act_done, done [4], mon_err [5], mon_cyc [5];

  seq_par_cluster0 dut (
    .clk, .rst_n, .act_req, .act_ack,
    .rd1_req(req[0]), .rd1_ack(ack[0]), .rd2_req(req[1]), .rd2_ack(ack[1]),
    .wr1_req(req[2]), .wr1_ack(ack[2]), .wr2_req(req[3]), .wr2_ack(ack[3])
  );

  tb_hs_drv #(.MAXD(4)) u_drv (.clk, .rst_n, .en, .req(act_req), .ack(act_ack), .done(act_done));
  tb_hs_mon u_mon_act (.clk, .rst_n, .req(act_req), .ack(act_ack), .errors(mon_err[4]), .cycles(mon_cyc[4]));
  for (genvar i = 0; i < 4; i++) begin : g_ch
    tb_hs_resp #(.MAXD(6)) u_resp (.clk, .rst_n, .req(req[i]), .ack(ack[i]), .done(done[i]));
    tb_hs_mon u_mon (.clk, .rst_n, .req(req[i]), .ack(ack[i]), .errors(mon_err[i]), .cycles(mon_cyc[i]));
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL t=%0t %s", $time, what); end
  endtask

  always_ff @(posedge clk) begin
    act_req_q <= act_req;
    act_ack_q <= act_ack;
    req_q     <= req;
    if (rst_n) begin
      for (int i = 0; i < 2; i++)
        if (req[i] && !req_q[i])
          check(act_req_q && !act_ack_q && done[i] == act_done && done[2] == act_done && done[3] == act_done,
                "read started outside a fresh activation");
      for (int i = 2; i < 4; i++)
        if (req[i] && !req_q[i])
          check(done[0] == act_done + 1 && done[1] == act_done + 1 && (req[1:0] | ack[1:0]) == '0,
                "write started before both reads completed");
      check(!((req[1:0] | ack[1:0]) != '0 && (req[3:2] | ack[3:2]) != '0), "read and write phases overlap");
      if (act_ack && !act_ack_q)
        check(done[2] == act_done + 1 && done[3] == act_done + 1 && (req | ack) == '0,
              "act_ack rose before both writes completed");
      if (!act_ack && act_ack_q) check(!act_req_q, "act_ack fell before act_req fell");
      if (act_ack) check(req == '0, "channel requested while act is acknowledged");
      if (ack[0] && ack[1]) rd_overlap <= rd_overlap + 1;
      if (ack[2] && ack[3]) wr_overlap <= wr_overlap + 1;
    end
  end

  initial begin
    en = 1'b1;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (act_done >= 60);
    en = 1'b0;
    repeat (100) @(posedge clk);
    for (int i = 0; i < 5; i++) check(mon_err[i] == 0, "four-phase rule broken");
    for (int i = 0; i < 4; i++) check(done[i] == act_done, $sformatf("channel %0d: %0d cycles for %0d activations", i, done[i], act_done));
    check(rd_overlap > 0, "reads never overlapped");
    check(wr_overlap > 0, "writes never overlapped");
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
