// End-to-end test of hs_top at its default parameters (8-bit words, two
// ports per component).
// seq_par: activated once, fed by random-delay pull sources with the words
// a(k) = k*37+5 and b(k) = k*91+200 (mod 256), drained by random-delay push
// sinks; every delivered word is compared with the expected one.
// Each library component is run against random-delay drivers and
// responders and its defining rule is checked every clock:
//   Synch              output requested only when both inputs requested
//   SequenceOptimised  second output starts only after the first finished
//   Concur             act_ack only after both outputs completed
//   DecisionWait       output i only inside the handshake of input i
//   Fork               act_ack only when both outputs acknowledged
//   Call               each output cycle answers exactly one caller
// The example state-coding controller is run through complete cycles of
// its specification by tb_csc_env, which checks every output move.
// Every mechanism is counted and must have happened at least once: word
// transfers on both buffers, overlapping reads and writes inside seq_par
// (the concurrency of the cluster), joins, sequencing, concurrent overlap,
// both decisions, forks, both callers, and complete cycles of the example
// controller.  Four-phase rules are checked
// on every external channel.
module tb_hs_top;
  localparam int W = 8;
  localparam int N = 2;
  localparam int ITER = 40;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL t=%0t %s", $time, what); end
  endtask

  // ---------------------------------------------------------------- ports
  logic         sp_act_req, sp_act_ack;
  logic [3:0]   sp_req, sp_ack, sp_ack_q;   // i1, i2, o1, o2
  logic [W-1:0] sp_i1_data, sp_i2_data, sp_o1_data, sp_o2_data;
  logic [N-1:0] syn_inp_req, syn_inp_ack;  logic syn_out_req, syn_out_ack;
  logic         seq_act_req, seq_act_ack;  logic [N-1:0] seq_out_req, seq_out_ack;
  logic         con_act_req, con_act_ack;  logic [N-1:0] con_out_req, con_out_ack;
  logic         dw_act_req, dw_act_ack;    logic [N-1:0] dw_inp_req, dw_inp_ack, dw_out_req, dw_out_ack;
  logic         frk_act_req, frk_act_ack;  logic [N-1:0] frk_out_req, frk_out_ack;
  logic [N-1:0] cal_inp_req, cal_inp_ack;  logic cal_out_req, cal_out_ack;
  logic         ex_a, ex_b, ex_c, ex_x, ex_y;
  int           ex_cycles, ex_checks, ex_failures;

  hs_top dut (
    .clk, .rst_n,
    .sp_act_req, .sp_act_ack,
    .sp_i1_req(sp_req[0]), .sp_i1_ack(sp_ack[0]), .sp_i1_data,
    .sp_o1_req(sp_req[2]), .sp_o1_ack(sp_ack[2]), .sp_o1_data,
    .sp_i2_req(sp_req[1]), .sp_i2_ack(sp_ack[1]), .sp_i2_data,
    .sp_o2_req(sp_req[3]), .sp_o2_ack(sp_ack[3]), .sp_o2_data,
    .syn_inp_req, .syn_inp_ack, .syn_out_req, .syn_out_ack,
    .seq_act_req, .seq_act_ack, .seq_out_req, .seq_out_ack,
    .con_act_req, .con_act_ack, .con_out_req, .con_out_ack,
    .dw_act_req, .dw_act_ack, .dw_inp_req, .dw_inp_ack, .dw_out_req, .dw_out_ack,
    .frk_act_req, .frk_act_ack, .frk_out_req, .frk_out_ack,
    .cal_inp_req, .cal_inp_ack, .cal_out_req, .cal_out_ack,
    .ex_a, .ex_b, .ex_c, .ex_x, .ex_y
  );

  tb_csc_env #(.CYCLES(ITER)) u_ex_env (
    .clk, .rst_n, .a(ex_a), .b(ex_b), .c(ex_c), .x(ex_x), .y(ex_y),
    .cycles_done(ex_cycles), .checks(ex_checks), .failures(ex_failures)
  );

  // ----------------------------------------------------------- environment
  logic en, en_dw_act;
  logic [N-1:0] en_dw, en_cal;
  int sp_done [4], syn_done [N], syn_out_done, seq_done, seq_out_done [N], con_done, con_out_done [N];
  int dw_done, dw_inp_done [N], dw_out_done [N], frk_done, frk_out_done [N], cal_done [N], cal_out_done;
  int mon_err [30], mon_cyc [30];

  function automatic logic [W-1:0] a_word(input int k); return W'(k * 37 + 5);   endfunction
  function automatic logic [W-1:0] b_word(input int k); return W'(k * 91 + 200); endfunction
  assign sp_i1_data = sp_ack[0] ? a_word(sp_done[0]) : 8'hxx;
  assign sp_i2_data = sp_ack[1] ? b_word(sp_done[1]) : 8'hxx;

  for (genvar i = 0; i < 4; i++) begin : g_sp
    tb_hs_resp #(.MAXD(5)) u_r (.clk, .rst_n, .req(sp_req[i]), .ack(sp_ack[i]), .done(sp_done[i]));
    tb_hs_mon  u_m (.clk, .rst_n, .req(sp_req[i]), .ack(sp_ack[i]), .errors(mon_err[i]), .cycles(mon_cyc[i]));
  end
  for (genvar i = 0; i < N; i++) begin : g_lib
    tb_hs_drv  #(.MAXD(4)) u_syn (.clk, .rst_n, .en, .req(syn_inp_req[i]), .ack(syn_inp_ack[i]), .done(syn_done[i]));
    tb_hs_resp #(.MAXD(4)) u_seq (.clk, .rst_n, .req(seq_out_req[i]), .ack(seq_out_ack[i]), .done(seq_out_done[i]));
    tb_hs_resp #(.MAXD(6)) u_con (.clk, .rst_n, .req(con_out_req[i]), .ack(con_out_ack[i]), .done(con_out_done[i]));
    tb_hs_drv  #(.MAXD(4)) u_dwi (.clk, .rst_n, .en(en_dw[i]), .req(dw_inp_req[i]), .ack(dw_inp_ack[i]), .done(dw_inp_done[i]));
    tb_hs_resp #(.MAXD(4)) u_dwo (.clk, .rst_n, .req(dw_out_req[i]), .ack(dw_out_ack[i]), .done(dw_out_done[i]));
    tb_hs_resp #(.MAXD(5)) u_frk (.clk, .rst_n, .req(frk_out_req[i]), .ack(frk_out_ack[i]), .done(frk_out_done[i]));
    tb_hs_drv  #(.MAXD(5)) u_cal (.clk, .rst_n, .en(en_cal[i]), .req(cal_inp_req[i]), .ack(cal_inp_ack[i]), .done(cal_done[i]));
    tb_hs_mon u_m0 (.clk, .rst_n, .req(syn_inp_req[i]), .ack(syn_inp_ack[i]), .errors(mon_err[4+i]),  .cycles(mon_cyc[4+i]));
    tb_hs_mon u_m1 (.clk, .rst_n, .req(seq_out_req[i]), .ack(seq_out_ack[i]), .errors(mon_err[6+i]),  .cycles(mon_cyc[6+i]));
    tb_hs_mon u_m2 (.clk, .rst_n, .req(con_out_req[i]), .ack(con_out_ack[i]), .errors(mon_err[8+i]),  .cycles(mon_cyc[8+i]));
    tb_hs_mon u_m3 (.clk, .rst_n, .req(dw_inp_req[i]),  .ack(dw_inp_ack[i]),  .errors(mon_err[10+i]), .cycles(mon_cyc[10+i]));
    tb_hs_mon u_m4 (.clk, .rst_n, .req(dw_out_req[i]),  .ack(dw_out_ack[i]),  .errors(mon_err[12+i]), .cycles(mon_cyc[12+i]));
    tb_hs_mon u_m5 (.clk, .rst_n, .req(frk_out_req[i]), .ack(frk_out_ack[i]), .errors(mon_err[14+i]), .cycles(mon_cyc[14+i]));
    tb_hs_mon u_m6 (.clk, .rst_n, .req(cal_inp_req[i]), .ack(cal_inp_ack[i]), .errors(mon_err[16+i]), .cycles(mon_cyc[16+i]));
  end
  tb_hs_resp #(.MAXD(3)) u_syn_o (.clk, .rst_n, .req(syn_out_req), .ack(syn_out_ack), .done(syn_out_done));
  tb_hs_drv  #(.MAXD(4)) u_seq_a (.clk, .rst_n, .en, .req(seq_act_req), .ack(seq_act_ack), .done(seq_done));
  tb_hs_drv  #(.MAXD(4)) u_con_a (.clk, .rst_n, .en, .req(con_act_req), .ack(con_act_ack), .done(con_done));
  tb_hs_drv  #(.MAXD(4)) u_dw_a  (.clk, .rst_n, .en(en_dw_act), .req(dw_act_req), .ack(dw_act_ack), .done(dw_done));
  tb_hs_drv  #(.MAXD(4)) u_frk_a (.clk, .rst_n, .en, .req(frk_act_req), .ack(frk_act_ack), .done(frk_done));
  tb_hs_resp #(.MAXD(3)) u_cal_o (.clk, .rst_n, .req(cal_out_req), .ack(cal_out_ack), .done(cal_out_done));
  tb_hs_mon u_m7  (.clk, .rst_n, .req(syn_out_req), .ack(syn_out_ack), .errors(mon_err[18]), .cycles(mon_cyc[18]));
  tb_hs_mon u_m8  (.clk, .rst_n, .req(seq_act_req), .ack(seq_act_ack), .errors(mon_err[19]), .cycles(mon_cyc[19]));
  tb_hs_mon u_m9  (.clk, .rst_n, .req(con_act_req), .ack(con_act_ack), .errors(mon_err[20]), .cycles(mon_cyc[20]));
  tb_hs_mon u_m10 (.clk, .rst_n, .req(dw_act_req),  .ack(dw_act_ack),  .errors(mon_err[21]), .cycles(mon_cyc[21]));
  tb_hs_mon u_m11 (.clk, .rst_n, .req(frk_act_req), .ack(frk_act_ack), .errors(mon_err[22]), .cycles(mon_cyc[22]));
  tb_hs_mon u_m12 (.clk, .rst_n, .req(cal_out_req), .ack(cal_out_ack), .errors(mon_err[23]), .cycles(mon_cyc[23]));
  tb_hs_mon u_m13 (.clk, .rst_n, .req(sp_act_req),  .ack(sp_act_ack),  .errors(mon_err[24]), .cycles(mon_cyc[24]));

  // -------------------------------------------------------------- checking
  int n_rd_overlap = 0, n_wr_overlap = 0, n_join = 0, n_seq = 0, n_con_overlap = 0;
  int n_fork = 0, n_words = 0;
  logic [N-1:0] syn_inp_req_q, seq_out_req_q, dw_out_req_q, dw_inp_req_q, cal_inp_ack_q, frk_out_ack_q;
  logic syn_out_req_q, con_act_ack_q, frk_act_ack_q, cal_out_ack_q;

  always_ff @(posedge clk) begin
    sp_ack_q <= sp_ack;
    syn_inp_req_q <= syn_inp_req;  syn_out_req_q <= syn_out_req;
    seq_out_req_q <= seq_out_req;
    con_act_ack_q <= con_act_ack;
    dw_out_req_q  <= dw_out_req;   dw_inp_req_q <= dw_inp_req;
    frk_act_ack_q <= frk_act_ack;  frk_out_ack_q <= frk_out_ack;
    cal_inp_ack_q <= cal_inp_ack;  cal_out_ack_q <= cal_out_ack;
    if (rst_n) begin
      // seq_par
      check(!sp_act_ack, "seq_par activation acknowledged");
      if (sp_ack[2] && !sp_ack_q[2]) begin
        check(sp_o1_data == a_word(sp_done[2]), "o1 word wrong");
        n_words <= n_words + 1;
      end
      if (sp_ack[3] && !sp_ack_q[3]) check(sp_o2_data == b_word(sp_done[3]), "o2 word wrong");
      if (sp_ack[0] && sp_ack[1]) n_rd_overlap <= n_rd_overlap + 1;
      if (sp_ack[2] && sp_ack[3]) n_wr_overlap <= n_wr_overlap + 1;
      // Synch
      if (syn_out_req && !syn_out_req_q) begin
        check(&syn_inp_req_q, "synch output requested before both inputs");
        n_join <= n_join + 1;
      end
      // SequenceOptimised
      if (seq_out_req[1] && !seq_out_req_q[1]) begin
        check(seq_out_done[0] == seq_done + 1 && !seq_out_ack[0], "sequence: second output before the first finished");
        n_seq <= n_seq + 1;
      end
      check(!((seq_out_req[0] | seq_out_ack[0]) && (seq_out_req[1] | seq_out_ack[1])), "sequence: outputs overlap");
      // Concur
      if (con_act_ack && !con_act_ack_q)
        check(con_out_done[0] == con_done + 1 && con_out_done[1] == con_done + 1, "concur: act_ack before both outputs completed");
      if (&con_out_ack) n_con_overlap <= n_con_overlap + 1;
      // DecisionWait
      for (int i = 0; i < N; i++)
        if (dw_out_req[i] && !dw_out_req_q[i]) check(dw_inp_req_q[i] && dw_act_req, "decision: output without its input");
      // Fork
      if (frk_act_ack && !frk_act_ack_q) begin
        check(&frk_out_ack_q, "fork: act_ack before both outputs acknowledged");
        n_fork <= n_fork + 1;
      end
      // Call
      check($countones(cal_inp_ack) <= 1, "call: two callers acknowledged");
      for (int i = 0; i < N; i++)
        if (cal_inp_ack[i] && !cal_inp_ack_q[i]) check(cal_out_ack_q, "call: caller acknowledged before the output");
    end
  end

  initial begin
    en = 1'b0; en_dw_act = 1'b0; en_dw = '0; en_cal = '0; sp_act_req = 1'b0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    sp_act_req = 1'b1;
    en = 1'b1;
    en_dw_act = 1'b1;
    for (int k = 0; k < ITER; k++) begin
      automatic int c = k % N;
      automatic int prev_done = dw_inp_done[c];
      en_dw[c] = 1'b1;
      en_cal = (k % 4 == 3) ? '1 : (N'(1) << $urandom_range(N - 1, 0));
      wait (dw_inp_req[c]);
      @(posedge clk);
      en_dw[c] = 1'b0;
      wait (dw_inp_done[c] == prev_done + 1);
      @(posedge clk);
    end
    wait (sp_done[2] >= ITER && sp_done[3] >= ITER && ex_cycles >= ITER);
    en = 1'b0; en_cal = '0; en_dw_act = 1'b0;
    repeat (80) @(posedge clk);
    for (int i = 0; i < 25; i++) check(mon_err[i] == 0, $sformatf("four-phase rule broken on channel %0d", i));
    check(syn_done[0] == syn_out_done && syn_done[1] == syn_out_done, "synch cycles differ");
    check(seq_out_done[0] == seq_done && seq_out_done[1] == seq_done, "sequence cycles differ");
    check(con_out_done[0] == con_done && con_out_done[1] == con_done, "concur cycles differ");
    check(frk_out_done[0] == frk_done && frk_out_done[1] == frk_done, "fork cycles differ");
    check(dw_done == dw_out_done[0] + dw_out_done[1], "decision cycles differ");
    check(cal_out_done == cal_done[0] + cal_done[1], "call cycles differ");
    $display("mechanisms: words=%0d read_overlap=%0d write_overlap=%0d join=%0d sequence=%0d concur_overlap=%0d decision0=%0d decision1=%0d fork=%0d call0=%0d call1=%0d example_cycles=%0d",
             n_words, n_rd_overlap, n_wr_overlap, n_join, n_seq, n_con_overlap, dw_out_done[0], dw_out_done[1], n_fork, cal_done[0], cal_done[1], ex_cycles);
    check(n_words >= ITER, "seq_par transfers missing");
    check(n_rd_overlap > 0, "seq_par reads never overlapped");
    check(n_wr_overlap > 0, "seq_par writes never overlapped");
    check(n_join > 0, "synch never joined");
    check(n_seq > 0, "sequence never advanced");
    check(n_con_overlap > 0, "concur outputs never overlapped");
    check(dw_out_done[0] > 0 && dw_out_done[1] > 0, "a decision was never taken");
    check(n_fork > 0, "fork never completed");
    check(cal_done[0] > 0 && cal_done[1] > 0, "a caller was never served");
    check(ex_cycles == ITER, "example controller cycles missing");
    checks   += ex_checks;
    failures += ex_failures;
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
