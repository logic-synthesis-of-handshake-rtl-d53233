// Self-checking test of hs_variable (8 bits, 2 read ports).
// Rounds of: one write of the word g(k) = k*53+11 (mod 256) through the
// push port, then a random number of reads on each pull port.  Checked:
// every read returns the last word written (0 before the first write, the
// reset value), every write is acknowledged once, every read is answered,
// and the four-phase rules hold on all ports.
module tb_hs_variable;
  localparam int W = 8;
  localparam int R = 2;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic         wr_req, wr_ack, en_w;
  logic [W-1:0] wr_data, rd_data, expected;
  logic [R-1:0] rd_req, rd_ack, rd_ack_q, en_r;
  int           wr_done, rd_done [R], mon_err [R+1], mon_cyc [R+1], reads;

  function automatic logic [W-1:0] word(input int k);
    return W'(k * 53 + 11);
  endfunction

  hs_variable #(.W(W), .R(R)) dut (.clk, .rst_n, .wr_req, .wr_ack, .wr_data, .rd_req, .rd_ack, .rd_data);

  tb_hs_drv #(.MAXD(3)) u_wr (.clk, .rst_n, .en(en_w), .req(wr_req), .ack(wr_ack), .done(wr_done));
  tb_hs_mon u_mon_w (.clk, .rst_n, .req(wr_req), .ack(wr_ack), .errors(mon_err[R]), .cycles(mon_cyc[R]));
  for (genvar i = 0; i < R; i++) begin : g_rd
    tb_hs_drv #(.MAXD(3)) u_rd (.clk, .rst_n, .en(en_r[i]), .req(rd_req[i]), .ack(rd_ack[i]), .done(rd_done[i]));
    tb_hs_mon u_mon (.clk, .rst_n, .req(rd_req[i]), .ack(rd_ack[i]), .errors(mon_err[i]), .cycles(mon_cyc[i]));
  end

  assign wr_data = wr_req ? word(wr_done) : 8'hxx;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL t=%0t %s", $time, what); end
  endtask

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      reads    <= 0;
      rd_ack_q <= '0;
    end else begin
      rd_ack_q <= rd_ack;
      for (int i = 0; i < R; i++)
        if (rd_ack[i] && !rd_ack_q[i])
          check(rd_data == expected, $sformatf("read port %0d got %h, expected %h", i, rd_data, expected));
      reads <= reads + $countones(rd_ack & ~rd_ack_q);
    end
  end

  initial begin
    int target;
    en_w = 1'b0;
    en_r = '0;
    expected = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < 30; k++) begin
      // reads of the current value
      target = rd_done[0] + 1 + $urandom_range(2, 0);
      en_r = '1;
      wait (rd_done[0] >= target);
      en_r = '0;
      wait (!rd_req[1] && !rd_ack[1] && !rd_req[0] && !rd_ack[0]);
      @(posedge clk);
      // one write
      en_w = 1'b1;
      wait (wr_req);
      @(posedge clk);
      en_w = 1'b0;
      wait (wr_done == k + 1);
      expected = word(k);
      @(posedge clk);
    end
    repeat (20) @(posedge clk);
    for (int i = 0; i <= R; i++) check(mon_err[i] == 0, "four-phase rule broken");
    check(wr_done == 30, "writes lost");
    check(reads == rd_done[0] + rd_done[1], "reads not all answered");
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
