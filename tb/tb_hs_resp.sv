// Testbench helper: passive end of a four-phase channel.
// Answers every request edge with the matching acknowledge edge after a
// random wait of 0..MAXD clocks.  done counts completed cycles (incremented
// when ack falls), so during a cycle it is the index of that cycle.
module tb_hs_resp #(
  parameter int unsigned MAXD = 3
) (
  input  logic clk,
  input  logic rst_n,
  input  logic req,
  output logic ack,
  output int   done
);
  int unsigned wait_left;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ack       <= 1'b0;
      done      <= 0;
      wait_left <= 0;
    end else if (req != ack) begin
      if (wait_left == 0) begin
        ack       <= req;
        if (!req) done <= done + 1;
        wait_left <= $urandom_range(MAXD, 0);
      end else begin
        wait_left <= wait_left - 1;
      end
    end
  end
endmodule
