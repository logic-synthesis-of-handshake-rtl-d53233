// Testbench helper: active end of a four-phase channel.
// While en is high it runs handshake after handshake, each request edge
// after a random wait of 0..MAXD clocks once the previous edge has been
// answered.  A new cycle only starts while en is high; a started cycle is
// always finished.  done counts completed cycles (ack falling).
module tb_hs_drv #(
  parameter int unsigned MAXD = 3
) (
  input  logic clk,
  input  logic rst_n,
  input  logic en,
  output logic req,
  input  logic ack,
  output int   done
);
  int unsigned wait_left;
  logic        ack_q;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      req       <= 1'b0;
      ack_q     <= 1'b0;
      done      <= 0;
      wait_left <= 0;
    end else begin
      ack_q <= ack;
      if (ack_q && !ack) done <= done + 1;
      if (req == ack && (req || en)) begin
        if (wait_left == 0) begin
          req       <= ~req;
          wait_left <= $urandom_range(MAXD, 0);
        end else begin
          wait_left <= wait_left - 1;
        end
      end
    end
  end
endmodule
