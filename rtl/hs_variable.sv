// Variable handshake component (Balsa "variable x : byte").
//
// A storage word with one passive push port for writing (wr_*) and R passive
// pull ports for reading (rd_*).  A write request loads wr_data and is then
// acknowledged; the acknowledge falls after the request falls.  A read
// request is acknowledged one clock later with the stored word on rd_data,
// which stays valid as long as no write overlaps the read (Balsa's
// compiler never schedules the two together).
//
// The text names the component and its parameters (8 bits, one read port);
// the storage register and the one-clock answers are this design's choices.
// Reset clears the word to zero.
module hs_variable #(
  parameter int unsigned W = hs_pkg::BYTE_W,  // data width
  parameter int unsigned R = 1                // number of read ports
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         wr_req,
  output logic         wr_ack,
  input  logic [W-1:0] wr_data,
  input  logic [R-1:0] rd_req,
  output logic [R-1:0] rd_ack,
  output logic [W-1:0] rd_data
);

  logic [W-1:0] value;

  assign rd_data = value;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      value  <= '0;
      wr_ack <= 1'b0;
      rd_ack <= '0;
    end else begin
      if (wr_req && !wr_ack) begin
        value  <= wr_data;
        wr_ack <= 1'b1;
      end else if (!wr_req && wr_ack) begin
        wr_ack <= 1'b0;
      end
      rd_ack <= rd_req;
    end
  end

endmodule
