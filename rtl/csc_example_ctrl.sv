// Small asynchronous controller with a state-coding signal.
//
// Inputs a, b, c and outputs x, y follow this cyclic specification
// (";" sequence, "||" concurrency), starting with everything at 0:
//   (a+ || b+) ; (x+ || y+) ; c+ ; x- ; c- ; (x+ || y-) ; b- ;
//   (x- || y+) ; a- ; y-
// As written the specification cannot be implemented: several states share
// one code of (a b c x y) but expect different output moves (for example
// 11001 after y+ alone, where x must rise, and 11001 after c-, where x must
// rise and y must fall).  An internal signal csc0 removes these conflicts.
// Here csc0 rises after c+ and before x- (so x- waits for it), and falls
// after (x- || y+) concurrently with a-; y- waits for both a- and csc0-.
// With that encoding the next-state equations are
//   x    = a b (~c + x ~csc0)
//   y    = a b ~csc0 + csc0 (~b + c) + a ~b y
//   csc0 = c x y + csc0 (x + ~y + b)
// The specification is the published example; the place where csc0 is
// inserted, and therefore the equations, are this design's own, because
// the published csc0 placement is not available in the text.
//
// Delay model: x, y and csc0 are each one gate whose delay is one clock, so
// each is a flip-flop loaded with its equation; this is one admissible
// timing of the speed-independent circuit.  Reset: all signals 0.
module csc_example_ctrl (
  input  logic clk,
  input  logic rst_n,
  input  logic a,
  input  logic b,
  input  logic c,
  output logic x,
  output logic y
);

  logic csc0;
  logic x_d, y_d, csc0_d;

  always_comb begin
    x_d    = a & b & (~c | (x & ~csc0));
    y_d    = (a & b & ~csc0) | (csc0 & (~b | c)) | (a & ~b & y);
    csc0_d = (c & x & y) | (csc0 & (x | ~y | b));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x    <= 1'b0;
      y    <= 1'b0;
      csc0 <= 1'b0;
    end else begin
      x    <= x_d;
      y    <= y_d;
      csc0 <= csc0_d;
    end
  end

endmodule
