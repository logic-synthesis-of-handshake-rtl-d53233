// Self-checking test of csc_example_ctrl.
// The testbench plays the environment of the specification
//   (a+ || b+) ; (x+ || y+) ; c+ ; x- ; c- ; (x+ || y-) ; b- ;
//   (x- || y+) ; a- ; y-
// with random delays before each input move and a random order of a+ and
// b+.  It tracks in which step of the cycle it is and checks every clock
// that the outputs only make the moves that step allows (x and y wait for
// both a and b, y holds while c is high, x may not rise again before c
// fell, and so on).  Every cycle must complete; the number of completed
// cycles and of each output move is checked at the end.
module tb_csc_example_ctrl;
  localparam int CYCLES = 60;
  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic a, b, c, x, y, x_q, y_q;
  int   step, cycles_done, wait_left, x_moves, y_moves;

  csc_example_ctrl dut (.clk, .rst_n, .a, .b, .c, .x, .y);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL t=%0t step %0d: %s", $time, step, what); end
  endtask

  // step: 0 raising a,b   1 waiting x+,y+   2 waiting x-   3 waiting x+,y-
  //       4 waiting x-,y+ 5 waiting y-
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a <= 1'b0; b <= 1'b0; c <= 1'b0;
      x_q <= 1'b0; y_q <= 1'b0;
      step <= 0; cycles_done <= 0; wait_left <= 0; x_moves <= 0; y_moves <= 0;
    end else begin
      x_q <= x;
      y_q <= y;
      if (x != x_q) x_moves <= x_moves + 1;
      if (y != y_q) y_moves <= y_moves + 1;
      // allowed output moves in each step
      unique case (step)
        0: check((a && b) ? !(x_q && !x) && !(y_q && !y) : (!x && !y), "output moved before a and b were both high");
        1: check(!(x_q && !x) && !(y_q && !y), "output fell while rising was expected");
        2: check(y && !(!x_q && x), "y fell or x rose while c is high");
        3: check(!(!x_q && x && c) && !(!y_q && y), "y rose or x rose before c fell");
        4: check(!(!x_q && x) && !(y_q && !y), "x rose or y fell after b fell");
        5: check(!x && !(!y_q && y), "x high or y rose after a fell");
        default: check(1'b0, "bad step");
      endcase
      if (wait_left != 0) wait_left <= wait_left - 1;
      else begin
        unique case (step)
          0: if (cycles_done < CYCLES) begin
               if (!a && (b || $urandom_range(1, 0) == 1)) a <= 1'b1;
               else if (!b) b <= 1'b1;
               if (a && b) step <= 1;
               wait_left <= $urandom_range(3, 0);
             end
          1: if (x && y) begin c <= 1'b1; step <= 2; wait_left <= $urandom_range(3, 0); end
          2: if (!x)     begin c <= 1'b0; step <= 3; wait_left <= $urandom_range(3, 0); end
          3: if (x && !y) begin b <= 1'b0; step <= 4; wait_left <= $urandom_range(3, 0); end
          4: if (!x && y) begin a <= 1'b0; step <= 5; wait_left <= $urandom_range(3, 0); end
          5: if (!y)     begin step <= 0; cycles_done <= cycles_done + 1; wait_left <= $urandom_range(3, 0); end
          default: ;
        endcase
      end
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (cycles_done == CYCLES);
    repeat (20) @(posedge clk);
    check(!x && !y && !a && !b && !c, "not back at the initial state");
    check(x_moves == 4 * CYCLES, $sformatf("x moved %0d times", x_moves));
    check(y_moves == 4 * CYCLES, $sformatf("y moved %0d times", y_moves));
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
