// tb_digit_comparator: checks the one-digit comparator in two ways.
//  1. Exhaustively over all comparator constants and pixel values: b must equal the constant
//     selected by the pixel.
//  2. With the constants derived from the template sets of the three-stage demonstration
//     (first template (0|1, 0|3, 2), second template (1|2, 1|3, 0)): the derived constants
//     must be T(1,3,2,0), T(1,2,0,3) and T(2,0,1,0), and every pixel value must give the
//     match digit worked out by hand from the sets.
module tb_digit_comparator;
  import qmvl_pkg::*;

  tconst_t alpha;
  quat_t   a, b;
  int checks = 0, failures = 0;

  digit_comparator dut (.alpha(alpha), .a(a), .b(b));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Sets per position: bit v set = value v accepted.
    logic [3:0] pset [3] = '{4'b0011, 4'b1001, 4'b0100};
    logic [3:0] qset [3] = '{4'b0110, 4'b1010, 4'b0001};
    // Expected constants alpha_0..alpha_3 per position, as printed for PM1..PM3.
    int exp_alpha [3][4] = '{'{1, 3, 2, 0}, '{1, 2, 0, 3}, '{2, 0, 1, 0}};
    logic [7:0] flat;

    for (int w = 0; w < 256; w++) begin
      for (int s = 0; s < 4; s++) begin
        flat = 8'(w);
        alpha = flat;
        a = 2'(s);
        #1;
        checks++;
        if (b !== 2'((flat >> (2 * s)) & 8'h3)) begin
          failures++;
          $display("FAIL alpha=%h a=%0d b=%0d", flat, s, b);
        end
      end
    end

    for (int k = 0; k < 3; k++) begin
      alpha = alpha_from_sets(pset[k], qset[k]);
      for (int s = 0; s < 4; s++) begin
        int m;
        a = 2'(s);
        #1;
        m = (pset[k][s] ? 1 : 0) + (qset[k][s] ? 2 : 0);
        checks += 2;
        if (int'(alpha[s]) != exp_alpha[k][s]) begin
          failures++;
          $display("FAIL PM%0d alpha_%0d=%0d exp %0d", k + 1, s, alpha[s], exp_alpha[k][s]);
        end
        if (int'(b) != m) begin
          failures++;
          $display("FAIL PM%0d a=%0d b=%0d exp %0d", k + 1, s, b, m);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
