// tb_accumulator: applies all 16 combinations of c_prev and b and compares the result with
// the accumulator truth table (rows b, columns c_prev) written out literally.
module tb_accumulator;
  import qmvl_pkg::*;

  quat_t c_prev, b, c;
  int checks = 0, failures = 0;

  accumulator dut (.c_prev(c_prev), .b(b), .c(c));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int table_iv [4][4] = '{'{0, 0, 0, 0},
                            '{0, 1, 0, 1},
                            '{0, 0, 2, 2},
                            '{0, 1, 2, 3}};
    for (int bi = 0; bi < 4; bi++) begin
      for (int ci = 0; ci < 4; ci++) begin
        b = 2'(bi);
        c_prev = 2'(ci);
        #1;
        checks++;
        if (int'(c) != table_iv[bi][ci]) begin
          failures++;
          $display("FAIL b=%0d c_prev=%0d c=%0d exp %0d", bi, ci, c, table_iv[bi][ci]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
