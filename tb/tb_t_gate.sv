// tb_t_gate: exhaustive check of the quaternary T gate. All 4^5 combinations of the four
// data digits and the control digit are applied; the expected output is the data digit
// whose index equals the control value, extracted from the flattened 8-bit data word.
module tb_t_gate;
  import qmvl_pkg::*;

  tconst_t p;
  quat_t   x, tout;
  int checks = 0, failures = 0;

  t_gate dut (.p(p), .x(x), .tout(tout));

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [7:0] flat;
    for (int w = 0; w < 256; w++) begin
      for (int s = 0; s < 4; s++) begin
        flat = 8'(w);
        p = flat;
        x = 2'(s);
        #1;
        checks++;
        if (tout !== 2'((flat >> (2 * s)) & 8'h3)) begin
          failures++;
          $display("FAIL p=%h x=%0d tout=%0d", flat, s, tout);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
