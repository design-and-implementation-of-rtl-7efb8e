// tb_pm_cell: random test of one pattern matching cell. Each clock the testbench picks a
// match digit in1, a pixel in2 and comparator constants; one clock later out must be the
// accumulator truth table entry for (comparator constant selected by the pixel, in1).
// Also checks the reset value.
module tb_pm_cell;
  import qmvl_pkg::*;

  logic clk = 0, rst_n = 0;
  quat_t in1 = '0, in2 = '0, out;
  tconst_t alpha = '0;
  int checks = 0, failures = 0;
  int seen [4] = '{0, 0, 0, 0};

  pm_cell dut (.clk(clk), .rst_n(rst_n), .in1(in1), .in2(in2), .alpha(alpha), .out(out));

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int table_iv [4][4] = '{'{0, 0, 0, 0}, '{0, 1, 0, 1}, '{0, 0, 2, 2}, '{0, 1, 2, 3}};
    int expected;
    repeat (2) @(posedge clk);
    #1;
    checks++;
    if (out !== 2'd0) begin failures++; $display("FAIL reset out=%0d", out); end
    rst_n = 1;
    for (int t = 0; t < 2000; t++) begin
      int bsel;
      in1 = 2'($urandom_range(0, 3));
      in2 = 2'($urandom_range(0, 3));
      alpha = tconst_t'($urandom_range(0, 255));
      bsel = (int'(alpha) >> (2 * int'(in2))) & 3;
      expected = table_iv[bsel][in1];
      @(posedge clk);
      #1;
      checks++;
      seen[expected]++;
      if (int'(out) != expected) begin
        failures++;
        $display("FAIL t=%0d out=%0d exp=%0d", t, out, expected);
      end
    end
    for (int v = 0; v < 4; v++) begin
      checks++;
      if (seen[v] == 0) begin failures++; $display("FAIL result %0d never produced", v); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
