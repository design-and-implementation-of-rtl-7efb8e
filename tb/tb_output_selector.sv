// tb_output_selector: random test of the output selector. One clock after inputs are
// applied, d must be d_prev when c5 = 0 and the transition value for c5 = 1, 2, 3 otherwise.
module tb_output_selector;
  import qmvl_pkg::*;

  logic clk = 0, rst_n = 0;
  quat_t d_prev = '0, c5 = '0, d;
  quat_t v [3] = '{default: '0};
  int checks = 0, failures = 0;
  int seen [4] = '{0, 0, 0, 0};

  output_selector dut (.clk(clk), .rst_n(rst_n), .d_prev(d_prev), .c5(c5), .v(v), .d(d));

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int expected;
    repeat (2) @(posedge clk);
    #1;
    checks++;
    if (d !== 2'd0) begin failures++; $display("FAIL reset d=%0d", d); end
    rst_n = 1;
    for (int t = 0; t < 2000; t++) begin
      d_prev = 2'($urandom_range(0, 3));
      c5 = 2'($urandom_range(0, 3));
      foreach (v[k]) v[k] = 2'($urandom_range(0, 3));
      case (c5)
        2'd0: expected = d_prev;
        2'd1: expected = v[0];
        2'd2: expected = v[1];
        default: expected = v[2];
      endcase
      seen[c5]++;
      @(posedge clk);
      #1;
      checks++;
      if (int'(d) != expected) begin
        failures++;
        $display("FAIL t=%0d c5=%0d d=%0d exp=%0d", t, c5, d, expected);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
