// tb_data_shifter: drives a random pixel stream into a data shifter with N = 8 and checks
// the three window register outputs: row[r] at clock t must be the pixel that entered at
// clock t-1-r*(N+3) (0 before the stream started).
module tb_data_shifter;
  import qmvl_pkg::*;

  localparam int N = 8;
  logic clk = 0, rst_n = 0;
  quat_t in1 = '0;
  quat_t row [3];
  quat_t hist [$];
  int checks = 0, failures = 0;

  data_shifter #(.N(N)) dut (.clk(clk), .rst_n(rst_n), .in1(in1), .row(row));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    #1;
    rst_n = 1;
    for (int t = 0; t < 600; t++) begin
      in1 = 2'($urandom_range(0, 3));
      @(negedge clk);
      for (int r = 0; r < 3; r++) begin
        automatic int idx = t - 1 - r * (N + 3);
        automatic int e = (idx >= 0) ? int'(hist[idx]) : 0;
        checks++;
        if (int'(row[r]) != e) begin
          failures++;
          if (failures < 10) $display("FAIL t=%0d row%0d=%0d exp=%0d", t, r, row[r], e);
        end
      end
      hist.push_back(in1);
      @(posedge clk);
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
