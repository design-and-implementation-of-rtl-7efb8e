// tb_dyn_shift_reg: drives a random digit stream through a 3-digit shift register (the size
// on the original chip) and checks that every digit reappears exactly DEPTH clocks later,
// and that reset clears the register.
module tb_dyn_shift_reg;
  import qmvl_pkg::*;

  localparam int DEPTH = 3;
  logic clk = 0, rst_n = 0;
  quat_t din = '0, dout;
  quat_t hist [$];
  int checks = 0, failures = 0;

  dyn_shift_reg #(.DEPTH(DEPTH)) dut (.clk(clk), .rst_n(rst_n), .din(din), .dout(dout));

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
    checks++;
    if (dout !== 2'd0) begin failures++; $display("FAIL reset value %0d", dout); end
    rst_n = 1;
    for (int i = 0; i < DEPTH; i++) hist.push_back(2'd0);
    for (int t = 0; t < 500; t++) begin
      din = 2'($urandom_range(0, 3));
      @(negedge clk);
      checks++;
      if (dout !== hist[hist.size() - DEPTH]) begin
        failures++;
        $display("FAIL t=%0d dout=%0d exp=%0d", t, dout, hist[hist.size() - DEPTH]);
      end
      hist.push_back(din);
      @(posedge clk);
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
