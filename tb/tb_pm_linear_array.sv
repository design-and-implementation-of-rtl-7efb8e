// tb_pm_linear_array: the three-stage double matching demonstration.
// Templates: first (0|1, 0|3, 2), second (1|2, 1|3, 0). A periodic stream that contains
// the sequences (0,3,2) and (2,1,0) is applied first, then a random stream. Each clock the
// outputs of all three cells are compared with a reference computed directly from the
// template sets over the stream history: out[k] at clock t covers digits a(t-1-k) .. a(t-1),
// so the check also fixes the one-clock-per-cell latency. The test counts how often the last
// cell reports "first only" and "second only" (the demonstration templates share no
// complete sequence, so "both" cannot occur with them). From clock 800 the templates are
// changed to first (0|1, 3, any), second (1, 2|3, any), which overlap, and "both" must be
// seen as well; checks are paused for three clocks after the change.
module tb_pm_linear_array;
  import qmvl_pkg::*;

  localparam int S = 3;
  logic clk = 0, rst_n = 0;
  quat_t a = '0;
  tconst_t alpha [S];
  quat_t out [S];
  quat_t hist [$];
  int checks = 0, failures = 0;
  int seen [4] = '{0, 0, 0, 0};

  logic [3:0] pset [S] = '{4'b0011, 4'b1001, 4'b0100};
  logic [3:0] qset [S] = '{4'b0110, 4'b1010, 4'b0001};
  int periodic [12] = '{0, 3, 2, 1, 2, 1, 0, 3, 3, 2, 3, 0};

  pm_linear_array #(.STAGES(S)) dut (.clk(clk), .rst_n(rst_n), .a(a), .alpha(alpha), .out(out));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int ref_out(int k);
    // Match digit of cell k given the history (hist[$] = a(t-1)).
    bit mp = 1, mq = 1;
    int n = hist.size();
    for (int j = 0; j <= k; j++) begin
      automatic int idx = n - 1 - k + j;
      automatic int v = (idx >= 0) ? int'(hist[idx]) : -1;
      if (v < 0) return 0;            // before the stream started the cells hold reset 0
      if (!pset[j][v]) mp = 0;
      if (!qset[j][v]) mq = 0;
    end
    return (mp ? 1 : 0) + (mq ? 2 : 0);
  endfunction

  initial begin
    for (int k = 0; k < S; k++) alpha[k] = alpha_from_sets(pset[k], qset[k]);
    repeat (2) @(posedge clk);
    #1;
    rst_n = 1;
    for (int t = 0; t < 1200; t++) begin
      if (t == 800) begin
        pset = '{4'b0011, 4'b1000, 4'b1111};
        qset = '{4'b0010, 4'b1100, 4'b1111};
        for (int k = 0; k < S; k++) alpha[k] = alpha_from_sets(pset[k], qset[k]);
      end
      a = (t < 240) ? 2'(periodic[t % 12]) : 2'($urandom_range(0, 3));
      @(negedge clk);
      for (int k = 0; k < S; k++) begin
        automatic int e = ref_out(k);
        if (t >= 800 && t < 803) continue;
        checks++;
        if (int'(out[k]) != e) begin
          failures++;
          if (failures < 10) $display("FAIL t=%0d out%0d=%0d exp=%0d", t, k + 1, out[k], e);
        end
        if (k == S - 1) seen[e]++;
      end
      hist.push_back(a);
      @(posedge clk);
      #1;
    end
    for (int v = 1; v < 4; v++) begin
      checks++;
      if (seen[v] == 0) begin failures++; $display("FAIL Out3=%0d never seen", v); end
    end
    $display("Out3 counts: none=%0d first=%0d second=%0d both=%0d", seen[0], seen[1], seen[2], seen[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
