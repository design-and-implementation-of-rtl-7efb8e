// tb_test_chip: exercises all parts of the demonstration chip at once.
//  - linear array: the two-template example (first (0|1, 0|3, 2), second (1|2, 1|3, 0)) on a
//    periodic stream holding (0,3,2) and (2,1,0), then random data; out[k] at clock t must
//    match the template sets over digits t-1-k .. t-1.
//  - single PM cell: random In1/In2/constants; out = accumulator table entry after the
//    clock edge that samples them.
//  - four T gates: random data and control, combinational.
//  - shift register: every digit must reappear three clocks later.
// The linear array must report both "first template" and "second template" matches.
module tb_test_chip;
  import qmvl_pkg::*;

  logic clk = 0, rst_n = 0;
  quat_t la_in = '0, pm_in1 = '0, pm_in2 = '0, sr_in = '0, la_out [3], pm_out, sr_out;
  tconst_t la_alpha [3], pm_alpha = '0;
  tconst_t mux_p [4] = '{default: '0};
  quat_t mux_x [4] = '{default: '0}, mux_out [4];
  quat_t la_hist [$], sr_hist [$];
  int checks = 0, failures = 0;
  int seen [4] = '{0, 0, 0, 0};
  logic [3:0] pset [3] = '{4'b0011, 4'b1001, 4'b0100};
  logic [3:0] qset [3] = '{4'b0110, 4'b1010, 4'b0001};
  int periodic [12] = '{0, 3, 2, 1, 2, 1, 0, 3, 3, 2, 3, 0};
  int table_iv [4][4] = '{'{0, 0, 0, 0}, '{0, 1, 0, 1}, '{0, 0, 2, 2}, '{0, 1, 2, 3}};

  test_chip dut (
    .clk(clk), .rst_n(rst_n),
    .la_in(la_in), .la_alpha(la_alpha), .la_out(la_out),
    .pm_in1(pm_in1), .pm_in2(pm_in2), .pm_alpha(pm_alpha), .pm_out(pm_out),
    .mux_p(mux_p), .mux_x(mux_x), .mux_out(mux_out),
    .sr_in(sr_in), .sr_out(sr_out)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int la_ref(int k);
    bit mp = 1, mq = 1;
    int n = la_hist.size();
    for (int j = 0; j <= k; j++) begin
      int idx = n - 1 - k + j;
      int v;
      if (idx < 0) return 0;
      v = int'(la_hist[idx]);
      if (!pset[j][v]) mp = 0;
      if (!qset[j][v]) mq = 0;
    end
    return (mp ? 1 : 0) + (mq ? 2 : 0);
  endfunction

  initial begin
    int pm_exp, pm_exp_d;
    for (int k = 0; k < 3; k++) la_alpha[k] = alpha_from_sets(pset[k], qset[k]);
    repeat (2) @(posedge clk);
    #1;
    rst_n = 1;
    pm_exp = 0;
    pm_exp_d = 0;
    for (int i = 0; i < 3; i++) sr_hist.push_back(2'd0);
    for (int t = 0; t < 1000; t++) begin
      la_in = (t < 240) ? 2'(periodic[t % 12]) : 2'($urandom_range(0, 3));
      sr_in = 2'($urandom_range(0, 3));
      for (int g = 0; g < 4; g++) begin
        mux_p[g] = tconst_t'($urandom_range(0, 255));
        mux_x[g] = 2'($urandom_range(0, 3));
      end
      @(negedge clk);
      // linear array
      for (int k = 0; k < 3; k++) begin
        automatic int e = la_ref(k);
        checks++;
        if (int'(la_out[k]) != e) begin
          failures++;
          if (failures < 10) $display("FAIL t=%0d la_out%0d=%0d exp=%0d", t, k, la_out[k], e);
        end
        if (k == 2) seen[e]++;
      end
      // PM cell (inputs applied in the previous clock)
      checks++;
      if (int'(pm_out) != pm_exp_d) begin
        failures++;
        if (failures < 10) $display("FAIL t=%0d pm_out=%0d exp=%0d", t, pm_out, pm_exp_d);
      end
      // T gates
      for (int g = 0; g < 4; g++) begin
        checks++;
        if (int'(mux_out[g]) != ((int'(mux_p[g]) >> (2 * int'(mux_x[g]))) & 3)) begin
          failures++;
          if (failures < 10) $display("FAIL t=%0d mux%0d", t, g);
        end
      end
      // shift register
      checks++;
      if (sr_out !== sr_hist[sr_hist.size() - 3]) begin
        failures++;
        if (failures < 10) $display("FAIL t=%0d sr_out=%0d", t, sr_out);
      end
      la_hist.push_back(la_in);
      sr_hist.push_back(sr_in);
      @(posedge clk);
      #1;
      // next PM cell stimulus; the one applied now is seen at the next-but-one check
      pm_exp_d = pm_exp;
      pm_in1 = 2'($urandom_range(0, 3));
      pm_in2 = 2'($urandom_range(0, 3));
      pm_alpha = tconst_t'($urandom_range(0, 255));
      pm_exp = table_iv[(int'(pm_alpha) >> (2 * int'(pm_in2))) & 3][pm_in1];
    end
    for (int v = 1; v < 3; v++) begin
      checks++;
      if (seen[v] == 0) begin failures++; $display("FAIL linear array result %0d never seen", v); end
    end
    $display("linear array Out3: none=%0d first=%0d second=%0d", seen[0], seen[1], seen[2]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
