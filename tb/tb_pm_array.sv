// tb_pm_array: drives three independent random row streams and a random chain input into the
// 3x3 PM array. The chain visits window positions x1 x2 x3 x8 x0 x4 x7 x6 x5, one clock
// each, reading row 0 for the first three, row 1 for the next three and row 2 for the last
// three; c5 at clock t must therefore combine c0(t-9) with position k of the chain seeing
// its row at clock t-9+k. Expected values are worked out from the template sets (bit v set =
// value v accepted), not from comparator constants. Template sets are re-drawn every 50
// clocks and are mostly "don't care" so that matches are frequent; every result value
// 1, 2, 3 must be seen.
module tb_pm_array;
  import qmvl_pkg::*;

  logic clk = 0, rst_n = 0;
  quat_t row [3] = '{default: '0};
  quat_t c0 = '0, c5;
  tconst_t alpha [9];
  logic [3:0] pset [9], qset [9];
  int chain [9] = '{1, 2, 3, 8, 0, 4, 7, 6, 5};
  // history per clock: rows, c0 and the sets in force
  quat_t h_row [$][3];
  quat_t h_c0 [$];
  logic [3:0] h_p [$][9], h_q [$][9];
  int checks = 0, failures = 0;
  int seen [4] = '{0, 0, 0, 0};

  pm_array dut (.clk(clk), .rst_n(rst_n), .row(row), .c0(c0), .alpha(alpha), .c5(c5));

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [3:0] rand_set();
    return ($urandom_range(0, 3) != 0) ? 4'b1111 : 4'($urandom_range(1, 15));
  endfunction

  initial begin
    for (int j = 0; j < 9; j++) begin pset[j] = 4'hf; qset[j] = 4'hf; end
    foreach (alpha[j]) alpha[j] = alpha_from_sets(pset[j], qset[j]);
    repeat (2) @(posedge clk);
    #1;
    rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      quat_t r3 [3];
      if (t % 50 == 0) begin
        for (int j = 0; j < 9; j++) begin pset[j] = rand_set(); qset[j] = rand_set(); end
        foreach (alpha[j]) alpha[j] = alpha_from_sets(pset[j], qset[j]);
      end
      for (int r = 0; r < 3; r++) row[r] = 2'($urandom_range(0, 3));
      c0 = ($urandom_range(0, 4) != 0) ? 2'd3 : 2'($urandom_range(0, 3));
      @(negedge clk);
      if (t >= 9) begin
        bit mp, mq;
        int e;
        mp = h_c0[t-9][0];
        mq = h_c0[t-9][1];
        for (int k = 0; k < 9; k++) begin
          automatic int v = int'(h_row[t-9+k][k/3]);
          if (!h_p[t-9+k][chain[k]][v]) mp = 0;
          if (!h_q[t-9+k][chain[k]][v]) mq = 0;
        end
        e = (mp ? 1 : 0) + (mq ? 2 : 0);
        seen[e]++;
        checks++;
        if (int'(c5) != e) begin
          failures++;
          if (failures < 10) $display("FAIL t=%0d c5=%0d exp=%0d", t, c5, e);
        end
      end
      r3 = row;
      h_row.push_back(r3);
      h_c0.push_back(c0);
      h_p.push_back(pset);
      h_q.push_back(qset);
      @(posedge clk);
      #1;
    end
    for (int v = 1; v < 4; v++) begin
      checks++;
      if (seen[v] == 0) begin failures++; $display("FAIL c5=%0d never seen", v); end
    end
    $display("c5 counts: none=%0d first=%0d second=%0d both=%0d", seen[0], seen[1], seen[2], seen[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
