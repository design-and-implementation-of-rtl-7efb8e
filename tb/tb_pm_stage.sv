// tb_pm_stage: one processor stage with random row streams, a random In2 stream, random
// centre-pixel conditions and mostly "don't care" templates. Expected values come from the
// template sets over the input history:
//   c5(t) = condition on in2(t-10), and for chain link k (positions x1 x2 x3 x8 x0 x4 x7 x6 x5)
//           the window row k/3 as seen at clock t-9+k;
//   d(t)  = d_prev(t-1) if c5(t-1) = 0, else the transition value selected by c5(t-1).
// It counts the four c5 outcomes and the cases where the In2 condition alone blocked an
// otherwise complete match, and fails if any of them never happened.
module tb_pm_stage;
  import qmvl_pkg::*;

  logic clk = 0, rst_n = 0;
  quat_t row [3] = '{default: '0};
  quat_t in2 = '0, d_prev = '0, d, c5;
  quat_t v [3] = '{default: '0};
  tconst_t b0, alpha [9];
  logic [3:0] pset [9], qset [9], bp, bq;
  int chain [9] = '{1, 2, 3, 8, 0, 4, 7, 6, 5};
  quat_t h_row [$][3];
  quat_t h_in2 [$], h_dprev [$];
  quat_t h_v [$][3];
  logic [3:0] h_p [$][9], h_q [$][9], h_bp [$], h_bq [$];
  int h_c5 [$];
  int checks = 0, failures = 0;
  int seen [4] = '{0, 0, 0, 0};
  int blocked = 0;

  pm_stage dut (
    .clk(clk), .rst_n(rst_n), .row(row), .in2(in2), .b0(b0), .alpha(alpha), .v(v),
    .d_prev(d_prev), .d(d), .c5(c5)
  );

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
    bp = 4'hf; bq = 4'hf;
    foreach (alpha[j]) alpha[j] = alpha_from_sets(pset[j], qset[j]);
    b0 = alpha_from_sets(bp, bq);
    repeat (2) @(posedge clk);
    #1;
    rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      quat_t r3 [3], v3 [3];
      if (t % 50 == 0) begin
        for (int j = 0; j < 9; j++) begin pset[j] = rand_set(); qset[j] = rand_set(); end
        bp = rand_set(); bq = rand_set();
        foreach (alpha[j]) alpha[j] = alpha_from_sets(pset[j], qset[j]);
        b0 = alpha_from_sets(bp, bq);
      end
      for (int r = 0; r < 3; r++) row[r] = 2'($urandom_range(0, 3));
      in2 = 2'($urandom_range(0, 3));
      d_prev = 2'($urandom_range(0, 3));
      foreach (v[k]) v[k] = 2'($urandom_range(0, 3));
      @(negedge clk);
      // expected c5 during this clock
      if (t >= 10) begin
        bit mp, mq, wp, wq;
        automatic int e;
        wp = 1; wq = 1;
        for (int k = 0; k < 9; k++) begin
          automatic int pv = int'(h_row[t-9+k][k/3]);
          if (!h_p[t-9+k][chain[k]][pv]) wp = 0;
          if (!h_q[t-9+k][chain[k]][pv]) wq = 0;
        end
        mp = wp & h_bp[t-10][h_in2[t-10]];
        mq = wq & h_bq[t-10][h_in2[t-10]];
        if ((wp && !mp) || (wq && !mq)) blocked++;
        e = (mp ? 1 : 0) + (mq ? 2 : 0);
        seen[e]++;
        checks++;
        if (int'(c5) != e) begin
          failures++;
          if (failures < 10) $display("FAIL t=%0d c5=%0d exp=%0d", t, c5, e);
        end
        h_c5.push_back(e);
      end else begin
        h_c5.push_back(-1);
      end
      if (t >= 11 && h_c5[t-1] >= 0) begin
        automatic int ed = (h_c5[t-1] == 0) ? int'(h_dprev[t-1]) : int'(h_v[t-1][h_c5[t-1]-1]);
        checks++;
        if (int'(d) != ed) begin
          failures++;
          if (failures < 10) $display("FAIL t=%0d d=%0d exp=%0d", t, d, ed);
        end
      end
      r3 = row;
      v3 = v;
      h_row.push_back(r3);
      h_v.push_back(v3);
      h_in2.push_back(in2);
      h_dprev.push_back(d_prev);
      h_p.push_back(pset);
      h_q.push_back(qset);
      h_bp.push_back(bp);
      h_bq.push_back(bq);
      @(posedge clk);
      #1;
    end
    for (int k = 0; k < 4; k++) begin
      checks++;
      if (seen[k] == 0) begin failures++; $display("FAIL c5=%0d never seen", k); end
    end
    checks++;
    if (blocked == 0) begin failures++; $display("FAIL centre condition never blocked a match"); end
    $display("c5 counts: none=%0d first=%0d second=%0d both=%0d; blocked by In2 condition=%0d",
             seen[0], seen[1], seen[2], seen[3], blocked);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
