// tb_quaternary_image_system: end-to-end test of the whole top level at its default
// parameters (no overrides): the image processor (64 pixels per line, two stages) and, in
// parallel, the demonstration chip.
//
// Image processor, through the ip_ ports: three plain passes over random 64 x 16 images with
// four random templates each (In2 random, centre condition "accept all"), then a recursive
// region fill of a rectangular blob from one seed pixel, fed back until it no longer changes.
// Every output pixel is compared with a reference built from the template sets: out at clock
// t is the new value of stream pixel c = t - (N + 10 + STAGES - 1), window x0 = s[c],
// x8/x4 = s[c-1]/s[c+1], x1..x3 = s[c+N-1..c+N+1], x7..x5 = s[c-N-1..c-N+1], 0 outside the
// image; this also checks the latency.
//
// Demonstration chip, through the tc_ ports: the three-cell linear array runs the two-template
// example (first (0|1, 0|3, 2), second (1|2, 1|3, 0)) on a periodic stream holding (0,3,2)
// and (2,1,0), and the three-digit shift register carries a random stream.
//
// Mechanisms counted, each of which must happen: each processor stage reporting first-only,
// second-only and both; a pixel passing through unmatched; the second stage overriding the
// first; the In2 centre condition blocking a match; a recursive run taking more than one
// pass and reaching a fixed point; the linear array detecting each template.
module tb_quaternary_image_system;
  import qmvl_pkg::*;

  localparam int N = 64;
  localparam int S = 2;
  localparam int H = 16;
  localparam int P = N * H;
  localparam int LAT = N + 10 + S - 1;

  logic clk = 0, rst_n = 0;
  quat_t in1 = '0, in2 = '0, out;
  tconst_t b0 [S];
  tconst_t alpha [S][9];
  quat_t v [S][3];
  quat_t c5 [S];

  // templates as sets: bit value set = value accepted
  logic [3:0] tp [S][9], tq [S][9], bp [S], bq [S];
  quat_t img [P], aimg [P], res [P];
  int checks = 0, failures = 0;
  int cnt_c5 [S][4];
  int cnt_pass = 0, cnt_override = 0, cnt_blocked = 0, rec_passes = 0, cnt_fixed = 0;

  // demonstration chip side
  quat_t la_in = '0, la_out [3], pm_out, sr_in = '0, sr_out, mux_out [4];
  tconst_t la_alpha [3];
  tconst_t mux_p [4] = '{default: '0};
  quat_t mux_x [4] = '{default: '0};
  quat_t la_hist [$], sr_hist [$];
  logic [3:0] pset3 [3] = '{4'b0011, 4'b1001, 4'b0100};
  logic [3:0] qset3 [3] = '{4'b0110, 4'b1010, 4'b0001};
  int periodic [12] = '{0, 3, 2, 1, 2, 1, 0, 3, 3, 2, 3, 0};
  int la_seen [4] = '{0, 0, 0, 0};
  bit chip_done = 0;

  quaternary_image_system dut (
    .clk(clk), .rst_n(rst_n),
    .ip_in1(in1), .ip_in2(in2), .ip_b0(b0), .ip_alpha(alpha), .ip_v(v),
    .ip_out(out), .ip_c5(c5),
    .tc_la_in(la_in), .tc_la_alpha(la_alpha), .tc_la_out(la_out),
    .tc_pm_in1(2'd3), .tc_pm_in2(2'd0), .tc_pm_alpha('0), .tc_pm_out(pm_out),
    .tc_mux_p(mux_p), .tc_mux_x(mux_x), .tc_mux_out(mux_out),
    .tc_sr_in(sr_in), .tc_sr_out(sr_out)
  );

  function automatic int la_ref(int k);
    bit mp = 1, mq = 1;
    int n = la_hist.size();
    for (int j = 0; j <= k; j++) begin
      int idx = n - 1 - k + j;
      int x;
      if (idx < 0) return 0;
      x = int'(la_hist[idx]);
      if (!pset3[j][x]) mp = 0;
      if (!qset3[j][x]) mq = 0;
    end
    return (mp ? 1 : 0) + (mq ? 2 : 0);
  endfunction

  // The chip side runs during the first processor pass, while rst_n stays high.
  initial begin
    for (int k = 0; k < 3; k++) la_alpha[k] = alpha_from_sets(pset3[k], qset3[k]);
    @(posedge rst_n);
    #1;
    for (int i = 0; i < 3; i++) sr_hist.push_back(2'd0);
    for (int t = 0; t < 600; t++) begin
      la_in = (t < 240) ? 2'(periodic[t % 12]) : 2'($urandom_range(0, 3));
      sr_in = 2'($urandom_range(0, 3));
      @(negedge clk);
      for (int k = 0; k < 3; k++) begin
        automatic int e = la_ref(k);
        checks++;
        if (int'(la_out[k]) != e) begin
          failures++;
          if (failures < 10) $display("FAIL t=%0d la_out%0d=%0d exp=%0d", t, k, la_out[k], e);
        end
        if (k == 2) la_seen[e]++;
      end
      checks++;
      if (sr_out !== sr_hist[sr_hist.size() - 3]) begin
        failures++;
        if (failures < 10) $display("FAIL t=%0d sr_out=%0d", t, sr_out);
      end
      la_hist.push_back(la_in);
      sr_hist.push_back(sr_in);
      @(posedge clk);
      #1;
    end
    chip_done = 1;
  end

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int px_img(int i);
    return (i >= 0 && i < P) ? int'(img[i]) : 0;
  endfunction

  function automatic int px_a(int i);
    return (i >= 0 && i < P) ? int'(aimg[i]) : 0;
  endfunction

  // Reference transition of pixel c; updates the mechanism counters when count = 1.
  function automatic int ref_pixel(int c, bit count);
    int w [9];
    int d;
    bit changed = 0;
    w[0] = px_img(c);         w[8] = px_img(c - 1);     w[4] = px_img(c + 1);
    w[1] = px_img(c + N - 1); w[2] = px_img(c + N);     w[3] = px_img(c + N + 1);
    w[7] = px_img(c - N - 1); w[6] = px_img(c - N);     w[5] = px_img(c - N + 1);
    d = w[0];
    for (int i = 0; i < S; i++) begin
      bit wp = 1, wq = 1, mp, mq;
      int m;
      for (int j = 0; j < 9; j++) begin
        if (!tp[i][j][w[j]]) wp = 0;
        if (!tq[i][j][w[j]]) wq = 0;
      end
      mp = wp & bp[i][px_a(c)];
      mq = wq & bq[i][px_a(c)];
      m = (mp ? 1 : 0) + (mq ? 2 : 0);
      if (count) begin
        cnt_c5[i][m]++;
        if ((wp && !mp) || (wq && !mq)) cnt_blocked++;
        if (i > 0 && m != 0 && changed) cnt_override++;
      end
      if (m != 0) begin
        d = int'(v[i][m-1]);
        changed = 1;
      end
    end
    if (count && !changed) cnt_pass++;
    return d;
  endfunction

  // Streams img (In1) and aimg (In2, N-1 clocks later) through the processor, checks every
  // output pixel and stores the result in res.
  task automatic run_pass(bit count);
    rst_n = 0;
    in1 = '0;
    in2 = '0;
    repeat (2) @(posedge clk);
    #1;
    rst_n = 1;
    for (int t = 0; t < P + LAT + 2; t++) begin
      int c;
      in1 = 2'(px_img(t));
      in2 = 2'(px_a(t - N + 1));
      @(negedge clk);
      c = t - LAT;
      if (c >= 0 && c < P) begin
        automatic int e = ref_pixel(c, count);
        checks++;
        res[c] = out;
        if (int'(out) != e) begin
          failures++;
          if (failures < 10) $display("FAIL t=%0d pixel %0d out=%0d exp=%0d", t, c, out, e);
        end
      end
      @(posedge clk);
      #1;
    end
  endtask

  function automatic logic [3:0] rand_set();
    return ($urandom_range(0, 3) != 0) ? 4'b1111 : 4'($urandom_range(1, 14));
  endfunction

  task automatic program_templates();
    for (int i = 0; i < S; i++) begin
      for (int j = 0; j < 9; j++) alpha[i][j] = alpha_from_sets(tp[i][j], tq[i][j]);
      b0[i] = alpha_from_sets(bp[i], bq[i]);
    end
  endtask

  initial begin
    foreach (cnt_c5[i, m]) cnt_c5[i][m] = 0;

    // ---------------- plain near-neighbour operation ----------------
    for (int pass = 0; pass < 3; pass++) begin
      for (int i = 0; i < S; i++) begin
        for (int j = 0; j < 9; j++) begin tp[i][j] = rand_set(); tq[i][j] = rand_set(); end
        bp[i] = 4'hf; bq[i] = 4'hf;
        for (int k = 0; k < 3; k++) v[i][k] = 2'($urandom_range(0, 3));
      end
      program_templates();
      for (int p = 0; p < P; p++) begin
        img[p]  = 2'($urandom_range(0, 3));
        aimg[p] = 2'($urandom_range(0, 3));
      end
      run_pass(1);
    end

    // ---------------- recursive operation: region filling ----------------
    for (int i = 0; i < S; i++) begin
      for (int j = 0; j < 9; j++) begin tp[i][j] = 4'hf; tq[i][j] = 4'hf; end
      tp[i][0] = 4'b0010; tq[i][0] = 4'b0010;       // centre state 1 (not yet filled)
      bp[i] = 4'b0010;    bq[i] = 4'b0010;          // input image centre a0 = 1
      for (int k = 0; k < 3; k++) v[i][k] = 2'd2;
    end
    tp[0][2] = 4'b0100; tq[0][4] = 4'b0100;          // neighbour x2 / x4 filled
    tp[1][6] = 4'b0100; tq[1][8] = 4'b0100;          // neighbour x6 / x8 filled
    program_templates();
    for (int p = 0; p < P; p++) begin
      automatic int r = p / N;
      automatic int col = p % N;
      aimg[p] = (r >= 3 && r <= 11 && col >= 10 && col <= 40) ? 2'd1 : 2'd0;
      img[p] = 2'd1;
    end
    img[5 * N + 20] = 2'd2;
    for (int it = 0; it < 60; it++) begin
      automatic bit same = 1;
      run_pass(1);
      rec_passes++;
      for (int p = 0; p < P; p++) if (res[p] != img[p]) same = 0;
      if (same) begin cnt_fixed++; break; end
      img = res;
    end
    for (int p = 0; p < P; p++) begin
      automatic int e = (aimg[p] == 2'd1) ? 2 : 1;
      checks++;
      if (int'(img[p]) != e) begin
        failures++;
        if (failures < 10) $display("FAIL fill pixel %0d = %0d exp %0d", p, img[p], e);
      end
    end

    // ---------------- mechanisms ----------------
    wait (chip_done);
    for (int m = 1; m < 3; m++) begin
      checks++;
      if (la_seen[m] == 0) begin failures++; $display("FAIL linear array result %0d never", m); end
    end
    $display("linear array Out3: none=%0d first=%0d second=%0d", la_seen[0], la_seen[1], la_seen[2]);
    for (int i = 0; i < S; i++)
      for (int m = 1; m < 4; m++) begin
        checks++;
        if (cnt_c5[i][m] == 0) begin failures++; $display("FAIL stage %0d c5=%0d never", i, m); end
      end
    checks += 5;
    if (cnt_pass == 0)     begin failures++; $display("FAIL no pass-through"); end
    if (cnt_override == 0) begin failures++; $display("FAIL no override"); end
    if (cnt_blocked == 0)  begin failures++; $display("FAIL centre condition never blocked"); end
    if (rec_passes < 2)    begin failures++; $display("FAIL recursion took one pass"); end
    if (cnt_fixed == 0)    begin failures++; $display("FAIL no fixed point"); end
    for (int i = 0; i < S; i++)
      $display("stage %0d c5 counts: none=%0d first=%0d second=%0d both=%0d",
               i, cnt_c5[i][0], cnt_c5[i][1], cnt_c5[i][2], cnt_c5[i][3]);
    $display("pass-through=%0d override=%0d blocked-by-centre=%0d recursive passes=%0d",
             cnt_pass, cnt_override, cnt_blocked, rec_passes);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
