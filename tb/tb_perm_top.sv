// tb_perm_top: end-to-end test of perm_top at its default parameters
// (10-element converter, 4-element random generators, 32-bit LFSRs).
//
// Runs all three units at once for about 1.1 million cycles:
//   * converter: a sweep of 200,000 consecutive indices starting at 0, then
//     random indices including 10!-1, with random gaps in idx_valid; every
//     result compared with the division-based model, with its latency of 9
//     cycles;
//   * random permutation generator: every output a permutation, and each of
//     the 24 within 5 % of its expected share;
//   * Knuth shuffle: 2^20 = 1,048,576 permutations (the published
//     experiment), every output a permutation, the derangement counter equal
//     to the testbench's own count, and total / derangements printed as the
//     estimate of e, which must lie within 2 % of e; then ks_clear.
// Each mechanism is counted and must happen at least once: pipeline fill,
// back-to-back results, gaps in the input stream, first and last index,
// an exchange of an element with itself and with another in the shuffle,
// derangements and non-derangements, and the counter clear.
module tb_perm_top;
  import perm_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int cycle = 0;
  always @(posedge clk) cycle <= cycle + 1;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  logic            idx_valid = 1'b0, idx_out_valid;
  logic [21:0]     idx_in = '0;
  logic [9:0][3:0] idx_perm;
  logic            rp_en = 1'b0, rp_valid;
  logic [3:0][1:0] rp_perm;
  logic            ks_en = 1'b0, ks_clear = 1'b0, ks_valid, ks_isd;
  logic [3:0][1:0] ks_perm;
  logic [31:0]     ks_total, ks_der;

  perm_top u_top (
    .clk, .rst_n,
    .idx_valid, .idx_in, .idx_out_valid, .idx_perm,
    .rp_en, .rp_valid, .rp_perm,
    .ks_en, .ks_clear, .ks_valid, .ks_perm,
    .ks_is_derangement(ks_isd), .ks_total, .ks_derangements(ks_der)
  );

  // mechanism counters
  int n_fill = 0, n_b2b = 0, n_gap = 0, n_first = 0, n_last = 0;
  int n_self = 0, n_other = 0, n_der = 0, n_nonder = 0, n_clear = 0;

  // converter scoreboard
  word_t exp_q[$];
  int    t_q[$];
  bit    prev_out = 0, seen_out = 0;
  int    n_idx_out = 0, n_idx_in = 0;
  always @(posedge clk) if (rst_n) begin
    if (idx_out_valid) begin
      word_t e;
      int t0;
      e  = exp_q.pop_front();
      t0 = t_q.pop_front();
      check(idx_perm == 40'(e), $sformatf("converter got %h exp %h", idx_perm, e));
      check(cycle - t0 == 9, $sformatf("converter latency %0d", cycle - t0));
      if (!seen_out) n_fill++;
      if (prev_out) n_b2b++;
      seen_out = 1;
      n_idx_out++;
    end
    prev_out = idx_out_valid;
    if (idx_valid) begin
      int p[];
      decode(10, big_t'(idx_in), p);
      exp_q.push_back(pack(p, 4));
      t_q.push_back(cycle);
      n_idx_in++;
      if (idx_in == 0) n_first++;
      if (idx_in == 22'd3628799) n_last++;
    end else if (rst_n) n_gap++;
  end

  // random generator and shuffle monitors
  int rp_hist[24];
  int n_rp = 0, n_ks = 0, my_der = 0;
  always @(posedge clk) if (rst_n) begin
    if (rp_valid) begin
      check(is_perm(word_t'(rp_perm), 4, 2), $sformatf("rp output %h", rp_perm));
      rp_hist[rank4(rp_perm)]++;
      n_rp++;
    end
    if (ks_valid) begin
      bit d;
      check(is_perm(word_t'(ks_perm), 4, 2), $sformatf("ks output %h", ks_perm));
      d = (ks_perm[3] != 0) && (ks_perm[2] != 1) && (ks_perm[1] != 2) && (ks_perm[0] != 3);
      check(ks_isd == d, "derangement flag");
      if (d) begin my_der++; n_der++; end else n_nonder++;
      n_ks++;
    end
    if (ks_en) begin
      if (u_top.u_knuth.g_stage[0].r == 0) n_self++; else n_other++;
    end
  end

  initial begin : watchdog
    repeat (1_500_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // converter stimulus
  initial begin
    wait (rst_n);
    @(posedge clk);
    for (int k = 0; k < 200_000; k++) begin
      idx_valid <= 1'b1;
      idx_in <= 22'(k);
      @(posedge clk);
    end
    for (int k = 0; k < 100_000; k++) begin
      idx_valid <= ($urandom_range(3) != 0);
      idx_in <= (k == 500) ? 22'd3628799 : 22'($urandom_range(3628799));
      @(posedge clk);
    end
    idx_valid <= 1'b0;
  end

  initial begin
    real e_est;
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    rp_en <= 1'b1;
    ks_en <= 1'b1;
    while (n_ks + 3 + 1 < (1 << 20)) @(posedge clk);
    // exactly 2^20 permutations enter: the three in flight and this one
    ks_en <= 1'b0;
    rp_en <= 1'b0;
    repeat (12) @(posedge clk);
    check(n_ks == (1 << 20), $sformatf("%0d shuffled permutations", n_ks));
    check(ks_total == 32'(n_ks) && ks_der == 32'(my_der),
          $sformatf("counter %0d/%0d, expected %0d/%0d", ks_total, ks_der, n_ks, my_der));
    e_est = real'(ks_total) / real'(ks_der);
    $display("derangements %0d of %0d, e estimate %f", ks_der, ks_total, e_est);
    check(e_est > 2.664 && e_est < 2.773, "e estimate");
    foreach (rp_hist[b])
      check(rp_hist[b] > n_rp / 24 * 95 / 100 && rp_hist[b] < n_rp / 24 * 105 / 100,
            $sformatf("rp bin %0d count %0d of %0d", b, rp_hist[b], n_rp));
    ks_clear <= 1'b1;
    @(posedge clk);
    ks_clear <= 1'b0;
    @(posedge clk);
    check(ks_total == 0 && ks_der == 0, "clear");
    if (ks_total == 0) n_clear++;
    wait (exp_q.size() == 0 && !idx_valid);
    repeat (12) @(posedge clk);
    check(n_idx_out == n_idx_in && n_idx_in > 200_000, "converter count");
    $display("mechanisms: fill %0d back-to-back %0d gaps %0d first %0d last %0d self %0d other %0d der %0d nonder %0d clear %0d",
             n_fill, n_b2b, n_gap, n_first, n_last, n_self, n_other, n_der, n_nonder, n_clear);
    check(n_fill > 0, "pipeline fill never happened");
    check(n_b2b > 0, "no back-to-back results");
    check(n_gap > 0, "no input gap");
    check(n_first > 0 && n_last > 0, "first or last index not applied");
    check(n_self > 0 && n_other > 0, "shuffle exchange kinds");
    check(n_der > 0 && n_nonder > 0, "derangement kinds");
    check(n_clear > 0, "clear");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
