// tb_knuth_shuffle: self-checking test of the Knuth shuffle generator.
//
//   * N = 4, pipelined, identity input, 2^20 = 1,048,576 permutations (the
//     size of the published distribution experiment), en high about 15 cycles
//     in 16.  A cycle-accurate model in the testbench applies each stage's
//     exchange with the random offset that stage shows at the moment the
//     permutation passes it; the output must equal the model exactly, arrive
//     N-1 = 3 cycles after it was taken, and every one of the 24 permutations
//     must occur within 3 % of 2^20/24 = 43,690 times.  Derangements must
//     be within 2 % of 9/24 of the total.  Both an exchange with itself and
//     with another element must have occurred in every stage.
//   * N = 6, combinational, reversed input: every output a permutation of
//     the input.
module tb_knuth_shuffle;
  import perm_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0;
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

  // ---------------- N = 4 pipelined ----------------
  logic            vout;
  logic [3:0][1:0] perm;
  logic [3:0][1:0] ident = {2'd0, 2'd1, 2'd2, 2'd3};
  knuth_shuffle #(.N(4), .M(32), .SEED(32'h7777_1234)) u4 (
    .clk, .rst_n, .en, .base_perm(ident), .out_valid(vout), .perm_out(perm));

  function automatic logic [7:0] xchg(logic [7:0] v, int j, int r);
    logic [3:0][1:0] a = v;
    logic [1:0] t = a[3 - j];
    a[3 - j] = a[3 - j - r];
    a[3 - j - r] = t;
    return a;
  endfunction

  // model pipeline: stage registers with their valid bits and entry cycles
  logic [7:0] m1, m2, m3;
  bit         mv1 = 0, mv2 = 0, mv3 = 0;
  int         mt1, mt2, mt3;
  int         hist[24];
  int         n_out = 0, n_der = 0;
  int         self_x[3], other_x[3];

  always @(posedge clk) if (rst_n) begin
    int r0, r1, r2;
    r0 = int'(u4.g_stage[0].r);
    r1 = int'(u4.g_stage[1].r);
    r2 = int'(u4.g_stage[2].r);
    if (vout) begin
      check(mv3 && perm == m3, $sformatf("got %h model %h (valid %0d)", perm, m3, mv3));
      check(cycle - mt3 == 3, $sformatf("latency %0d", cycle - mt3));
      hist[rank4(perm)]++;
      n_out++;
      if (perm[3] != 0 && perm[2] != 1 && perm[1] != 2 && perm[0] != 3) n_der++;
    end else begin
      check(!mv3, "missing output");
    end
    if (en)  begin if (r0 == 0) self_x[0]++; else other_x[0]++; end
    if (mv1) begin if (r1 == 0) self_x[1]++; else other_x[1]++; end
    if (mv2) begin if (r2 == 0) self_x[2]++; else other_x[2]++; end
    m3 <= xchg(m2, 2, r2);  mv3 <= mv2;  mt3 <= mt2;
    m2 <= xchg(m1, 1, r1);  mv2 <= mv1;  mt2 <= mt1;
    m1 <= xchg(ident, 0, r0); mv1 <= en; mt1 <= cycle;
  end

  // ---------------- N = 6 combinational ----------------
  logic            v6;
  logic [5:0][2:0] p6;
  logic [5:0][2:0] rev6 = {3'd5, 3'd4, 3'd3, 3'd2, 3'd1, 3'd0};
  knuth_shuffle #(.N(6), .M(32), .PIPELINE(1'b0), .SEED(32'h4242_4242)) u6 (
    .clk, .rst_n, .en, .base_perm(rev6), .out_valid(v6), .perm_out(p6));
  always @(posedge clk) if (rst_n && en && (cycle % 64 == 0))
    check(v6 && is_perm(word_t'(p6), 6, 3), $sformatf("n=6 output %h", p6));

  initial begin : watchdog
    repeat (1_300_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    while (n_out + int'(mv1) + int'(mv2) + int'(mv3) + int'(en) < (1 << 20)) begin
      en <= ($urandom_range(15) != 0);
      @(posedge clk);
    end
    en <= 1'b0;
    repeat (6) @(posedge clk);
    check(n_out == (1 << 20), $sformatf("%0d permutations", n_out));
    foreach (hist[b])
      check(hist[b] > 42380 && hist[b] < 45000, $sformatf("bin %0d count %0d", b, hist[b]));
    check(n_der > 385350 && n_der < 401080, $sformatf("%0d derangements", n_der));
    for (int j = 0; j < 3; j++)
      check(self_x[j] > 0 && other_x[j] > 0, $sformatf("stage %0d exchanges %0d/%0d", j, self_x[j], other_x[j]));
    $display("derangements %0d of %0d", n_der, n_out);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
