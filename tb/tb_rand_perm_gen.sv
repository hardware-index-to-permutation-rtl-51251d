// tb_rand_perm_gen: self-checking test of the random permutation generator.
//
// N = 4 with a 32-bit LFSR.  en is high about 7 cycles in 8.  For every draw
// the testbench reads the LFSR word x at the sampling edge, computes the
// index floor(24 x / 2^32) and its permutation with the division-based
// reference model, and expects exactly that permutation with out_valid
// N-1 = 3 cycles later.  Over 240,000 permutations each of the 24
// permutations must occur within 5 % of 10,000 times.
module tb_rand_perm_gen;
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

  logic            vout;
  logic [3:0][1:0] perm;
  rand_perm_gen #(.N(4), .M(32), .SEED(32'h0BAD_CAFE)) u_dut (
    .clk, .rst_n, .en, .out_valid(vout), .perm_out(perm));

  word_t exp_q[$];
  int    t_q[$];
  int    hist[24];
  int    n_out = 0;

  always @(posedge clk) if (rst_n) begin
    if (vout) begin
      word_t e;
      int t0;
      e  = exp_q.pop_front();
      t0 = t_q.pop_front();
      check(perm == 8'(e), $sformatf("got %h exp %h", perm, e));
      check(cycle - t0 == 3, $sformatf("latency %0d", cycle - t0));
      hist[rank4(perm)]++;
      n_out++;
    end
    if (en) begin
      int p[];
      decode(4, (big_t'(u_dut.u_rig.u_lfsr.x) * 24) >> 32, p);
      exp_q.push_back(pack(p, 2));
      t_q.push_back(cycle);
    end
  end

  initial begin : watchdog
    repeat (400_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    while (n_out < 240_000) begin
      en <= ($urandom_range(7) != 0);
      @(posedge clk);
    end
    en <= 1'b0;
    repeat (5) @(posedge clk);
    check(exp_q.size() == 0, "results missing");
    foreach (hist[b]) check(hist[b] > 9500 && hist[b] < 10500, $sformatf("bin %0d count %0d", b, hist[b]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
