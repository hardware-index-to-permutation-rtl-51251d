// tb_workload_derangements: the derangement experiment at 8 and 16 elements.
//
// Two Knuth shuffle generators (N = 8 and N = 16, 32-bit LFSRs, identity
// input) each feed a derangement counter for NPERM permutations, one per
// clock (en held high).  The fraction of derangements of a uniform random
// permutation is d_n / n!, within 1e-5 of 1/e for n >= 8, so total /
// derangements must estimate e: the check allows 1 % (the statistical
// spread at 2^24 permutations is about 0.03 %).  Every output must also be a
// permutation of 0..N-1 (checked on a sample), and the counters must agree
// with the number of valid outputs.  NPERM = 2^24 = 16,777,216, the size of
// the published experiment.
module tb_workload_derangements;
  import perm_ref_pkg::*;

  localparam int NPERM = 1 << 24;

  logic clk = 1'b0, rst_n = 1'b0, en = 1'b0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  logic             v8, v16, d8, d16;
  logic [7:0][2:0]  p8, id8;
  logic [15:0][3:0] p16, id16;
  logic [31:0]      t8, n8, t16, n16;
  int               cnt8 = 0, cnt16 = 0, sample = 0;

  always_comb begin
    for (int k = 0; k < 8; k++)  id8[7 - k]  = 3'(k);
    for (int k = 0; k < 16; k++) id16[15 - k] = 4'(k);
  end

  knuth_shuffle #(.N(8), .SEED(32'h0808_0808)) u_ks8 (
    .clk, .rst_n, .en, .base_perm(id8), .out_valid(v8), .perm_out(p8));
  derangement_counter #(.N(8)) u_dc8 (
    .clk, .rst_n, .clear(1'b0), .valid(v8), .perm(p8),
    .is_derangement(d8), .total(t8), .derangements(n8));
  knuth_shuffle #(.N(16), .SEED(32'h1616_1616)) u_ks16 (
    .clk, .rst_n, .en, .base_perm(id16), .out_valid(v16), .perm_out(p16));
  derangement_counter #(.N(16)) u_dc16 (
    .clk, .rst_n, .clear(1'b0), .valid(v16), .perm(p16),
    .is_derangement(d16), .total(t16), .derangements(n16));

  always @(posedge clk) if (rst_n) begin
    if (v8) cnt8++;
    if (v16) cnt16++;
    sample++;
    if (sample % 4099 == 0) begin
      if (v8)  check(is_perm(word_t'(p8), 8, 3), $sformatf("n=8 output %h", p8));
      if (v16) check(is_perm(word_t'(p16), 16, 4), $sformatf("n=16 output %h", p16));
    end
  end

  initial begin : watchdog
    repeat (NPERM + 1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real e8, e16;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    en <= 1'b1;
    repeat (NPERM) @(posedge clk);
    en <= 1'b0;
    repeat (20) @(posedge clk);
    check(t8 == NPERM && cnt8 == NPERM, $sformatf("n=8 total %0d", t8));
    check(t16 == NPERM && cnt16 == NPERM, $sformatf("n=16 total %0d", t16));
    e8  = real'(t8) / real'(n8);
    e16 = real'(t16) / real'(n16);
    $display("n=8:  %0d derangements of %0d, e estimate %f", n8, t8, e8);
    $display("n=16: %0d derangements of %0d, e estimate %f", n16, t16, e16);
    check(e8 > 2.6912 && e8 < 2.7456, "n=8 e estimate");
    check(e16 > 2.6912 && e16 < 2.7456, "n=16 e estimate");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
