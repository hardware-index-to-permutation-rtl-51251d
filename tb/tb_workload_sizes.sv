// tb_workload_sizes: the permutation sizes of the published measurements.
//
//   * Processor comparison, n = 2..10: the default 10-element converter runs
//     every index below n! for n = 2..9 back to back, one index per clock.
//     An index below n! leaves positions 0..9-n at the identity and permutes
//     only the last n elements, so each smaller size runs on the same
//     converter; the last n positions must hold the n-element permutation of
//     the index (offset by 10-n).  Then 200,000 random 10-element indices.
//     Every result must arrive 9 cycles after its index, one per clock.
//   * Resource study, n = 16 and 32: a 16-element pipelined converter on
//     random indices against the reference model, and a 32-element pipelined
//     Knuth shuffle whose every output must be a permutation.
module tb_workload_sizes;
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

  // 10-element converter at its default parameters
  logic            v10 = 1'b0, v10o;
  logic [21:0]     i10 = '0;
  logic [9:0][3:0] p10, id10;
  int              n_of [$];   // size n that each index belongs to
  always_comb for (int k = 0; k < 10; k++) id10[9 - k] = 4'(k);
  idx2perm u10 (.clk, .rst_n, .in_valid(v10), .index(i10), .base_perm(id10),
                .out_valid(v10o), .perm_out(p10));

  word_t e10_q[$];
  int    t10_q[$];
  int    n_in = 0, n_out = 0;
  always @(posedge clk) if (rst_n) begin
    if (v10o) begin
      word_t e;
      int t0;
      e  = e10_q.pop_front();
      t0 = t10_q.pop_front();
      check(p10 == 40'(e), $sformatf("n=10 converter got %h exp %h", p10, e));
      check(cycle - t0 == 9, $sformatf("latency %0d", cycle - t0));
      n_out++;
    end
    if (v10) t10_q.push_back(cycle);
  end

  task automatic apply10(int n, big_t idx);
    int p[], q[];
    decode(n, idx, p);
    q = new[10];
    for (int k = 0; k < 10 - n; k++) q[k] = k;
    for (int k = 0; k < n; k++) q[10 - n + k] = p[k] + 10 - n;
    v10 <= 1'b1;
    i10 <= 22'(idx);
    e10_q.push_back(pack(q, 4));
    n_in++;
    @(posedge clk);
  endtask

  // 16-element converter
  logic             v16 = 1'b0, v16o;
  logic [44:0]      i16 = '0;
  logic [15:0][3:0] p16, id16;
  always_comb for (int k = 0; k < 16; k++) id16[15 - k] = 4'(k);
  idx2perm #(.N(16)) u16 (.clk, .rst_n, .in_valid(v16), .index(i16), .base_perm(id16),
                          .out_valid(v16o), .perm_out(p16));
  word_t e16_q[$];
  always @(posedge clk) if (rst_n) begin
    if (v16o) begin
      word_t e;
      e = e16_q.pop_front();
      check(p16 == 64'(e), $sformatf("n=16 converter got %h exp %h", p16, e));
    end
    if (v16) begin
      int p[];
      decode(16, big_t'(i16), p);
      e16_q.push_back(pack(p, 4));
    end
  end

  // 32-element Knuth shuffle
  logic             ks_en = 1'b0, v32;
  logic [31:0][4:0] p32, id32;
  int               n32 = 0;
  always_comb for (int k = 0; k < 32; k++) id32[31 - k] = 5'(k);
  knuth_shuffle #(.N(32)) u32 (.clk, .rst_n, .en(ks_en), .base_perm(id32),
                               .out_valid(v32), .perm_out(p32));
  always @(posedge clk) if (rst_n && v32) begin
    check(is_perm(word_t'(p32), 32, 5), $sformatf("n=32 shuffle output %h", p32));
    n32++;
  end

  initial begin : watchdog
    repeat (1_000_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    fork
      begin
        for (int n = 2; n <= 9; n++)
          for (int k = 0; k < int'(fact(n)); k++) apply10(n, big_t'(k));
        for (int k = 0; k < 200_000; k++) apply10(10, big_t'($urandom_range(3628799)));
        v10 <= 1'b0;
      end
      begin
        for (int k = 0; k < 20_000; k++) begin
          big_t v = {$urandom, $urandom};
          v16 <= 1'b1;
          i16 <= 45'(v % fact(16));
          @(posedge clk);
        end
        v16 <= 1'b0;
      end
      begin
        ks_en <= 1'b1;
        repeat (20_000) @(posedge clk);
        ks_en <= 1'b0;
      end
    join
    repeat (40) @(posedge clk);
    check(n_out == n_in && e10_q.size() == 0, $sformatf("n=10 converter %0d in, %0d out", n_in, n_out));
    check(e16_q.size() == 0, "n=16 results missing");
    check(n32 == 20_000, $sformatf("n=32 shuffle produced %0d", n32));
    $display("converter: %0d indices in %0d cycles", n_in, cycle);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
