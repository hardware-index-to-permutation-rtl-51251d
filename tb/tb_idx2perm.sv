// tb_idx2perm: self-checking test of the index to permutation converter.
//
// Three converters:
//   * N = 4, pipelined: all 24 indices in one burst, compared with the
//     factorial number system table written out by hand (index 0 -> 0123 ...
//     index 23 -> 3210), each result checked to appear exactly N-1 = 3 cycles
//     after its index, one per clock;
//   * N = 10 (default size), pipelined: random indices, including 0 and
//     10!-1, with gaps in in_valid, against a division-based reference model
//     and with a non-identity input permutation;
//   * N = 6, combinational: all 720 indices, same cycle;
//   * N = 32, combinational: random 118-bit indices, including 0 and 32!-1.
module tb_idx2perm;
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

  // ---------------- N = 4, pipelined ----------------
  logic                v4_in = 1'b0, v4_out;
  logic [4:0]          i4 = '0;
  logic [3:0][1:0]     p4;
  // The permutations of indices 0..23 for n = 4, as written in the table of
  // the factorial number system (one digit per element).
  string table4[24] = '{"0123", "0132", "0213", "0231", "0312", "0321",
                        "1023", "1032", "1203", "1230", "1302", "1320",
                        "2013", "2031", "2103", "2130", "2301", "2310",
                        "3012", "3021", "3102", "3120", "3201", "3210"};
  idx2perm #(.N(4)) u4 (.clk, .rst_n, .in_valid(v4_in), .index(i4),
                        .base_perm({2'd0, 2'd1, 2'd2, 2'd3}),
                        .out_valid(v4_out), .perm_out(p4));

  int t4_in[$];   // cycle of each index entered
  int n4_out = 0;
  always @(posedge clk) if (rst_n) begin
    if (v4_out) begin
      string s;
      int t0;
      t0 = t4_in.pop_front();
      s = $sformatf("%0d%0d%0d%0d", p4[3], p4[2], p4[1], p4[0]);
      check(s == table4[n4_out], $sformatf("n=4 index %0d gave %s, table %s", n4_out, s, table4[n4_out]));
      check(cycle - t0 == 3, $sformatf("n=4 latency %0d", cycle - t0));
      n4_out++;
    end
    if (v4_in) t4_in.push_back(cycle);
  end

  // ---------------- N = 10, pipelined ----------------
  localparam int IW10 = 22;
  logic                v10_in = 1'b0, v10_out;
  logic [IW10-1:0]     i10 = '0;
  logic [9:0][3:0]     p10, base10;
  idx2perm u10 (.clk, .rst_n, .in_valid(v10_in), .index(i10), .base_perm(base10),
                .out_valid(v10_out), .perm_out(p10));
  word_t exp10[$];
  int t10_in[$];
  always @(posedge clk) if (rst_n) begin
    if (v10_out) begin
      word_t e;
      int t0;
      e  = exp10.pop_front();
      t0 = t10_in.pop_front();
      check(p10 == 40'(e), $sformatf("n=10 got %h exp %h", p10, e));
      check(cycle - t0 == 9, $sformatf("n=10 latency %0d", cycle - t0));
    end
    if (v10_in) begin
      int p[], q[];
      decode(10, big_t'(i10), p);
      // apply the index's permutation to the input permutation
      q = new[10];
      foreach (p[k]) q[k] = int'(base10[9 - p[k]]);
      exp10.push_back(pack(q, 4));
      t10_in.push_back(cycle);
    end
  end

  // ---------------- N = 6, combinational ----------------
  logic [9:0]      i6;
  logic [5:0][2:0] p6;
  logic            v6;
  idx2perm #(.N(6), .PIPELINE(1'b0)) u6 (.clk, .rst_n, .in_valid(1'b1), .index(i6),
                                         .base_perm({3'd0, 3'd1, 3'd2, 3'd3, 3'd4, 3'd5}),
                                         .out_valid(v6), .perm_out(p6));

  // ---------------- N = 32, combinational (largest size in the study) ----
  localparam int IW32 = 118;  // ceil(log2 32!)
  logic [IW32-1:0]  i32;
  logic [31:0][4:0] p32, base32;
  logic             v32;
  always_comb for (int k = 0; k < 32; k++) base32[31 - k] = 5'(k);
  idx2perm #(.N(32), .PIPELINE(1'b0)) u32 (.clk, .rst_n, .in_valid(1'b1), .index(i32),
                                           .base_perm(base32), .out_valid(v32), .perm_out(p32));

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int p[];
    for (int k = 0; k < 10; k++) base10[9 - k] = 4'(k);
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    // N = 4: all indices back to back
    for (int k = 0; k < 24; k++) begin
      v4_in <= 1'b1; i4 <= 5'(k);
      @(posedge clk);
    end
    v4_in <= 1'b0;
    // N = 10: identity first, then a reversed input permutation
    for (int rep = 0; rep < 2; rep++) begin
      if (rep == 1) for (int k = 0; k < 10; k++) base10[9 - k] = 4'(9 - k);
      for (int k = 0; k < 3000; k++) begin
        logic [IW10-1:0] v;
        if (k == 0) v = '0;
        else if (k == 1) v = IW10'(3628799);
        else v = IW10'($urandom_range(3628799));
        v10_in <= ($urandom_range(3) != 0);
        i10 <= v;
        @(posedge clk);
      end
      v10_in <= 1'b0;
      repeat (12) @(posedge clk);
    end
    // N = 6 combinational, exhaustive
    for (int k = 0; k < 720; k++) begin
      i6 = 10'(k);
      #1;
      decode(6, big_t'(k), p);
      check(p6 == 18'(pack(p, 3)) && v6, $sformatf("n=6 index %0d got %h", k, p6));
    end
    // N = 32 combinational, random indices below 32!
    for (int k = 0; k < 300; k++) begin
      big_t v = {$urandom, $urandom, $urandom, $urandom};
      if (k == 0) v = '0;
      else if (k == 1) v = fact(32) - 1;
      else v = v % fact(32);
      i32 = IW32'(v);
      #1;
      decode(32, v, p);
      check(p32 == 160'(pack(p, 5)), $sformatf("n=32 index %h got %h", v, p32));
    end
    repeat (12) @(posedge clk);
    check(n4_out == 24, $sformatf("n=4 produced %0d results", n4_out));
    check(exp10.size() == 0, "n=10 results missing");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
