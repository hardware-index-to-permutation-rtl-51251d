// tb_rand_int_gen: self-checking test of the random integer generator.
//
//   * M = 5, K = 24: over one full LFSR period (31 words) every output is
//     floor(24 x / 32), all 24 integers occur, seven of them twice and
//     seventeen once (the bias of a too-short generator);
//   * M = 32, K = 24: 240,000 draws, all below 24, each integer within 5 % of
//     10,000 occurrences, every draw equal to floor(24 x / 2^32);
//   * M = 32, K = 10! = 3,628,800: every draw below K and equal to
//     floor(K x / 2^32); the largest and smallest draws span most of the range.
module tb_rand_int_gen;
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

  logic [4:0]  i5;
  logic [4:0]  i24;
  logic [21:0] i10f;
  rand_int_gen #(.M(5), .K(24), .SEED(32'h3)) u5 (.clk, .rst_n, .en, .i(i5));
  rand_int_gen #(.M(32), .K(24), .SEED(32'h1357_9BDF)) u24 (.clk, .rst_n, .en, .i(i24));
  rand_int_gen #(.M(32), .K(3628800), .SEED(32'h2468_ACE1)) u10f (.clk, .rst_n, .en, .i(i10f));

  initial begin : watchdog
    repeat (400_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int hist5[24];
    int hist24[24];
    int twice = 0, once = 0;
    longint mx = 0, mn = 64'd1 << 40;
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    en <= 1'b1;
    @(posedge clk);
    for (int k = 0; k < 240_000; k++) begin
      #1;
      if (k < 31) begin
        check(i5 < 24 && longint'(i5) == (longint'(u5.u_lfsr.x) * 24) >> 5,
              $sformatf("M=5 x=%0d i=%0d", u5.u_lfsr.x, i5));
        if (i5 < 24) hist5[i5]++;
      end
      check(i24 < 24 && longint'(i24) == (longint'(u24.u_lfsr.x) * 24) >> 32,
            $sformatf("K=24 x=%h i=%0d", u24.u_lfsr.x, i24));
      if (i24 < 24) hist24[i24]++;
      check(i10f < 3628800 && longint'(i10f) == (longint'(u10f.u_lfsr.x) * 3628800) >> 32,
            $sformatf("K=10! x=%h i=%0d", u10f.u_lfsr.x, i10f));
      if (longint'(i10f) > mx) mx = longint'(i10f);
      if (longint'(i10f) < mn) mn = longint'(i10f);
      @(posedge clk);
    end
    foreach (hist5[v]) begin
      if (hist5[v] == 2) twice++;
      else if (hist5[v] == 1) once++;
    end
    check(twice == 7 && once == 17, $sformatf("M=5: %0d twice, %0d once", twice, once));
    foreach (hist24[v])
      check(hist24[v] > 9500 && hist24[v] < 10500, $sformatf("K=24 bin %0d count %0d", v, hist24[v]));
    check(mx > 3_500_000 && mn < 100_000, $sformatf("K=10! range %0d..%0d", mn, mx));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
