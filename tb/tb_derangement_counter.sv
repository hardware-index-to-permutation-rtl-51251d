// tb_derangement_counter: self-checking test of the derangement counter.
//
// N = 4.  The 24 permutations of 0..3 are presented once each (9 of them
// are derangements: 4!/e rounded), then random 8-bit words with random valid,
// then a clear.  The fixed-point flag and both counters are compared each
// cycle with a count made by the testbench.
module tb_derangement_counter;
  import perm_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0, clear = 1'b0, valid = 1'b0;
  always #5 clk = ~clk;
  logic [3:0][1:0] perm = '0;
  logic            isd;
  logic [31:0]     total, der;

  derangement_counter #(.N(4)) u_dut (.clk, .rst_n, .clear, .valid, .perm,
                                      .is_derangement(isd), .total, .derangements(der));

  int checks = 0, failures = 0;
  int exp_total = 0, exp_der = 0;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s", what);
    end
  endtask

  function automatic bit no_fixed(logic [7:0] v);
    for (int pos = 0; pos < 4; pos++) if (int'(v[7-2*pos -: 2]) == pos) return 1'b0;
    return 1'b1;
  endfunction

  task automatic present(logic [7:0] v, bit vld);
    perm  <= v;
    valid <= vld;
    @(posedge clk);
    #1;
    check(isd == no_fixed(v), $sformatf("flag for %h", v));
    if (vld) begin
      exp_total++;
      if (no_fixed(v)) exp_der++;
    end
    check(total == 32'(exp_total) && der == 32'(exp_der),
          $sformatf("counts %0d/%0d exp %0d/%0d", total, der, exp_total, exp_der));
  endtask

  initial begin : watchdog
    repeat (10_000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int p[];
    repeat (2) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    #1;
    check(total == 0 && der == 0, "reset");
    for (int k = 0; k < 24; k++) begin
      decode(4, big_t'(k), p);
      present(8'(pack(p, 2)), 1'b1);
    end
    check(der == 9 && total == 24, $sformatf("all 24: %0d derangements", der));
    for (int k = 0; k < 2000; k++) present(8'($urandom), $urandom_range(1) == 1);
    clear <= 1'b1;
    @(posedge clk);
    clear <= 1'b0;
    #1;
    exp_total = 0;
    exp_der = 0;
    check(total == 0 && der == 0, "clear");
    for (int k = 0; k < 100; k++) present(8'($urandom), 1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
