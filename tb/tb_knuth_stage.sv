// tb_knuth_stage: self-checking test of the Knuth shuffle crossover stage.
//
// Every stage J = 0..3 of a 5-element shuffle gets random input
// permutations and every offset r = 0..N-1-J, plus the out-of-range offsets
// the r width allows.  Expected: positions J and J+r exchanged (nothing
// changes for r = 0 or an out-of-range r), all other positions unchanged.
module tb_knuth_stage;
  import perm_ref_pkg::*;

  localparam int N = 5;
  localparam int W = 3;
  localparam int RW = 3;

  logic [N-1:0][W-1:0] pin [N-1];
  logic [N-1:0][W-1:0] pout [N-1];
  logic [RW-1:0]       r [N-1];

  int checks = 0, failures = 0;

  for (genvar j = 0; j < N - 1; j++) begin : g_dut
    knuth_stage #(.N(N), .J(j), .R_W(RW), .W(W)) u_dut (
      .perm_i(pin[j]), .r(r[j]), .perm_o(pout[j]));
  end

  initial begin : watchdog
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int p[], e[];
    for (int rep = 0; rep < 50; rep++) begin
      decode(N, big_t'($urandom_range(119)), p);
      for (int j = 0; j < N - 1; j++) begin
        for (int rr = 0; rr < (1 << RW); rr++) begin
          for (int q = 0; q < N - 1; q++) begin
            pin[q] = (N*W)'(pack(p, W));
            r[q]   = RW'(rr);
          end
          #1;
          e = p;
          if (rr > 0 && j + rr < N) begin
            e[j]      = p[j + rr];
            e[j + rr] = p[j];
          end
          checks++;
          if (pout[j] != (N*W)'(pack(e, W))) begin
            failures++;
            if (failures < 10) $display("FAIL J=%0d r=%0d in %h out %h exp %h", j, rr, pin[j], pout[j], pack(e, W));
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
