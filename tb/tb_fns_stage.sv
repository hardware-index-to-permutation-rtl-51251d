// tb_fns_stage: self-checking test of one converter stage.
//
// Instantiates every stage J = 0..N-2 of a 5-element converter and drives
// each with random partial permutations and every running index below
// (N-J)!, plus indices above that range.  Expected values come from division:
// digit = index / (N-J-1)!, index out = index % (N-J-1)!, element J = the
// digit-th unassigned element, the other unassigned elements kept in order.
// Out-of-range indices must saturate the digit at N-J-1.
module tb_fns_stage;
  import perm_ref_pkg::*;

  localparam int N     = 5;
  localparam int IDX_W = 7;   // ceil(log2 120)
  localparam int W     = 3;

  logic [IDX_W-1:0]    idx_i  [N-1];
  logic [N-1:0][W-1:0] perm_i [N-1];
  logic [IDX_W-1:0]    idx_o  [N-1];
  logic [N-1:0][W-1:0] perm_o [N-1];
  logic [W-1:0]        dig_o  [N-1];

  int checks = 0, failures = 0;

  for (genvar j = 0; j < N - 1; j++) begin : g_dut
    fns_stage #(.N(N), .J(j), .IDX_W(IDX_W), .W(W)) u_dut (
      .idx_i(idx_i[j]), .perm_i(perm_i[j]),
      .idx_o(idx_o[j]), .perm_o(perm_o[j]), .digit_o(dig_o[j])
    );
  end

  task automatic check_stage(int j, int idx, int p[]);
    int m = N - j;
    int f = int'(fact(m - 1));
    int d = idx / f;
    int r = idx % f;
    int rem[$];
    int expd[];
    if (d > m - 1) begin  // saturated digit for an out-of-range index
      d = m - 1;
      r = idx - d * f;
    end
    expd = new[N];
    for (int q = j; q < N; q++) rem.push_back(p[q]);
    for (int q = 0; q < j; q++) expd[q] = p[q];
    expd[j] = rem[d];
    rem.delete(d);
    for (int q = j + 1; q < N; q++) expd[q] = rem[q - j - 1];
    checks++;
    if (perm_o[j] !== (N*W)'(pack(expd, W)) || int'(idx_o[j]) != r || int'(dig_o[j]) != d) begin
      failures++;
      if (failures < 10)
        $display("FAIL stage %0d idx %0d: perm %h (exp %h) idx %0d (exp %0d) digit %0d (exp %0d)",
                 j, idx, perm_o[j], pack(expd, W), idx_o[j], r, dig_o[j], d);
    end
  endtask

  initial begin : watchdog
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int p[];
    for (int rep = 0; rep < 20; rep++) begin
      // a random permutation of 0..N-1 as the partial permutation
      decode(N, big_t'($urandom_range(int'(fact(N)) - 1)), p);
      for (int j = 0; j < N - 1; j++) begin
        int lim = int'(fact(N - j));
        for (int idx = 0; idx < lim + 3; idx++) begin
          if (idx >= lim && j == 0) continue;  // stage 0 index range is the input width
          for (int q = 0; q < N - 1; q++) begin
            idx_i[q]  = IDX_W'(idx);
            perm_i[q] = (N*W)'(pack(p, W));
          end
          #1;
          check_stage(j, idx, p);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
