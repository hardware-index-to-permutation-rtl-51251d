// knuth_stage: one crossover stage of the Knuth shuffle.
//
// Stage J exchanges element J of the permutation with element J+r, where
// 0 <= r <= N-1-J comes from the stage's own random integer generator; r = 0
// leaves the permutation unchanged (the element is exchanged with itself).
// Positions before J pass straight through.  Each position J+k, k >= 1, is a
// two-way crossover with position J enabled by r == k, so the stage holds
// N-1-J crossovers, as counted in the paper.
//
// Purely combinational.  An r above N-1-J (which the generator never
// produces) leaves the permutation unchanged.
module knuth_stage #(
  parameter int N   = 4,
  parameter int J   = 0,
  parameter int R_W = $clog2(N - J),
  parameter int W   = perm_pkg::elem_width(N)
) (
  input  logic [N-1:0][W-1:0] perm_i,
  input  logic [R_W-1:0]      r,       // offset of the partner element
  output logic [N-1:0][W-1:0] perm_o
);
  always_comb begin
    perm_o = perm_i;
    for (int k = 1; k < N - J; k++) begin
      if (r == R_W'(k)) begin
        perm_o[N-1-J]     = perm_i[N-1-(J+k)];
        perm_o[N-1-(J+k)] = perm_i[N-1-J];
      end
    end
  end

endmodule
