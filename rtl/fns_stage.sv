// fns_stage: one stage of the factorial-number-system index to permutation
// converter.
//
// Stage J of an N-element converter sees the running index (the original
// index less what the higher factorial digits already accounted for, so it
// lies below (N-J)!) and the partial permutation, whose positions 0..J-1 are
// settled and whose positions J..N-1 hold the M = N-J still unassigned
// elements in order.  With F = (M-1)! the stage:
//   * compares the index with k*F for k = 1..M-1 (ge[k]); ge[0] is always 1,
//     so the comparators form a thermometer code of the digit s = #ge - 1;
//   * turns the thermometer into a one-hot code, onehot[k] = ge[k] & ~ge[k+1];
//   * uses the one-hot code twice: to pick the subtrahend s*F (a one-hot
//     multiplexer of the constants M-1*F .. 0) for the index subtractor, and
//     to pick the element at position J+s, which becomes element J;
//   * closes the gap that element leaves: position J+k (k >= 1) takes the
//     element from position J+k-1 when ge[k] is set, else keeps its own.
// The comparator/one-hot/subtractor arrangement and the two-input shift
// multiplexers follow the converter figure of the paper; the figure drives the
// selected element onto a shared line through tri-state buffers, which is
// written here as an AND-OR one-hot selector.
//
// Purely combinational.  An index at or above M! saturates the digit at M-1,
// so the stage always emits a permutation of its input.
module fns_stage #(
  parameter int N     = 4,
  parameter int J     = 0,
  parameter int IDX_W = perm_pkg::idx_width(N),
  parameter int W     = perm_pkg::elem_width(N)
) (
  input  logic [IDX_W-1:0]      idx_i,   // running index into this stage
  input  logic [N-1:0][W-1:0]   perm_i,  // partial permutation in
  output logic [IDX_W-1:0]      idx_o,   // index less s_J * (N-J-1)!
  output logic [N-1:0][W-1:0]   perm_o,  // position J now settled
  output logic [W-1:0]          digit_o  // factorial digit s_J found here
);
  import perm_pkg::*;

  localparam int M = N - J;               // unassigned elements
  // Weight of this stage's digit, (M-1)!, in the index width.
  localparam logic [IDX_W-1:0] F = IDX_W'(fact(M - 1));

  logic [M:0]   ge;      // ge[k]: index >= k*F; ge[M] = 0 closes the code
  logic [M-1:0] onehot;  // onehot[k]: digit equals k

  always_comb begin
    ge[0] = 1'b1;
    for (int k = 1; k < M; k++)
      ge[k] = ({1'b0, idx_i} >= (IDX_W + 1)'(k) * {1'b0, F});
    ge[M] = 1'b0;
    for (int k = 0; k < M; k++)
      onehot[k] = ge[k] & ~ge[k+1];
  end

  always_comb begin
    logic [IDX_W-1:0] sub;
    logic [W-1:0]     sel;
    logic [W-1:0]     dig;
    sub = '0;
    sel = '0;
    dig = '0;
    for (int k = 0; k < M; k++) begin
      sub |= {IDX_W{onehot[k]}} & IDX_W'(k * F);
      sel |= {W{onehot[k]}} & perm_i[N-1-(J+k)];
      dig |= {W{onehot[k]}} & W'(k);
    end
    idx_o   = idx_i - sub;
    digit_o = dig;
    for (int p = 0; p < N; p++) begin
      if (p < J)       perm_o[N-1-p] = perm_i[N-1-p];
      else if (p == J) perm_o[N-1-p] = sel;
      else             perm_o[N-1-p] = ge[p-J] ? perm_i[N-p] : perm_i[N-1-p];
    end
  end

endmodule
