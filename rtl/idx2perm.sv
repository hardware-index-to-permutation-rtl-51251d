// idx2perm: index to permutation converter based on the factorial number
// system.
//
// An index 0 <= index < N! is written in the factorial number system as
// index = s_{N-1}(N-1)! + ... + s_1 1!, 0 <= s_i <= i.  Each digit picks one
// element of what is still unassigned in the input permutation: the leading
// digit picks the first element, the next digit the second among the rest,
// and so on (the Lehmer code of the permutation).  With the identity as input
// permutation, index 0 gives 0123..., index N!-1 gives the reversed identity,
// and the permutations come out in lexicographic order of the index.
//
// The converter is a cascade of N-1 fns_stage blocks: stage J finds digit
// s_{N-1-J} with greedy comparisons against multiples of (N-1-J)!, subtracts
// its contribution from the running index and settles position J.  The last
// position needs no stage of its own.
//
// Timing: with PIPELINE = 1 a register follows every stage, so a result
// appears N-1 clock cycles after its index (out_valid follows in_valid) and a
// new index can be accepted every cycle.  With PIPELINE = 0 the cascade is
// purely combinational from index to perm_out (out_valid = in_valid).  The
// cascade and the pipelining by one register per stage are the paper's; the
// valid bit that travels with the data and the synchronous active-low reset
// are this design's own.  The input permutation (base_perm) is sampled with
// the index, like the index itself.
module idx2perm #(
  parameter int N        = 10,
  parameter bit PIPELINE = 1'b1,
  parameter int IDX_W    = perm_pkg::idx_width(N),
  parameter int W        = perm_pkg::elem_width(N)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  in_valid,
  input  logic [IDX_W-1:0]      index,
  input  logic [N-1:0][W-1:0]   base_perm,  // usually the identity
  output logic                  out_valid,
  output logic [N-1:0][W-1:0]   perm_out
);
  localparam int S = N - 1;  // number of stages

  // Stage boundaries: entry b feeds stage b, entry S is the result.
  logic [S:0]                  v_q;
  logic [IDX_W-1:0]            idx_q  [S+1];
  logic [N-1:0][W-1:0]         perm_q [S+1];
  logic [IDX_W-1:0]            idx_d  [S];
  logic [N-1:0][W-1:0]         perm_d [S];

  assign v_q[0]    = in_valid;
  assign idx_q[0]  = index;
  assign perm_q[0] = base_perm;

  for (genvar j = 0; j < S; j++) begin : g_stage
    logic [W-1:0] digit_unused;
    fns_stage #(.N(N), .J(j), .IDX_W(IDX_W), .W(W)) u_stage (
      .idx_i  (idx_q[j]),
      .perm_i (perm_q[j]),
      .idx_o  (idx_d[j]),
      .perm_o (perm_d[j]),
      .digit_o(digit_unused)
    );

    if (PIPELINE) begin : g_reg
      always_ff @(posedge clk) begin
        if (!rst_n) begin
          v_q[j+1]    <= 1'b0;
          idx_q[j+1]  <= '0;
          perm_q[j+1] <= '0;
        end else begin
          v_q[j+1]    <= v_q[j];
          idx_q[j+1]  <= idx_d[j];
          perm_q[j+1] <= perm_d[j];
        end
      end
    end else begin : g_comb
      assign v_q[j+1]    = v_q[j];
      assign idx_q[j+1]  = idx_d[j];
      assign perm_q[j+1] = perm_d[j];
    end
  end

  assign out_valid = v_q[S];
  assign perm_out  = perm_q[S];

endmodule
