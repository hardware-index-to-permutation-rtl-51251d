// rand_perm_gen: random permutation generator built from a random integer
// generator and the index to permutation converter.
//
// A random integer generator with constant K = N! draws an index
// 0 <= i <= N!-1 from an M-bit LFSR every enabled cycle; the index to
// permutation converter turns it into the N-element permutation of that index
// applied to the identity.  The permutations are uniformly distributed up to
// the LFSR bias described in rand_int_gen (for M = 32 the bias is far below
// one part in a million).
//
// Timing: each cycle with en high draws one index, which enters the converter
// at once; its permutation leaves with out_valid N-1 cycles later when the
// converter is pipelined (PIPELINE = 1), in the same cycle otherwise.  One
// permutation per clock.  The composition is the paper's block diagram; the
// enable and the identity as fixed input permutation are this design's
// choices (the paper gives the identity as the typical input).
module rand_perm_gen #(
  parameter int          N        = 4,
  parameter int          M        = 32,
  parameter logic [31:0] SEED     = 32'h1,
  parameter bit          PIPELINE = 1'b1,
  parameter int          W        = perm_pkg::elem_width(N)
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                en,
  output logic                out_valid,
  output logic [N-1:0][W-1:0] perm_out
);
  localparam int IDX_W = perm_pkg::idx_width(N);

  logic [IDX_W-1:0]    index;
  logic [N-1:0][W-1:0] ident;

  always_comb
    for (int p = 0; p < N; p++) ident[N-1-p] = W'(p);

  rand_int_gen #(.M(M), .K(perm_pkg::fact(N)), .SEED(SEED), .I_W(IDX_W)) u_rig (
    .clk, .rst_n, .en, .i(index)
  );

  idx2perm #(.N(N), .PIPELINE(PIPELINE), .IDX_W(IDX_W), .W(W)) u_conv (
    .clk, .rst_n,
    .in_valid (en),
    .index    (index),
    .base_perm(ident),
    .out_valid(out_valid),
    .perm_out (perm_out)
  );

endmodule
