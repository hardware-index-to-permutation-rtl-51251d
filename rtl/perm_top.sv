// perm_top: the permutation generators side by side.
//
// Three independent units share only the clock and reset:
//   * an index to permutation converter (idx2perm, N_IDX elements): the
//     caller supplies an index 0 <= idx_in < N_IDX! and gets the permutation
//     of that index, applied to the identity, N_IDX-1 cycles later;
//   * a random permutation generator (rand_perm_gen, N_RAND elements): a
//     random index from an LFSR-based random integer generator feeds its own
//     converter;
//   * a Knuth shuffle random permutation generator (knuth_shuffle, N_KNUTH
//     elements) whose output also feeds a derangement counter, the experiment
//     that estimates e as total / derangements.
// Every unit takes one new permutation per clock and is pipelined with one
// register per stage (latency N-1).  Both random generators shuffle the
// identity, which the paper names as the typical input permutation and which
// the derangement count presumes.  Default sizes: 10 elements for the
// converter (the paper's largest measured processor comparison) and 4 for
// the random generators (the paper's random generator examples and
// distribution experiment), with 32-bit LFSRs as in its resource study.
// Permutation words put position 0 in the most significant element slice.
module perm_top #(
  parameter int          N_IDX   = 10,
  parameter int          N_RAND  = 4,
  parameter int          N_KNUTH = 4,
  parameter int          M       = 32,
  parameter int          CNT_W   = 32,
  parameter logic [31:0] SEED_RP = 32'h1234_5678,
  parameter logic [31:0] SEED_KS = 32'hCAFE_F00D,
  localparam int IDX_W = perm_pkg::idx_width(N_IDX),
  localparam int W_IDX = perm_pkg::elem_width(N_IDX),
  localparam int W_RP  = perm_pkg::elem_width(N_RAND),
  localparam int W_KS  = perm_pkg::elem_width(N_KNUTH)
) (
  input  logic                          clk,
  input  logic                          rst_n,
  // index to permutation converter
  input  logic                          idx_valid,
  input  logic [IDX_W-1:0]              idx_in,
  output logic                          idx_out_valid,
  output logic [N_IDX-1:0][W_IDX-1:0]   idx_perm,
  // random permutation generator (random index + converter)
  input  logic                          rp_en,
  output logic                          rp_valid,
  output logic [N_RAND-1:0][W_RP-1:0]   rp_perm,
  // Knuth shuffle generator with derangement count
  input  logic                          ks_en,
  input  logic                          ks_clear,
  output logic                          ks_valid,
  output logic [N_KNUTH-1:0][W_KS-1:0]  ks_perm,
  output logic                          ks_is_derangement,
  output logic [CNT_W-1:0]              ks_total,
  output logic [CNT_W-1:0]              ks_derangements
);
  logic [N_IDX-1:0][W_IDX-1:0]  ident_idx;
  logic [N_KNUTH-1:0][W_KS-1:0] ident_ks;

  always_comb begin
    for (int p = 0; p < N_IDX; p++)   ident_idx[N_IDX-1-p] = W_IDX'(p);
    for (int p = 0; p < N_KNUTH; p++) ident_ks[N_KNUTH-1-p] = W_KS'(p);
  end

  idx2perm #(.N(N_IDX)) u_idx2perm (
    .clk, .rst_n,
    .in_valid (idx_valid),
    .index    (idx_in),
    .base_perm(ident_idx),
    .out_valid(idx_out_valid),
    .perm_out (idx_perm)
  );

  rand_perm_gen #(.N(N_RAND), .M(M), .SEED(SEED_RP)) u_rand_perm (
    .clk, .rst_n,
    .en       (rp_en),
    .out_valid(rp_valid),
    .perm_out (rp_perm)
  );

  knuth_shuffle #(.N(N_KNUTH), .M(M), .SEED(SEED_KS)) u_knuth (
    .clk, .rst_n,
    .en       (ks_en),
    .base_perm(ident_ks),
    .out_valid(ks_valid),
    .perm_out (ks_perm)
  );

  derangement_counter #(.N(N_KNUTH), .CNT_W(CNT_W)) u_derange (
    .clk, .rst_n,
    .clear         (ks_clear),
    .valid         (ks_valid),
    .perm          (ks_perm),
    .is_derangement(ks_is_derangement),
    .total         (ks_total),
    .derangements  (ks_derangements)
  );

endmodule
