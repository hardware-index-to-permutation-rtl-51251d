// knuth_shuffle: random permutation generator by the Knuth shuffle.
//
// Starting from the input permutation, stage J (J = 0 .. N-2) exchanges
// element J with itself or with any element to its right, each of the N-J
// choices equally likely.  After the N-1 stages every permutation of the
// input is equally likely (up to the LFSR bias described in rand_int_gen).
// Each stage has its own random integer generator with constant K = N-J and
// its own M-bit LFSR, seeded from SEED by perm_pkg::stage_seed.
//
// Timing: with PIPELINE = 1 a register follows every stage; an input
// permutation taken while en is high leaves N-1 cycles later with out_valid,
// and one permutation is produced per clock.  All LFSRs advance on en, so
// each stage draws a fresh integer for every permutation that passes it.
// With PIPELINE = 0 the cascade is combinational and out_valid = en.  The
// cascade of crossover stages with one random integer generator each, and the
// 32-bit generators, are the paper's; the number of stages follows the
// paper's description of n-1 steps and its three stages for n = 4 (its
// figure numbers the last stage s_{n-1}).  Enable, valid and reset are this
// design's own.
module knuth_shuffle #(
  parameter int          N        = 4,
  parameter int          M        = 32,
  parameter logic [31:0] SEED     = 32'h1,
  parameter bit          PIPELINE = 1'b1,
  parameter int          W        = perm_pkg::elem_width(N)
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                en,
  input  logic [N-1:0][W-1:0] base_perm,
  output logic                out_valid,
  output logic [N-1:0][W-1:0] perm_out
);
  localparam int S = N - 1;

  logic [S:0]          v_q;
  logic [N-1:0][W-1:0] perm_q [S+1];
  logic [N-1:0][W-1:0] perm_d [S];

  assign v_q[0]    = en;
  assign perm_q[0] = base_perm;

  for (genvar j = 0; j < S; j++) begin : g_stage
    localparam int KJ  = N - j;  // choices in this stage
    localparam int R_W = perm_pkg::clog2_wide(perm_pkg::wide_t'(KJ));
    logic [R_W-1:0] r;

    rand_int_gen #(
      .M(M), .K(perm_pkg::wide_t'(KJ)),
      .SEED(perm_pkg::stage_seed(SEED, j, M)), .I_W(R_W)
    ) u_rig (.clk, .rst_n, .en, .i(r));

    knuth_stage #(.N(N), .J(j), .R_W(R_W), .W(W)) u_xover (
      .perm_i(perm_q[j]), .r(r), .perm_o(perm_d[j])
    );

    if (PIPELINE) begin : g_reg
      always_ff @(posedge clk) begin
        if (!rst_n) begin
          v_q[j+1]    <= 1'b0;
          perm_q[j+1] <= '0;
        end else begin
          v_q[j+1]    <= v_q[j];
          perm_q[j+1] <= perm_d[j];
        end
      end
    end else begin : g_comb
      assign v_q[j+1]    = v_q[j];
      assign perm_q[j+1] = perm_d[j];
    end
  end

  assign out_valid = v_q[S];
  assign perm_out  = perm_q[S];

endmodule
