// derangement_counter: counts generated permutations and, among them, the
// derangements (permutations with no fixed point).
//
// A permutation on 0..N-1 has a fixed point at position p when its element p
// equals p.  For every cycle with valid high the counter adds one to total and,
// when no position is a fixed point, one to derangements.  Since the number
// of derangements of N elements is the integer nearest N!/e, the ratio
// total/derangements of a uniform random permutation source approaches e.
//
// Interface: clear (synchronous) and reset zero both counters; the counts are
// registered and include a valid permutation from the cycle after it is
// presented.  Counters wrap at 2^CNT_W.  The paper gives the experiment; the
// counter itself, its width and its clear are this design's own.
module derangement_counter #(
  parameter int N     = 4,
  parameter int CNT_W = 32,
  parameter int W     = perm_pkg::elem_width(N)
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                clear,
  input  logic                valid,
  input  logic [N-1:0][W-1:0] perm,
  output logic                is_derangement,  // current perm has no fixed point
  output logic [CNT_W-1:0]    total,
  output logic [CNT_W-1:0]    derangements
);
  always_comb begin
    is_derangement = 1'b1;
    for (int p = 0; p < N; p++)
      if (perm[N-1-p] == W'(p)) is_derangement = 1'b0;
  end

  always_ff @(posedge clk) begin
    if (!rst_n || clear) begin
      total        <= '0;
      derangements <= '0;
    end else if (valid) begin
      total <= total + 1'b1;
      if (is_derangement) derangements <= derangements + 1'b1;
    end
  end

endmodule
