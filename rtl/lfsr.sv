// lfsr: M-bit linear feedback shift register, the pseudo random number
// generator in front of the random permutation generators.
//
// A Fibonacci LFSR: every enabled clock the register shifts one place toward
// its most significant bit and takes in, at bit 0, the XOR of the tapped
// bits.  The taps (perm_pkg::lfsr_taps) give a maximal-length sequence, so
// from any non-zero seed the register runs through all 2^M - 1 non-zero
// words and never reaches zero, as the paper expects of its generator.
//
// Interface: x is the register itself, read as a fraction 0 <= x < 1 with the
// binary point left of its most significant bit.  Reset (synchronous, active
// low) loads SEED; a zero SEED is replaced by 1.  x changes on the clock edge
// after en is high.  The polynomial, the seed and the one-bit shift per clock
// are this design's choices; the paper names only "an LFSR".
module lfsr #(
  parameter int          M    = 32,
  parameter logic [31:0] SEED = 32'h1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  output logic [M-1:0] x
);
  localparam logic [M-1:0] TAPS  = M'(perm_pkg::lfsr_taps(M));
  localparam logic [M-1:0] SEED0 = (M'(SEED) == '0) ? M'(1) : M'(SEED);

  initial assert (M >= 3 && M <= 32) else $error("lfsr: M must be 3..32");

  always_ff @(posedge clk) begin
    if (!rst_n)  x <= SEED0;
    else if (en) x <= {x[M-2:0], ^(x & TAPS)};
  end

endmodule
