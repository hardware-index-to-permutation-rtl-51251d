// rand_int_gen: random integer generator, 0 <= i <= K-1.
//
// An M-bit LFSR supplies x, read as a fraction 0 <= x < 1.  Multiplying by
// the constant K gives 0 <= K*x < K, and dropping the M fraction bits (the
// right shift and truncation) leaves the integer i = floor(K*x / 2^M).  As K
// is a constant, the product is a fixed set of shifted copies of x added
// together, which synthesis builds as a shift-and-add network without a
// general multiplier.  Each of the 2^M - 1 LFSR words maps to one integer, so
// some integers are reached by one more word than others: for M = 5 and
// K = 24, seven integers come from two words and seventeen from one.  Larger
// M makes this bias smaller.
//
// Interface: i follows the LFSR register combinationally, so it is valid in
// every cycle and changes on the clock edge after en is high.  The structure
// (generator, constant, multiplier, right shift and truncate) is the paper's;
// the LFSR details are this design's (see lfsr).
module rand_int_gen #(
  parameter int                    M    = 32,
  parameter perm_pkg::wide_t       K    = perm_pkg::wide_t'(24),
  parameter logic [31:0]           SEED = 32'h1,
  parameter int                    I_W  = perm_pkg::clog2_wide(K)
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           en,
  output logic [I_W-1:0] i
);
  localparam int K_W = perm_pkg::bitlen_wide(K);
  localparam logic [K_W-1:0] KC = K_W'(K);

  logic [M-1:0]     x;
  logic [M+K_W-1:0] kx;

  lfsr #(.M(M), .SEED(SEED)) u_lfsr (.clk, .rst_n, .en, .x);

  assign kx = (M + K_W)'(x) * (M + K_W)'(KC);
  assign i  = I_W'(kx >> M);

endmodule
