// weighted_mod_adder: modulo 2^n+1 adder for operands in the weighted
// (ordinary binary) representation, built around a diminished-1 adder.
//
// Operands A and B are (N+1)-bit numbers in 0..2^N; the result S is the
// (N+1)-bit value |A+B| mod 2^N+1, also in 0..2^N. The adder has three parts:
//   1. inv_eac_csa: a carry-save stage with inverted end-around carry turns
//      A and B into two N-bit vectors Y, U with |Y+U+1| = |A+B| mod 2^N+1.
//      Its cost and delay do not grow with N (one half/full adder deep).
//   2. dim1_adder: a diminished-1 adder computes |Y+U+1| mod 2^N+1 on N
//      bits; these are the N low bits of S.
//   3. hs_and_tree: S[N] is 1 only when the sum is 2^N, i.e. when Y and U
//      are bitwise complementary; it is the AND of the diminished-1 adder's
//      half-sum bits, so it adds no delay to the carry path.
// This arrangement follows the published architecture. The parallel-prefix
// form of the diminished-1 adder (Kogge-Stone or Ladner-Fischer, PREFIX) is
// one of the choices the architecture allows; its exact circuit is this
// design's own.
//
// Parameters: N operand width less one (default 32, the widest size in the
// published comparison); PREFIX carry tree of the diminished-1 adder;
// SIMPLIFY_LSB reduced cells at CSA positions 0 and 1 (needs A, B <= 2^N).
// Interface: a, b, s are N+1 bits wide. Purely combinational, no clock.
module weighted_mod_adder
  import mod2n1_pkg::*;
#(
  parameter int unsigned N            = 32,
  parameter prefix_e     PREFIX       = PREFIX_KS,
  parameter bit          SIMPLIFY_LSB = 1'b1
) (
  input  logic [N:0] a,
  input  logic [N:0] b,
  output logic [N:0] s
);

  logic [N-1:0] y, u;          // carry-save pair, |y+u+1| = |a+b|
  logic [N-1:0] hs;            // half-sums y ^ u from the adder's front end
  logic [N-1:0] s_low;
  logic         s_top;

  inv_eac_csa #(
    .N            (N),
    .SIMPLIFY_LSB (SIMPLIFY_LSB)
  ) u_csa (
    .a (a),
    .b (b),
    .y (y),
    .u (u)
  );

  dim1_adder #(
    .N      (N),
    .PREFIX (PREFIX)
  ) u_dim1 (
    .y  (y),
    .u  (u),
    .s  (s_low),
    .hs (hs)
  );

  hs_and_tree #(
    .N (N)
  ) u_msb (
    .hs       (hs),
    .all_ones (s_top)
  );

  assign s = {s_top, s_low};

endmodule
