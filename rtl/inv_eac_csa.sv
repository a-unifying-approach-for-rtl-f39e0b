// inv_eac_csa: simplified carry-save stage with inverted end-around carry.
//
// This is the constant-time front end that lets a diminished-1 adder add
// operands in the ordinary (weighted) representation modulo 2^n+1. Operands
// A and B are (N+1)-bit numbers in 0..2^N. Writing A = a_N*2^N + A_n and
// B = b_N*2^N + B_n, the two top bits are folded into an N-bit constant
//     D = 2^N - 4 + 2*~(a_N & b_N) + ~(a_N ^ b_N)   (bits 11..1 d1 d0)
// so that |A+B| mod 2^N+1 = |A_n + B_n + D + 2| mod 2^N+1. A row of N full
// adders compresses A_n, B_n and D into a carry vector c and a sum vector u.
// The carry out of the top position has weight 2^N, which is -1 modulo
// 2^N+1; it is therefore inverted and re-enters at bit 0, absorbing one of
// the two added ones. The outputs satisfy
//     |Y + U + 1| mod 2^N+1 = |A + B| mod 2^N+1,
// with Y = {c[N-2:0], ~c[N-1]} and U = u, both N-bit numbers; a diminished-1
// adder finishes the addition.
//
// Cells, as in the published architecture:
//   - positions 2..N-1 ("FA+"): the D bit is a constant 1, so the cell is a
//     half-adder-sized circuit: carry = a|b, sum = ~(a^b).
//   - position 1: full adder on a1, b1 and d1 = NAND(a_N, b_N).
//   - position 0: full adder on a0, b0 and d0 = XNOR(a_N, b_N).
// With SIMPLIFY_LSB = 1 (default) positions 1 and 0 use reduced circuits
// that rely on a legal operand never having its top bit and a low bit set
// together (A <= 2^N):
//     c1 = a1 | b1                 u1 = ~((a1 ^ b1) | (a_N & b_N))
//     c0 = (a0 | b0) & ~(a_N|b_N)  u0 = ~(a0 ^ b0 ^ a_N ^ b_N)
// These equations are derived here from the full-adder equations under that
// rule; the gate-level form of the reduced cells is this design's own.
// With SIMPLIFY_LSB = 0 positions 1 and 0 are plain full adders, which also
// give the right answer for any A_n, B_n.
//
// Interface: a, b are N+1 bits wide; y, u are N bits wide. Purely
// combinational, one full-adder delay at most. N must be at least 3.
module inv_eac_csa #(
  parameter int unsigned N            = 32,
  parameter bit          SIMPLIFY_LSB = 1'b1
) (
  input  logic [N:0]   a,
  input  logic [N:0]   b,
  output logic [N-1:0] y,
  output logic [N-1:0] u
);

  logic          an, bn;
  logic          d1, d0;       // the two variable bits of D
  logic [N-1:0]  c;            // carry of position i, weight 2^(i+1)
  logic [N-1:0]  us;           // sum of position i, weight 2^i

  assign an = a[N];
  assign bn = b[N];
  assign d1 = ~(an & bn);      // ~c_{n+1}
  assign d0 = ~(an ^ bn);      // ~s_n

  always_comb begin
    // FA+ cells: third operand fixed at 1
    for (int unsigned i = 2; i < N; i++) begin
      c[i]  = a[i] | b[i];
      us[i] = ~(a[i] ^ b[i]);
    end
    // the two least significant cells
    if (SIMPLIFY_LSB) begin
      c[1]  = a[1] | b[1];
      us[1] = ~((a[1] ^ b[1]) | (an & bn));
      c[0]  = (a[0] | b[0]) & ~(an | bn);
      us[0] = ~(a[0] ^ b[0] ^ an ^ bn);
    end else begin
      c[1]  = (a[1] & b[1]) | (d1 & (a[1] ^ b[1]));
      us[1] = a[1] ^ b[1] ^ d1;
      c[0]  = (a[0] & b[0]) | (d0 & (a[0] ^ b[0]));
      us[0] = a[0] ^ b[0] ^ d0;
    end
  end

  // carries move up one position; the top one re-enters inverted at bit 0
  assign y = {c[N-2:0], ~c[N-1]};
  assign u = us;

  // legal weighted operands lie in 0..2^N
  always_comb begin
    assert (!(an && (a[N-1:0] != '0))) else $error("inv_eac_csa: operand a exceeds 2^N");
    assert (!(bn && (b[N-1:0] != '0))) else $error("inv_eac_csa: operand b exceeds 2^N");
  end

endmodule
