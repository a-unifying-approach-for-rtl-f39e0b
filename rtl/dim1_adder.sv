// dim1_adder: parallel-prefix diminished-1 modulo 2^n+1 adder.
//
// Computes s = |Y + U + 1| mod 2^N+1 for N-bit inputs Y, U, returned on N
// bits: the integer sum Y+U is incremented exactly when its carry-out is 0,
// and the carry-out is dropped otherwise. When Y+U = 2^N-1 the true result is
// 2^N, which does not fit in N bits; s is then 0 and the half-sum vector hs
// is all ones, which the caller uses to tell this case apart.
//
// Structure:
//   1. preprocessing: g = Y & U, hs = Y ^ U (the half-sum, also used as
//      propagate), one gate level; hs is brought out as a port.
//   2. a log2(N)-level prefix tree for the group terms (G, P) of bits i..0,
//      Kogge-Stone or Ladner-Fischer (minimum-depth form), set by PREFIX.
//   3. one extra level for the inverted end-around carry: the carry-in is
//      cin = ~G[N-1:0], and the carry into bit i is
//      G[i-1:0] | (P[i-1:0] & cin). Using the carry-out of the addition done
//      with carry-in 0 avoids the feedback loop of a plain adder whose
//      inverted carry-out is wired to its carry-in.
//   4. sum: s = hs ^ carries.
// Any diminished-1 adder can be put in this place; this prefix form with a
// final carry-increment level is a simple choice made here, not a copy of a
// particular published circuit.
//
// Interface: y, u, s, hs are N bits wide. Purely combinational, depth about
// log2(N) + 3 gate levels. N must be at least 2.
module dim1_adder
  import mod2n1_pkg::*;
#(
  parameter int unsigned N      = 32,
  parameter prefix_e     PREFIX = PREFIX_KS
) (
  input  logic [N-1:0] y,
  input  logic [N-1:0] u,
  output logic [N-1:0] s,
  output logic [N-1:0] hs
);

  localparam int unsigned L = $clog2(N);

  logic [N-1:0] gp [0:L];      // group generate of bits i..(window start)
  logic [N-1:0] pp [0:L];      // group propagate of the same window
  logic         cin;           // inverted end-around carry
  logic [N-1:0] carry;         // carry into bit i

  always_comb begin
    gp[0] = y & u;
    pp[0] = y ^ u;
    for (int unsigned l = 0; l < L; l++) begin
      gp[l+1] = gp[l];
      pp[l+1] = pp[l];
      for (int unsigned i = 0; i < N; i++) begin
        if (PREFIX == PREFIX_KS) begin
          // Kogge-Stone: combine with the node 2^l positions below
          if (i >= (1 << l)) begin
            gp[l+1][i] = gp[l][i] | (pp[l][i] & gp[l][i - (1 << l)]);
            pp[l+1][i] = pp[l][i] & pp[l][i - (1 << l)];
          end
        end else begin
          // Ladner-Fischer / Sklansky: bits with bit l set combine with the
          // top node of the lower half of their 2^(l+1) block
          if (((i >> l) & 1) == 1) begin
            gp[l+1][i] = gp[l][i] | (pp[l][i] & gp[l][((i >> l) << l) - 1]);
            pp[l+1][i] = pp[l][i] & pp[l][((i >> l) << l) - 1];
          end
        end
      end
    end
  end

  assign hs  = pp[0];
  assign cin = ~gp[L][N-1];

  always_comb begin
    carry[0] = cin;
    for (int unsigned i = 1; i < N; i++)
      carry[i] = gp[L][i-1] | (pp[L][i-1] & cin);
  end

  assign s = hs ^ carry;

endmodule
