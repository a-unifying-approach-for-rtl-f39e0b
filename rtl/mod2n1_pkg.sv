// mod2n1_pkg: types shared by the modulo 2^n+1 adder modules.
//
// The weighted adder accepts any diminished-1 adder in its final stage. The
// parallel-prefix diminished-1 adder of this library can build its carry
// tree in two ways, selected by a parameter of type prefix_e:
//   PREFIX_KS  Kogge-Stone: every node at every level, fan-out 2, n*log2(n)
//              operators.
//   PREFIX_LF  Ladner-Fischer in its minimum-depth form (often called
//              Sklansky): (n/2)*log2(n) operators, fan-out growing with the
//              level.
// Both have log2(n) levels. The two names are those of the prefix algorithms
// compared for this adder; the exact node placements are this library's.
package mod2n1_pkg;

  typedef enum logic [0:0] {
    PREFIX_KS = 1'b0,
    PREFIX_LF = 1'b1
  } prefix_e;

endpackage
