// hs_and_tree: complement detector for the most significant result bit.
//
// The weighted modulo 2^n+1 sum equals 2^n exactly when the two N-bit
// vectors fed to the diminished-1 adder are bitwise complementary, that is
// when every half-sum bit y_i ^ u_i is 1. This block ANDs the half-sum
// vector, which the diminished-1 adder already computes in its
// preprocessing, as a balanced tree of two-input AND gates: ceil(log2(N))
// levels, off the adder's carry path. Tree leaves beyond N are tied to 1.
//
// Interface: hs is N bits wide, all_ones is 1 bit. Purely combinational.
module hs_and_tree #(
  parameter int unsigned N = 32
) (
  input  logic [N-1:0] hs,
  output logic         all_ones
);

  localparam int unsigned L = $clog2(N);
  localparam int unsigned W = 1 << L;

  logic [W-1:0] lvl [0:L];

  always_comb begin
    lvl[0] = '1;
    lvl[0][N-1:0] = hs;
    for (int unsigned l = 1; l <= L; l++) begin
      lvl[l] = '0;
      for (int unsigned i = 0; i < (W >> l); i++)
        lvl[l][i] = lvl[l-1][2*i] & lvl[l-1][2*i+1];
    end
  end

  assign all_ones = lvl[L][0];

endmodule
