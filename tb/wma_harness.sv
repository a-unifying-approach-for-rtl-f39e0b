// wma_harness: drives one weighted_mod_adder instance and checks it.
//
// Applies operand pairs A, B in 0..2^N (all pairs when EXHAUSTIVE is set,
// otherwise NRAND random pairs plus fixed corner cases) and compares S with
// (A + B) mod (2^N + 1) worked out with 64-bit integer arithmetic. It also
// counts how often each mechanism of the adder was exercised:
//   n_msb    result equal to 2^N (complement detection sets S[N])
//   n_wrap   diminished-1 stage with carry-out set (no increment)
//   n_inc    diminished-1 stage with carry-out clear (increment by one)
//   n_both   both operand top bits set (D bit 1 cleared)
//   n_one    exactly one operand top bit set (D bit 0 cleared)
// Raises done when finished. Time advances 1 unit per vector.
module wma_harness
  import mod2n1_pkg::*;
#(
  parameter int unsigned N            = 4,
  parameter prefix_e     PREFIX       = PREFIX_KS,
  parameter bit          SIMPLIFY_LSB = 1'b1,
  parameter bit          EXHAUSTIVE   = 1'b1,
  parameter int unsigned NRAND        = 1000
) (
  output logic done,
  output int   checks,
  output int   failures,
  output int   n_msb,
  output int   n_wrap,
  output int   n_inc,
  output int   n_both,
  output int   n_one
);

  localparam longint unsigned TOP = 64'd1 << N;
  localparam longint unsigned M   = TOP + 1;

  logic [N:0] a = '0;
  logic [N:0] b = '0;
  logic [N:0] s;

  weighted_mod_adder #(
    .N            (N),
    .PREFIX       (PREFIX),
    .SIMPLIFY_LSB (SIMPLIFY_LSB)
  ) dut (
    .a (a),
    .b (b),
    .s (s)
  );

  function automatic longint unsigned rand_operand();
    longint unsigned r;
    case ($urandom_range(7))
      0: r = TOP;
      1: r = 0;
      default: r = {$urandom, $urandom} % TOP;
    endcase
    return r;
  endfunction

  task automatic apply(input longint unsigned av, input longint unsigned bv);
    longint unsigned expv, ysum;
    logic ctop;
    a = (N+1)'(av);
    b = (N+1)'(bv);
    #1;
    expv = (av + bv) % M;
    checks++;
    if (longint'(s) != expv) begin
      failures++;
      if (failures <= 10)
        $display("FAIL N=%0d A=%0d B=%0d got %0d expected %0d", N, av, bv, s, expv);
    end
    if (expv == TOP)                 n_msb++;
    // Y + U from eqs. (4)-(5): A_n + B_n + D compressed, top carry
    // (a_{N-1} | b_{N-1}, an FA+ cell) moved to bit 0 inverted
    ysum = (av % TOP) + (bv % TOP) + (TOP - 4)
         + 2 * longint'(!(a[N] && b[N])) + longint'(!(a[N] ^ b[N]));
    ctop = a[N-1] | b[N-1];
    ysum = ysum - (ctop ? TOP : 0) + (ctop ? 0 : 1);
    if (ysum >= TOP)                 n_wrap++;
    else                             n_inc++;
    if (a[N] && b[N])                n_both++;
    if (a[N] ^ b[N])                 n_one++;
  endtask

  initial begin
    done = 0; checks = 0; failures = 0;
    n_msb = 0; n_wrap = 0; n_inc = 0; n_both = 0; n_one = 0;
    if (EXHAUSTIVE) begin
      for (longint unsigned i = 0; i <= TOP; i++)
        for (longint unsigned j = 0; j <= TOP; j++)
          apply(i, j);
    end else begin
      apply(0, 0);
      apply(TOP, TOP);
      apply(TOP, 0);
      apply(0, TOP);
      apply(TOP, 1);
      apply(TOP - 1, 1);
      apply(TOP - 1, TOP - 1);
      apply(TOP, TOP - 1);
      for (longint unsigned k = 0; k < TOP; k += TOP / 16)
        apply(k, TOP - k);           // sums equal to 2^N
      for (int unsigned k = 0; k < NRAND; k++)
        apply(rand_operand(), rand_operand());
    end
    done = 1;
  end

endmodule
