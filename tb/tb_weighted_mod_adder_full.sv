// tb_weighted_mod_adder_full: the adder at its default parameters.
//
// Instantiates weighted_mod_adder with no parameter overrides (n = 32,
// Kogge-Stone carry tree, reduced low CSA cells) and applies 100,000
// operand pairs: fixed corner cases, pairs summing to exactly 2^n, and
// random pairs in 0..2^n with extra weight on 0 and 2^n. Each result is
// compared with (A + B) mod (2^32 + 1) computed in 64-bit integers. Counts
// results equal to 2^n and operands equal to 2^n, and fails if none occur.
module tb_weighted_mod_adder_full;

  localparam longint unsigned TOP = 64'd1 << 32;
  localparam longint unsigned M   = TOP + 1;

  int checks = 0;
  int failures = 0;
  int n_msb = 0;
  int n_top_operand = 0;

  logic [32:0] a = '0, b = '0, s;

  weighted_mod_adder dut (.a(a), .b(b), .s(s));

  task automatic apply(input longint unsigned av, input longint unsigned bv);
    longint unsigned expv;
    a = 33'(av);
    b = 33'(bv);
    #1;
    expv = (av + bv) % M;
    checks++;
    if (longint'(s) != expv) begin
      failures++;
      if (failures <= 10) $display("FAIL A=%0d B=%0d got %0d expected %0d", av, bv, s, expv);
    end
    if (expv == TOP) n_msb++;
    if (av == TOP || bv == TOP) n_top_operand++;
  endtask

  function automatic longint unsigned rnd();
    case ($urandom_range(7))
      0: return TOP;
      1: return 0;
      default: return longint'($urandom);
    endcase
  endfunction

  initial begin
    #10_000_000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    longint unsigned r;
    apply(0, 0);
    apply(TOP, TOP);
    apply(TOP, 0);
    apply(TOP - 1, TOP - 1);
    apply(TOP, 1);
    apply(1, TOP - 1);
    for (int k = 0; k < 10000; k++) begin
      r = longint'($urandom);
      apply(r, TOP - r);
    end
    for (int k = 0; k < 90000; k++)
      apply(rnd(), rnd());
    checks += 2;
    if (n_msb == 0)         begin failures++; $display("result 2^n never produced"); end
    if (n_top_operand == 0) begin failures++; $display("operand 2^n never applied"); end
    $display("results 2^n: %0d, operands 2^n: %0d", n_msb, n_top_operand);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
