// tb_hs_and_tree: self-checking test of the complement detector.
//
// For n = 5 (not a power of two) every input vector is applied; for the
// default n = 32 the all-ones vector, every vector with a single zero, and
// random vectors. The expected output is 1 exactly for the all-ones vector.
module tb_hs_and_tree;

  int checks = 0;
  int failures = 0;

  logic [4:0]  h5 = '0;
  logic        o5;
  logic [31:0] h32 = '0;
  logic        o32;

  hs_and_tree #(.N(5)) d5 (.hs(h5), .all_ones(o5));
  hs_and_tree          d32 (.hs(h32), .all_ones(o32));

  task automatic check(input logic got, input logic expv, input longint unsigned v);
    checks++;
    if (got != expv) begin
      failures++;
      if (failures <= 10) $display("FAIL hs=%0h got %0b", v, got);
    end
  endtask

  initial begin
    #1_000_000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    for (int i = 0; i < 32; i++) begin
      h5 = 5'(i);
      #1;
      check(o5, (i == 31), h5);
    end
    h32 = '1;
    #1;
    check(o32, 1'b1, h32);
    for (int i = 0; i < 32; i++) begin
      h32 = '1;
      h32[i] = 1'b0;
      #1;
      check(o32, 1'b0, h32);
    end
    for (int k = 0; k < 1000; k++) begin
      h32 = $urandom;
      #1;
      check(o32, (h32 == '1), h32);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
