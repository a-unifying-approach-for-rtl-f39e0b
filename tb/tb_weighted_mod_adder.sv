// tb_weighted_mod_adder: end-to-end test of the weighted modulo 2^n+1 adder.
//
// Runs the adder at every operand size of the published comparison (n = 4,
// 8, 16, 32) and with both carry trees and both forms of the low CSA cells:
// every operand pair for n = 4 and n = 8, random pairs plus corner cases
// for n = 16 and n = 32. Results are compared with (A+B) mod (2^n+1)
// computed in integer arithmetic. Each mechanism (result 2^n, end-around
// carry taken, increment applied, both or one operand equal to 2^n) must
// occur at least once, or a failure is counted.
module tb_weighted_mod_adder;
  import mod2n1_pkg::*;

  localparam int NH = 8;

  logic done [NH];
  int   chk  [NH], fl [NH], msb [NH], wrap [NH], inc [NH], both [NH], one [NH];

  wma_harness #(.N(4),  .PREFIX(PREFIX_KS), .SIMPLIFY_LSB(1'b1), .EXHAUSTIVE(1'b1)) h0
    (done[0], chk[0], fl[0], msb[0], wrap[0], inc[0], both[0], one[0]);
  wma_harness #(.N(4),  .PREFIX(PREFIX_LF), .SIMPLIFY_LSB(1'b0), .EXHAUSTIVE(1'b1)) h1
    (done[1], chk[1], fl[1], msb[1], wrap[1], inc[1], both[1], one[1]);
  wma_harness #(.N(8),  .PREFIX(PREFIX_KS), .SIMPLIFY_LSB(1'b1), .EXHAUSTIVE(1'b1)) h2
    (done[2], chk[2], fl[2], msb[2], wrap[2], inc[2], both[2], one[2]);
  wma_harness #(.N(8),  .PREFIX(PREFIX_LF), .SIMPLIFY_LSB(1'b1), .EXHAUSTIVE(1'b1)) h3
    (done[3], chk[3], fl[3], msb[3], wrap[3], inc[3], both[3], one[3]);
  wma_harness #(.N(16), .PREFIX(PREFIX_KS), .SIMPLIFY_LSB(1'b1), .EXHAUSTIVE(1'b0), .NRAND(20000)) h4
    (done[4], chk[4], fl[4], msb[4], wrap[4], inc[4], both[4], one[4]);
  wma_harness #(.N(16), .PREFIX(PREFIX_LF), .SIMPLIFY_LSB(1'b0), .EXHAUSTIVE(1'b0), .NRAND(20000)) h5
    (done[5], chk[5], fl[5], msb[5], wrap[5], inc[5], both[5], one[5]);
  wma_harness #(.N(32), .PREFIX(PREFIX_KS), .SIMPLIFY_LSB(1'b1), .EXHAUSTIVE(1'b0), .NRAND(20000)) h6
    (done[6], chk[6], fl[6], msb[6], wrap[6], inc[6], both[6], one[6]);
  wma_harness #(.N(32), .PREFIX(PREFIX_LF), .SIMPLIFY_LSB(1'b1), .EXHAUSTIVE(1'b0), .NRAND(20000)) h7
    (done[7], chk[7], fl[7], msb[7], wrap[7], inc[7], both[7], one[7]);

  int checks, failures;

  // watchdog: the longest harness needs 257*257 time units
  initial begin
    #1_000_000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    checks = 0; failures = 0;
    #1;  // let every harness clear its done flag first
    wait (done[0] && done[1] && done[2] && done[3] &&
          done[4] && done[5] && done[6] && done[7]);
    for (int k = 0; k < NH; k++) begin
      checks   += chk[k];
      failures += fl[k];
      $display("harness %0d: checks=%0d failures=%0d msb=%0d wrap=%0d inc=%0d both=%0d one=%0d",
               k, chk[k], fl[k], msb[k], wrap[k], inc[k], both[k], one[k]);
      // every mechanism must have happened in every configuration
      checks += 5;
      if (msb[k]  == 0) begin failures++; $display("harness %0d: result 2^n never produced", k); end
      if (wrap[k] == 0) begin failures++; $display("harness %0d: end-around carry never set", k); end
      if (inc[k]  == 0) begin failures++; $display("harness %0d: increment never applied", k); end
      if (both[k] == 0) begin failures++; $display("harness %0d: a_n & b_n never set", k); end
      if (one[k]  == 0) begin failures++; $display("harness %0d: a_n ^ b_n never set", k); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
