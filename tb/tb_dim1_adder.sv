// tb_dim1_adder: self-checking test of the diminished-1 adder.
//
// Checks s = (Y + U + 1) mod (2^n+1), truncated to n bits (0 when the sum is
// 2^n), and hs = Y ^ U, against integer arithmetic: every input pair for
// n = 4 and n = 8 with both carry trees, and for n = 32 (the default size)
// random pairs, bitwise complementary pairs and pairs whose sum crosses 2^n
// by one. Also checks n = 5, a width that is not a power of two.
module tb_dim1_adder;
  import mod2n1_pkg::*;

  int checks = 0;
  int failures = 0;

  logic [3:0]  y4 = '0, u4 = '0;
  logic [3:0]  s4k, s4l, h4k, h4l;
  logic [4:0]  y5 = '0, u5 = '0;
  logic [4:0]  s5k, s5l, h5k, h5l;
  logic [7:0]  y8 = '0, u8 = '0;
  logic [7:0]  s8k, s8l, h8k, h8l;
  logic [31:0] y32 = '0, u32 = '0;
  logic [31:0] s32k, s32l, h32k, h32l;

  dim1_adder #(.N(4), .PREFIX(PREFIX_KS)) d4k (.y(y4), .u(u4), .s(s4k), .hs(h4k));
  dim1_adder #(.N(4), .PREFIX(PREFIX_LF)) d4l (.y(y4), .u(u4), .s(s4l), .hs(h4l));
  dim1_adder #(.N(5), .PREFIX(PREFIX_KS)) d5k (.y(y5), .u(u5), .s(s5k), .hs(h5k));
  dim1_adder #(.N(5), .PREFIX(PREFIX_LF)) d5l (.y(y5), .u(u5), .s(s5l), .hs(h5l));
  dim1_adder #(.N(8), .PREFIX(PREFIX_KS)) d8k (.y(y8), .u(u8), .s(s8k), .hs(h8k));
  dim1_adder #(.N(8), .PREFIX(PREFIX_LF)) d8l (.y(y8), .u(u8), .s(s8l), .hs(h8l));
  dim1_adder                              d32k (.y(y32), .u(u32), .s(s32k), .hs(h32k));
  dim1_adder #(.PREFIX(PREFIX_LF))        d32l (.y(y32), .u(u32), .s(s32l), .hs(h32l));

  function automatic void check(input int n, input longint unsigned yv,
                                input longint unsigned uv,
                                input longint unsigned sv,
                                input longint unsigned hv);
    longint unsigned top  = 64'd1 << n;
    longint unsigned expv = ((yv + uv + 1) % (top + 1)) % top;
    checks++;
    if (sv != expv || hv != (yv ^ uv)) begin
      failures++;
      if (failures <= 10)
        $display("FAIL n=%0d Y=%0d U=%0d s=%0d (exp %0d) hs=%0h", n, yv, uv, sv, expv, hv);
    end
  endfunction

  initial begin
    #10_000_000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++)
      for (int j = 0; j < 16; j++) begin
        y4 = 4'(i); u4 = 4'(j);
        #1;
        check(4, y4, u4, s4k, h4k);
        check(4, y4, u4, s4l, h4l);
      end
    for (int i = 0; i < 32; i++)
      for (int j = 0; j < 32; j++) begin
        y5 = 5'(i); u5 = 5'(j);
        #1;
        check(5, y5, u5, s5k, h5k);
        check(5, y5, u5, s5l, h5l);
      end
    for (int i = 0; i < 256; i++)
      for (int j = 0; j < 256; j++) begin
        y8 = 8'(i); u8 = 8'(j);
        #1;
        check(8, y8, u8, s8k, h8k);
        check(8, y8, u8, s8l, h8l);
      end
    for (int k = 0; k < 30000; k++) begin
      y32 = $urandom;
      case (k % 3)
        0: u32 = $urandom;
        1: u32 = ~y32;                      // sum 2^n - 1: result 2^n
        default: u32 = 32'(0) - y32;        // sum 2^n: end-around carry
      endcase
      #1;
      check(32, y32, u32, s32k, h32k);
      check(32, y32, u32, s32l, h32l);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
