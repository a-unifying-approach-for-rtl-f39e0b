// tb_inv_eac_csa: self-checking test of the inverted end-around-carry CSA.
//
// For every legal operand pair A, B in 0..2^n (n = 4 and n = 8, with the
// reduced and with the full low cells) and for random pairs at n = 32, it
// checks the defining property of the stage, (Y + U + 1) mod (2^n+1) =
// (A + B) mod (2^n+1), computed in integer arithmetic. It also checks the
// FA+ cells bit by bit: for positions i >= 2, u_i = ~(a_i ^ b_i) and
// y_{i+1} = a_i | b_i.
module tb_inv_eac_csa;

  int checks = 0;
  int failures = 0;

  logic [4:0]  a4 = '0, b4 = '0;
  logic [3:0]  y4s, u4s, y4f, u4f;
  logic [8:0]  a8 = '0, b8 = '0;
  logic [7:0]  y8s, u8s, y8f, u8f;
  logic [32:0] a32 = '0, b32 = '0;
  logic [31:0] y32, u32;

  inv_eac_csa #(.N(4), .SIMPLIFY_LSB(1'b1)) d4s (.a(a4), .b(b4), .y(y4s), .u(u4s));
  inv_eac_csa #(.N(4), .SIMPLIFY_LSB(1'b0)) d4f (.a(a4), .b(b4), .y(y4f), .u(u4f));
  inv_eac_csa #(.N(8), .SIMPLIFY_LSB(1'b1)) d8s (.a(a8), .b(b8), .y(y8s), .u(u8s));
  inv_eac_csa #(.N(8), .SIMPLIFY_LSB(1'b0)) d8f (.a(a8), .b(b8), .y(y8f), .u(u8f));
  inv_eac_csa dflt (.a(a32), .b(b32), .y(y32), .u(u32));

  function automatic void check_pair(input int n, input longint unsigned av,
                                     input longint unsigned bv,
                                     input longint unsigned yv,
                                     input longint unsigned uv);
    longint unsigned m = (64'd1 << n) + 1;
    checks++;
    if ((yv + uv + 1) % m != (av + bv) % m) begin
      failures++;
      if (failures <= 10)
        $display("FAIL n=%0d A=%0d B=%0d Y=%0d U=%0d", n, av, bv, yv, uv);
    end
  endfunction

  function automatic void check_fa_plus(input int n, input longint unsigned av,
                                        input longint unsigned bv,
                                        input longint unsigned yv,
                                        input longint unsigned uv);
    for (int i = 2; i < n; i++) begin
      checks++;
      if (uv[i] != ~(av[i] ^ bv[i]) ||
          (i < n - 1 && yv[i+1] != (av[i] | bv[i])) ||
          (i == n - 1 && yv[0] != ~(av[i] | bv[i]))) begin
        failures++;
        if (failures <= 10)
          $display("FAIL FA+ cell n=%0d bit %0d A=%0d B=%0d", n, i, av, bv);
      end
    end
  endfunction

  function automatic longint unsigned rnd(input int n);
    longint unsigned top = 64'd1 << n;
    if ($urandom_range(7) == 0) return top;
    return {$urandom, $urandom} % top;
  endfunction

  initial begin
    #10_000_000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    for (int i = 0; i <= 16; i++)
      for (int j = 0; j <= 16; j++) begin
        a4 = 5'(i); b4 = 5'(j);
        #1;
        check_pair(4, a4, b4, y4s, u4s);
        check_pair(4, a4, b4, y4f, u4f);
        check_fa_plus(4, a4, b4, y4s, u4s);
      end
    for (int i = 0; i <= 256; i++)
      for (int j = 0; j <= 256; j++) begin
        a8 = 9'(i); b8 = 9'(j);
        #1;
        check_pair(8, a8, b8, y8s, u8s);
        check_pair(8, a8, b8, y8f, u8f);
        check_fa_plus(8, a8, b8, y8f, u8f);
      end
    for (int k = 0; k < 20000; k++) begin
      a32 = 33'(rnd(32)); b32 = 33'(rnd(32));
      if (k == 0) begin a32 = 33'h1_0000_0000; b32 = 33'h1_0000_0000; end
      #1;
      check_pair(32, a32, b32, y32, u32);
      check_fa_plus(32, a32, b32, y32, u32);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
