// tb_csa_eac: exhaustive self-check of the end-around-carry CSA at N = 6.
// For every operand triple it checks the exact identity
//   a + b + c = s + cy + (2^N - 1) * cy[0]
// (the wrapped carry stands for 2^N but was placed at weight 1) and the
// modular identity a + b + c == s + cy (mod 2^N - 1), and that s is the
// bitwise three-input XOR.
module tb_csa_eac;
  localparam int unsigned N = 6;
  localparam longint unsigned MOD = (64'd1 << N) - 1;

  logic [N-1:0] a, b, c, s, cy;
  int checks = 0, failures = 0;

  csa_eac #(.N(N)) dut (.a(a), .b(b), .c(c), .s(s), .cy(cy));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s a=%0d b=%0d c=%0d s=%0d cy=%0d", what, a, b, c, s, cy);
    end
  endtask

  initial begin
    for (int ia = 0; ia < (1 << N); ia++)
      for (int ib = 0; ib < (1 << N); ib++)
        for (int ic = 0; ic < (1 << N); ic++) begin
          a = N'(ia); b = N'(ib); c = N'(ic);
          #1;
          check(longint'(ia + ib + ic) == longint'(s) + longint'(cy) + longint'(MOD * cy[0]), "exact");
          check(longint'(ia + ib + ic) % MOD == (longint'(s) + longint'(cy)) % MOD, "modular");
          check(s == (a ^ b ^ c), "sum");
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
