// tb_mod_p1_residue_gen: self-check of the modulo 2^N + 1 residue generator
// with embedded diminished-1 channel at N = 6.
// 1. The worked example X = 54425 (N2 = 13, N1 = 18, N0 = 25): S = 111001,
//    C = 011011, A = S + C + d, results 20 (d = 1) and 19 (d = 0).
// 2. Exhaustive over 0 <= X < 2^(3N) - 2^N for both d, against X % 65 and
//    (X - 1) mod 65.
module tb_mod_p1_residue_gen;
  localparam int unsigned N = 6;
  localparam longint M = (longint'(1) << (3 * N)) - (longint'(1) << N);
  localparam longint MOD = (longint'(1) << N) + 1;

  logic [N-1:0] n2, n1, n0;
  logic         d;
  logic [N:0]   x3;
  int checks = 0, failures = 0;

  mod_p1_residue_gen #(.N(N)) dut (.n2(n2), .n1(n1), .n0(n0), .d(d), .x3(x3));

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s N2=%0d N1=%0d N0=%0d d=%0d x3=%0d", what, n2, n1, n0, d, x3);
    end
  endtask

  initial begin
    // Worked example.
    {n2, n1, n0} = 18'd54425;
    d = 1'b1;
    #1;
    check(dut.s == 6'b111001, "example S");
    check(dut.c == 6'b011011, "example C");
    check({dut.cout, dut.a} == 7'd85, "example A d=1");
    check(x3 == 7'd20, "example x3");
    d = 1'b0;
    #1;
    check({dut.cout, dut.a} == 7'b1010100, "example A d=0");
    check(x3 == 7'd19, "example x3'");

    for (longint xv = 0; xv < M; xv++)
      for (int id = 0; id < 2; id++) begin
        {n2, n1, n0} = (3*N)'(xv);
        d = id[0];
        #1;
        check(longint'(x3) == (id == 1 ? xv % MOD : (xv + MOD - 1) % MOD), "residue");
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
