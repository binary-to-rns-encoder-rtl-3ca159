// tb_mod_m1_residue_gen: exhaustive self-check of the modulo 2^N - 1 residue
// generator at N = 6 over the whole dynamic range 0 <= X < 2^(3N) - 2^N,
// against X % (2^N - 1). It also counts both paths of the channel: CPA
// carry-out set (end-around carry, no decrement) and clear (decrement).
module tb_mod_m1_residue_gen;
  localparam int unsigned N = 6;
  localparam longint M = (longint'(1) << (3 * N)) - (longint'(1) << N);
  localparam longint MOD = (longint'(1) << N) - 1;

  logic [N-1:0] n2, n1, n0, x1;
  int checks = 0, failures = 0;
  int n_carry = 0, n_decr = 0;

  mod_m1_residue_gen #(.N(N)) dut (.n2(n2), .n1(n1), .n0(n0), .x1(x1));

  initial begin
    for (longint xv = 0; xv < M; xv++) begin
      {n2, n1, n0} = (3*N)'(xv);
      #1;
      checks++;
      if (dut.cout) n_carry++; else n_decr++;
      if (longint'(x1) != xv % MOD) begin
        failures++;
        if (failures < 10) $display("FAIL X=%0d x1=%0d expected %0d", xv, x1, xv % MOD);
      end
    end
    checks++;
    if (n_carry == 0 || n_decr == 0) failures++;
    $display("paths: end-around carry %0d, decrement %0d", n_carry, n_decr);
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
