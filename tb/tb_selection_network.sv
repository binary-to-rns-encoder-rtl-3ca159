// tb_selection_network: exhaustive self-check of the modulo 2^N + 1
// correction at N = 6. For every (N+1)-bit A it expects A when A <= 2^N and
// A - (2^N + 1) otherwise, and counts that each of the three cases
// (A < 2^N, A = 2^N, A > 2^N) was exercised.
module tb_selection_network;
  localparam int unsigned N = 6;
  localparam int P = (1 << N);

  logic [N:0] a, x;
  int checks = 0, failures = 0;
  int n_below = 0, n_equal = 0, n_above = 0;

  selection_network #(.N(N)) dut (.a(a), .x(x));

  initial begin
    for (int ia = 0; ia < (1 << (N + 1)); ia++) begin
      a = (N+1)'(ia);
      #1;
      checks++;
      if (ia < P) n_below++; else if (ia == P) n_equal++; else n_above++;
      if (int'(x) != ((ia <= P) ? ia : ia - (P + 1))) begin
        failures++;
        if (failures < 10) $display("FAIL a=%0d x=%0d", a, x);
      end
    end
    checks++;
    if (n_below == 0 || n_equal == 0 || n_above == 0) failures++;
    $display("cases: A<2^N %0d, A=2^N %0d, A>2^N %0d", n_below, n_equal, n_above);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
