// selection_network: final modulo 2^N + 1 correction of A = S + C + d.
//
// A is an (N+1)-bit sum in [0, 2^(N+1) - 1] (a[N] is the CPA carry-out).
// The result is A when A <= 2^N and A - (2^N + 1) otherwise. Subtracting
// 2^N + 1 is done as adding K = 0 1...1 (2^N - 1) and dropping the carry from
// bit N+1. Because K is all ones below bit N, the carries of that addition
// are a prefix OR of the bits of A:
//   p_1 = a_0,  p_(i+1) = p_i | a_i      (p_N = a_(N-1) | ... | a_0)
// A > 2^N exactly when a_N = 1 and p_N = 1, so sel = a_N & p_N, and the
// selected output simplifies to
//   x_0 = a_0 ^ sel
//   x_i = (sel & ~p_i) ^ a_i    for 1 <= i <= N-1
//   x_N = a_N & ~p_N
// These equations and the OR chain are those of the published converter.
// Interface: a (N+1 bits) in; x (N+1 bits) out. Combinational; the OR chain
// is the longest path.
module selection_network #(
  parameter int unsigned N = 6
) (
  input  logic [N:0] a,
  output logic [N:0] x
);
  logic [N:1] p;
  logic       sel;

  assign p[1] = a[0];
  for (genvar i = 1; i < N; i++) begin : g_or
    assign p[i+1] = p[i] | a[i];
  end
  assign sel  = a[N] & p[N];
  assign x[0] = a[0] ^ sel;
  for (genvar i = 1; i < N; i++) begin : g_xor
    assign x[i] = (sel & ~p[i]) ^ a[i];
  end
  assign x[N] = a[N] & ~p[N];

  // A residue modulo 2^N + 1 never exceeds 2^N.
  always_comb begin
    assert (x <= (N+1)'(1 << N))
      else $error("selection_network: result %0d above 2^N", x);
  end
endmodule
