// csa_eaic: carry-save adder with end-around inverted carry (modulo 2^N + 1).
//
// A single row of N full adders reduces three N-bit operands to a partial
// sum vector s and a partial carry vector cy. The carry out of bit i goes to
// cy[i+1]. The carry out of the MSB has weight 2^N, congruent to -1 modulo
// 2^N + 1; it is inverted and wrapped into cy[0], using -c = (1 - c) - 1.
// Hence
//   a + b + c == s + cy - 1   (mod 2^N + 1).
// The encoder feeds it N2, NOT N1 and N0; since -N1 = NOT N1 + 2
// (mod 2^N + 1), X mod (2^N + 1) = s + cy + 1 and (X - 1) = s + cy.
// The row and the inverted wrap-around follow the published converter; the
// inversion of N1 is left to the caller.
// Interface: a, b, c in; s, cy out; all N bits. Combinational, one FA delay.
module csa_eaic #(
  parameter int unsigned N = 6
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic [N-1:0] c,
  output logic [N-1:0] s,
  output logic [N-1:0] cy
);
  logic [N-1:0] co;

  if (N < 2) begin : g_bad_width
    $error("N must be at least 2");
  end

  for (genvar i = 0; i < N; i++) begin : g_fa
    full_adder u_fa (.a(a[i]), .b(b[i]), .ci(c[i]), .s(s[i]), .co(co[i]));
  end

  // Rotate: carry of bit i feeds position i+1, MSB carry wraps inverted.
  assign cy = {co[N-2:0], ~co[N-1]};
endmodule
