// csa_eac: carry-save adder with end-around carry (modulo 2^N - 1).
//
// A single row of N full adders reduces three N-bit operands to a partial
// sum vector s and a partial carry vector cy. The carry out of bit i is
// weighted 2^(i+1), so it is placed in cy[i+1]; the carry out of the MSB
// has weight 2^N, which is congruent to 1 modulo 2^N - 1, so it wraps
// around into cy[0]. Hence
//   a + b + c == s + cy   (mod 2^N - 1).
// The row and the wrap-around follow the published converter; handing the
// carry vector out already rotated is this design's choice.
// Interface: a, b, c in; s, cy out; all N bits. Combinational, one FA delay.
module csa_eac #(
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

  // Rotate: carry of bit i feeds position i+1, MSB carry wraps to bit 0.
  assign cy = {co[N-2:0], co[N-1]};
endmodule
