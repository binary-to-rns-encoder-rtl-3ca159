// rns_encoder: memoryless binary to residue (forward) encoder for the moduli
// set {2^N - 1, 2^N, 2^N + 1}, with the modulo 2^N + 1 channel switchable
// between standard and diminished-1 representation.
//
// The 3N-bit input is cut into N2 = x[3N-1:2N], N1 = x[2N-1:N] and
// N0 = x[N-1:0], and the three residues are produced in parallel:
//   x1 = X mod (2^N - 1)   carry-save + carry-propagate + decrementer
//   x2 = X mod 2^N         the low N bits of X
//   x3 = X mod (2^N + 1)   when d = 1
//      = (X - 1) mod (2^N + 1), the diminished-1 code, when d = 0
// x3 is N+1 bits wide because its value can reach 2^N. The valid input range
// is the dynamic range 0 <= X < 2^(3N) - 2^N. The partition and channel
// structure follow the published encoder; d is a plain input standing for its
// hardware switch.
// x2 is wired straight from the input bits, so synthesis reports it as an
// output with no logic behind it; that is the whole modulo 2^N channel.
// Timing: purely combinational, no clock; the critical path is the
// modulo 2^N - 1 channel for N >= 6 and the modulo 2^N + 1 channel below.
module rns_encoder #(
  parameter int unsigned N = 6
) (
  input  logic [3*N-1:0] x,
  input  logic           d,
  output logic [N-1:0]   x1,
  output logic [N-1:0]   x2,
  output logic [N:0]     x3
);
  logic [N-1:0] n2, n1, n0;

  assign {n2, n1, n0} = x;

  mod_m1_residue_gen #(.N(N)) u_m1 (.n2(n2), .n1(n1), .n0(n0), .x1(x1));
  assign x2 = n0;  // modulo 2^N channel: truncation
  mod_p1_residue_gen #(.N(N)) u_p1 (.n2(n2), .n1(n1), .n0(n0), .d(d), .x3(x3));
endmodule
