// mod_p1_residue_gen: binary to modulo 2^N + 1 residue generator with an
// embedded diminished-1 channel.
//
// Since 2^N == -1 (mod 2^N + 1), X == N2 - N1 + N0, and -N1 == NOT N1 + 2.
// A carry-save adder with end-around inverted carry reduces N2, NOT N1, N0
// to S, C with N2 + NOT N1 + N0 == S + C - 1, so
//   X     mod (2^N + 1) = (S + C + 1) mod (2^N + 1)    (d = 1)
//   X - 1 mod (2^N + 1) = (S + C)     mod (2^N + 1)    (d = 0, diminished-1)
// The control bit d is the carry-in of the carry-propagate adder, which gives
// the (N+1)-bit A = S + C + d; the selection network then subtracts 2^N + 1
// when A > 2^N. One datapath thus serves both representations, chosen by d.
// The structure follows the published converter.
// Interface: n2, n1, n0 (N bits each), d in; x3 (N+1 bits, value 0..2^N) out.
// Combinational.
module mod_p1_residue_gen #(
  parameter int unsigned N = 6
) (
  input  logic [N-1:0] n2,
  input  logic [N-1:0] n1,
  input  logic [N-1:0] n0,
  input  logic         d,
  output logic [N:0]   x3
);
  logic [N-1:0] s, c, a;
  logic         cout;

  csa_eaic #(.N(N)) u_csa (.a(n2), .b(~n1), .c(n0), .s(s), .cy(c));
  cpa      #(.N(N)) u_cpa (.a(s), .b(c), .cin(d), .sum(a), .cout(cout));
  selection_network #(.N(N)) u_sel (.a({cout, a}), .x(x3));
endmodule
