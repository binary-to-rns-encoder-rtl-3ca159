// mod_m1_residue_gen: binary to modulo 2^N - 1 residue generator.
//
// X = N2*2^(2N) + N1*2^N + N0 and 2^N == 1 (mod 2^N - 1), so
// x1 = (N2 + N1 + N0) mod (2^N - 1). The three N-bit slices are reduced by a
// carry-save adder with end-around carry to S + C. A carry-propagate adder
// with carry-in 1 forms A = S + C + 1. If A overflows (cout = 1) then
// S + C >= 2^N - 1 and the low N bits of A are already S + C - (2^N - 1);
// otherwise the decrementer, driven by NOT cout, takes the +1 back out.
// The structure (CSA with EAC, CPA with inverted end-around carry into a
// decrementer whose MSB cell is an XOR) follows the published converter.
// For X in the dynamic range 0 <= X < 2^(3N) - 2^N the result lies in
// [0, 2^N - 2]; only N2 = N1 = N0 = all ones (outside that range) yields the
// second zero code 2^N - 1.
// Interface: n2, n1, n0 (N bits each) in; x1 (N bits) out. Combinational.
module mod_m1_residue_gen #(
  parameter int unsigned N = 6
) (
  input  logic [N-1:0] n2,
  input  logic [N-1:0] n1,
  input  logic [N-1:0] n0,
  output logic [N-1:0] x1
);
  logic [N-1:0] s, c, a;
  logic         cout;

  csa_eac #(.N(N)) u_csa (.a(n2), .b(n1), .c(n0), .s(s), .cy(c));
  cpa     #(.N(N)) u_cpa (.a(s), .b(c), .cin(1'b1), .sum(a), .cout(cout));
  decrementer #(.N(N)) u_dec (.a(a), .bin(~cout), .y(x1));
endmodule
