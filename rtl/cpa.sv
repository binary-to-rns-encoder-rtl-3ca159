// cpa: N-bit carry-propagate (ripple-carry) adder.
//
// A chain of N full adders computes {cout, sum} = a + b + cin. Both residue
// channels use it after their carry-save row: the modulo 2^N - 1 channel with
// cin tied to 1 (the LSB cell then acts as a half adder with an inverter),
// the modulo 2^N + 1 channel with cin = d, the channel-select switch.
// The ripple structure follows the published converter; a parallel-prefix
// adder could replace it without changing the interface.
// Interface: a, b (N bits), cin in; sum (N bits), cout out.
// Combinational; the carry ripples through N cells.
module cpa #(
  parameter int unsigned N = 6
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic         cin,
  output logic [N-1:0] sum,
  output logic         cout
);
  logic [N:0] c;

  assign c[0] = cin;
  for (genvar i = 0; i < N; i++) begin : g_fa
    full_adder u_fa (.a(a[i]), .b(b[i]), .ci(c[i]), .s(sum[i]), .co(c[i+1]));
  end
  assign cout = c[N];
endmodule
