// decrementer: subtracts a one-bit borrow from an N-bit number, modulo 2^N.
//
// A chain of half subtractors: bit i outputs a[i] ^ br[i] and passes the
// borrow br[i+1] = ~a[i] & br[i] to the next bit. The MSB needs no borrow
// out, so its cell is a single XOR gate. In the modulo 2^N - 1 channel the
// borrow is the inverted CPA carry-out, which removes the +1 that the CPA
// added when no end-around carry occurred. Cell structure and the XOR at the
// MSB follow the published converter.
// Interface: a (N bits), bin in; y = (a - bin) mod 2^N out. Combinational.
module decrementer #(
  parameter int unsigned N = 6
) (
  input  logic [N-1:0] a,
  input  logic         bin,
  output logic [N-1:0] y
);
  logic [N-1:0] br;

  assign br[0] = bin;
  for (genvar i = 0; i < N - 1; i++) begin : g_hs
    assign y[i]    = a[i] ^ br[i];
    assign br[i+1] = ~a[i] & br[i];
  end
  assign y[N-1] = a[N-1] ^ br[N-1];
endmodule
