// full_adder: one-bit full adder cell, the "FA" box of the converter
// schematics. Every carry-save and carry-propagate row in this encoder is
// built from this cell. Purely combinational.
//   s  = a ^ b ^ ci
//   co = majority(a, b, ci)
module full_adder (
  input  logic a,
  input  logic b,
  input  logic ci,
  output logic s,
  output logic co
);
  always_comb begin
    s  = a ^ b ^ ci;
    co = (a & b) | (a & ci) | (b & ci);
  end
endmodule
