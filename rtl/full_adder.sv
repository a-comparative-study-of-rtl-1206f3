// One-bit full adder, the cell every ripple carry adder in this design is
// built from. It is purely combinational:
//   s  = a ^ b ^ ci
//   co = a&b | (a|b)&ci
// exactly the sum and carry equations of the carry select adder's building
// block. Ports: a, b (operand bits), ci (carry from the less significant
// bit), s (sum bit), co (carry to the next bit). No clock; output settles
// one full-adder delay after the inputs.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic ci,
  output logic s,
  output logic co
);
  always_comb begin
    s  = a ^ b ^ ci;
    co = (a & b) | ((a | b) & ci);
  end
endmodule
