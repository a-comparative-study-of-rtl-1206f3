// Binary to excess-1 converter (BEC): x = b + 1 modulo 2^N, built without
// full adders. Bit 0 is inverted; every higher bit i is flipped when all
// bits below it are 1:
//   x[0] = ~b[0]
//   x[i] = b[i] ^ (b[0] & b[1] & ... & b[i-1])
// The AND terms are formed as a chain (t[i] = t[i-1] & b[i-1]), so the
// 4-bit converter needs one inverter, two AND gates and three XOR gates.
// This replaces the second ripple carry adder (the one for carry in 1) of a
// regular carry select adder: adding 1 to the carry-0 result gives the
// carry-1 result. N = 4 is the converter of the equations; the adder uses
// an (N+1)-bit one so that the carry bit is incremented too.
// Ports: b (input), x (b + 1). Purely combinational.
module bec #(
  parameter int unsigned N = 4
) (
  input  logic [N-1:0] b,
  output logic [N-1:0] x
);
  // t[i] is the AND of b[0] .. b[i-1]; t[0] is not used by the gates
  logic [N-1:0] t;

  always_comb begin
    t    = '0;
    x[0] = ~b[0];
    if (N > 1) t[1] = b[0];
    for (int i = 2; i < N; i++) t[i] = t[i-1] & b[i-1];
    for (int i = 1; i < N; i++) x[i] = b[i] ^ t[i];
  end
endmodule
