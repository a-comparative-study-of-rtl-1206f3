// N-bit ripple carry adder: N full adders in a chain, the carry out of bit i
// driving the carry in of bit i+1. It is the smallest adder (O(N) area) and
// the slowest (the carry crosses all N cells, about 2N gate delays from cin
// to cout). In the carry select adder it computes the lower half, and the
// upper half for an assumed carry in of 0.
// Ports: a, b (N-bit operands), cin, s (N-bit sum), cout.
// Purely combinational. N defaults to 4, one half of the 8-bit adder.
module rca #(
  parameter int unsigned N = 4
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  input  logic         cin,
  output logic [N-1:0] s,
  output logic         cout
);
  logic [N:0] c;

  assign c[0] = cin;

  for (genvar i = 0; i < N; i++) begin : g_fa
    full_adder u_fa (
      .a (a[i]),
      .b (b[i]),
      .ci(c[i]),
      .s (s[i]),
      .co(c[i+1])
    );
  end

  assign cout = c[N];
endmodule
