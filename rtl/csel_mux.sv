// Carry select multiplexer: N parallel 2:1 multiplexers sharing one select.
// In the carry select adder the select is the carry out of the lower half;
// d0 is the upper result computed for carry in 0 (the ripple carry adder),
// d1 the one for carry in 1 (the excess-1 converter). In a transistor-level
// realisation each bit is a pair of transmission gates; here it is the
// equivalent logic y = sel ? d1 : d0.
// Ports: d0, d1 (N bits each), sel, y (N bits). Purely combinational.
// N defaults to 5: four upper sum bits and the carry out of the 8-bit adder.
module csel_mux #(
  parameter int unsigned N = 5
) (
  input  logic [N-1:0] d0,
  input  logic [N-1:0] d1,
  input  logic         sel,
  output logic [N-1:0] y
);
  always_comb y = sel ? d1 : d0;
endmodule
