// Modified carry select adder (CSLA with binary to excess-1 converter).
//
// A regular carry select adder splits a WIDTH-bit addition in two halves.
// The lower half is a ripple carry adder (RCA); the upper half is computed
// twice in parallel, once for a carry in of 0 and once for 1, and the lower
// half's carry out picks one of the two with a multiplexer. This version
// keeps the RCA for carry 0 but derives the carry-1 result from it with a
// binary to excess-1 converter (BEC), since (A+B+1) = (A+B)+1: fewer gates
// than a second RCA for a small extra delay.
//
//   lower : rca  #(LO)  a[LO-1:0] + b[LO-1:0] + cin  -> sum[LO-1:0], c_lo
//   upper : rca  #(HI)  a[W-1:LO] + b[W-1:LO] + 0    -> {c0, s0}
//           bec  #(HI+1) {c0, s0} + 1                -> {c1, s1}
//   select: csel_mux #(HI+1) c_lo ? {c1,s1} : {c0,s0} -> {cout, sum[W-1:LO]}
//
// The split into two halves (LO = WIDTH/2) and WIDTH = 8 follow the design
// being documented. The converter is one bit wider than the upper half so
// that the carry out is incremented with the sum; this is this
// implementation's choice for forming the carry of the carry-1 path. The
// carry in port is also this implementation's choice (the lower RCA has
// one; tie it to 0 for a plain A+B).
//
// Ports: a, b (WIDTH-bit operands), cin, sum (WIDTH bits), cout.
// Purely combinational; no clock or reset.
module mcsla #(
  parameter int unsigned WIDTH = 8
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);
  localparam int unsigned LO = WIDTH / 2;
  localparam int unsigned HI = WIDTH - LO;

  logic          c_lo;   // carry out of the lower half: the select
  logic [HI-1:0] s0;     // upper sum for carry in 0
  logic          c0;     // upper carry for carry in 0
  logic [HI:0]   r1;     // {carry, sum} of the upper half for carry in 1
  logic [HI:0]   r_sel;

  rca #(.N(LO)) u_rca_lo (
    .a   (a[LO-1:0]),
    .b   (b[LO-1:0]),
    .cin (cin),
    .s   (sum[LO-1:0]),
    .cout(c_lo)
  );

  rca #(.N(HI)) u_rca_hi (
    .a   (a[WIDTH-1:LO]),
    .b   (b[WIDTH-1:LO]),
    .cin (1'b0),
    .s   (s0),
    .cout(c0)
  );

  bec #(.N(HI+1)) u_bec (
    .b({c0, s0}),
    .x(r1)
  );

  csel_mux #(.N(HI+1)) u_mux (
    .d0 ({c0, s0}),
    .d1 (r1),
    .sel(c_lo),
    .y  (r_sel)
  );

  assign sum[WIDTH-1:LO] = r_sel[HI-1:0];
  assign cout            = r_sel[HI];
endmodule
