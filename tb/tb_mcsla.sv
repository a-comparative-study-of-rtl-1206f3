// End-to-end testbench for the 8-bit modified carry select adder at its
// default size: every pair of operands with both carry ins (131072
// additions), each compared with the integer sum a+b+cin.
// It also counts, from the operands alone, how often each mechanism of the
// adder was exercised, and fails if one never was:
//   sel0     - lower carry 0: the carry-0 RCA result is selected
//   sel1     - lower carry 1: the excess-1 converter result is selected
//   bec_wrap - lower carry 1 and upper half all ones: the converter's
//              increment carries into the carry out
module tb_mcsla;
  localparam int unsigned W  = 8;
  localparam int unsigned LO = W / 2;

  logic [W-1:0] a, b, sum;
  logic         cin, cout;
  int           checks = 0, failures = 0;
  int           n_sel0 = 0, n_sel1 = 0, n_bec_wrap = 0;

  mcsla dut (.a(a), .b(b), .cin(cin), .sum(sum), .cout(cout));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < (1 << (2*W+1)); v++) begin
      logic [W:0]  exp;
      logic [LO:0] lo;
      logic [W-LO:0] hi;
      {cin, a, b} = (2*W+1)'(v);
      exp = (W+1)'(a) + (W+1)'(b) + (W+1)'(cin);
      lo  = (LO+1)'(a[LO-1:0]) + (LO+1)'(b[LO-1:0]) + (LO+1)'(cin);
      hi  = (W-LO+1)'(a[W-1:LO]) + (W-LO+1)'(b[W-1:LO]);
      if (lo[LO]) begin
        n_sel1++;
        if (hi == (W-LO+1)'((1 << (W-LO)) - 1)) n_bec_wrap++;
      end else begin
        n_sel0++;
      end
      #1;
      checks++;
      if ({cout, sum} !== exp) begin
        failures++;
        if (failures < 10)
          $display("FAIL a=%h b=%h cin=%0d got %h exp %h", a, b, cin, {cout, sum}, exp);
      end
    end
    $display("mechanisms: sel0=%0d sel1=%0d bec_wrap=%0d", n_sel0, n_sel1, n_bec_wrap);
    if (n_sel0 == 0)     begin failures++; $display("FAIL carry-0 path never selected"); end
    if (n_sel1 == 0)     begin failures++; $display("FAIL carry-1 path never selected"); end
    if (n_bec_wrap == 0) begin failures++; $display("FAIL converter carry never produced"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
