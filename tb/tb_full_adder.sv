// Self-checking testbench for full_adder: applies all eight input
// combinations and compares sum and carry with the integer sum a+b+ci.
module tb_full_adder;
  logic a, b, ci, s, co;
  int   checks = 0, failures = 0;

  full_adder dut (.a(a), .b(b), .ci(ci), .s(s), .co(co));

  initial begin : watchdog
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      logic [1:0] exp;
      {a, b, ci} = 3'(v);
      exp = 2'(int'(a) + int'(b) + int'(ci));
      #1;
      checks++;
      if ({co, s} !== exp) begin
        failures++;
        $display("FAIL a=%0d b=%0d ci=%0d got co=%0d s=%0d exp %0d", a, b, ci, co, s, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
