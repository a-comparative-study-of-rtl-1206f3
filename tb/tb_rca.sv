// Self-checking testbench for rca: every operand pair and carry in of the
// default 4-bit adder, plus random vectors on a 16-bit instance; results
// are compared with the integer sum a+b+cin.
module tb_rca;
  localparam int unsigned N4  = 4;
  localparam int unsigned N16 = 16;

  logic [N4-1:0]  a4, b4, s4;
  logic           cin4, cout4;
  logic [N16-1:0] a16, b16, s16;
  logic           cin16, cout16;
  int             checks = 0, failures = 0;

  rca dut4 (.a(a4), .b(b4), .cin(cin4), .s(s4), .cout(cout4));
  rca #(.N(N16)) dut16 (.a(a16), .b(b16), .cin(cin16), .s(s16), .cout(cout16));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a16 = '0; b16 = '0; cin16 = 1'b0;
    for (int v = 0; v < (1 << (2*N4+1)); v++) begin
      logic [N4:0] exp;
      {cin4, a4, b4} = (2*N4+1)'(v);
      exp = (N4+1)'(a4) + (N4+1)'(b4) + (N4+1)'(cin4);
      #1;
      checks++;
      if ({cout4, s4} !== exp) begin
        failures++;
        $display("FAIL N=4 a=%h b=%h cin=%0d got %h exp %h", a4, b4, cin4, {cout4, s4}, exp);
      end
    end
    for (int k = 0; k < 2000; k++) begin
      logic [N16:0] exp;
      a16   = N16'($urandom);
      b16   = N16'($urandom);
      cin16 = 1'($urandom);
      if (k == 0) begin a16 = '1; b16 = '0; cin16 = 1'b1; end  // full carry ripple
      exp = (N16+1)'(a16) + (N16+1)'(b16) + (N16+1)'(cin16);
      #1;
      checks++;
      if ({cout16, s16} !== exp) begin
        failures++;
        $display("FAIL N=16 a=%h b=%h cin=%0d got %h exp %h", a16, b16, cin16, {cout16, s16}, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
