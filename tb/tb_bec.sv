// Self-checking testbench for bec: every input of the default 4-bit
// converter and of the 5-bit one used by the adder, compared with b+1
// modulo 2^N.
module tb_bec;
  logic [3:0] b4, x4;
  logic [4:0] b5, x5;
  int         checks = 0, failures = 0;

  bec dut4 (.b(b4), .x(x4));
  bec #(.N(5)) dut5 (.b(b5), .x(x5));

  initial begin : watchdog
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    b5 = '0;
    for (int v = 0; v < 16; v++) begin
      b4 = 4'(v);
      #1;
      checks++;
      if (x4 !== 4'(v + 1)) begin
        failures++;
        $display("FAIL N=4 b=%h got %h exp %h", b4, x4, 4'(v + 1));
      end
    end
    for (int v = 0; v < 32; v++) begin
      b5 = 5'(v);
      #1;
      checks++;
      if (x5 !== 5'(v + 1)) begin
        failures++;
        $display("FAIL N=5 b=%h got %h exp %h", b5, x5, 5'(v + 1));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
