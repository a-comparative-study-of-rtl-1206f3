// Testbench for the modified carry select adder at other widths: 16, 32
// and an odd 9 bits (upper half one bit wider than the lower). Random
// operands plus the corner cases that make the excess-1 converter's carry
// ripple through the whole upper half; each result is compared with the
// integer sum a+b+cin.
module tb_mcsla_widths;
  int checks = 0, failures = 0;

  logic [15:0] a16, b16, s16;
  logic [31:0] a32, b32, s32;
  logic [8:0]  a9, b9, s9;
  logic        cin, c16, c32, c9;

  mcsla #(.WIDTH(16)) dut16 (.a(a16), .b(b16), .cin(cin), .sum(s16), .cout(c16));
  mcsla #(.WIDTH(32)) dut32 (.a(a32), .b(b32), .cin(cin), .sum(s32), .cout(c32));
  mcsla #(.WIDTH(9))  dut9  (.a(a9),  .b(b9),  .cin(cin), .sum(s9),  .cout(c9));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input string tag, input logic [32:0] got, input logic [32:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s got %h exp %h", tag, got, exp);
    end
  endtask

  initial begin
    for (int k = 0; k < 20000; k++) begin
      a32 = $urandom; b32 = $urandom;
      a16 = 16'($urandom); b16 = 16'($urandom);
      a9  = 9'($urandom);  b9  = 9'($urandom);
      cin = 1'($urandom);
      if (k < 4) begin
        // upper half all ones after adding, lower half produces a carry
        a32 = 32'hFFFF_000F; b32 = 32'h0000_FFF1; cin = 1'(k);
        a16 = 16'hFF0F;      b16 = 16'h00F1;
        a9  = 9'h1FF;        b9  = 9'h001;
        if (k >= 2) begin a32 = '1; b32 = '1; a16 = '1; b16 = '1; a9 = '1; b9 = '1; end
      end
      #1;
      check("w16", 33'({c16, s16}), 33'(a16) + 33'(b16) + 33'(cin));
      check("w32", 33'({c32, s32}), 33'(a32) + 33'(b32) + 33'(cin));
      check("w9",  33'({c9, s9}),   33'(a9)  + 33'(b9)  + 33'(cin));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
