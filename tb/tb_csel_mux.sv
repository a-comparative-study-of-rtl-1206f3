// Self-checking testbench for csel_mux: random data on both inputs with
// the select at 0 and at 1; the output must equal the selected input.
module tb_csel_mux;
  logic [4:0] d0, d1, y;
  logic       sel;
  int         checks = 0, failures = 0;

  csel_mux dut (.d0(d0), .d1(d1), .sel(sel), .y(y));

  initial begin : watchdog
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < 200; k++) begin
      logic [4:0] exp;
      d0  = 5'($urandom);
      d1  = ~d0 ^ 5'($urandom);
      sel = 1'(k);
      exp = sel ? d1 : d0;
      #1;
      checks++;
      if (y !== exp) begin
        failures++;
        $display("FAIL sel=%0d d0=%h d1=%h got %h exp %h", sel, d0, d1, y, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
