// tb_polymorphic_nandnor - exhaustive check of the polymorphic gate: NAND
// for mode 0, NOR for mode 1, over all eight input/mode combinations, and a
// mode switch with fixed inputs.
module tb_polymorphic_nandnor;
  logic a, b, mode, y;
  int checks = 0, failures = 0;

  polymorphic_nandnor dut (.a(a), .b(b), .mode(mode), .y(y));

  initial begin : watchdog
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Truth tables written out: {mode, a, b} -> y
    bit exp [8] = '{1, 1, 1, 0,    // mode 0: NAND
                    1, 0, 0, 0};   // mode 1: NOR
    for (int i = 0; i < 8; i++) begin
      {mode, a, b} = 3'(i);
      #1;
      checks++;
      if (y !== exp[i]) begin
        failures++;
        $display("FAIL mode=%0b a=%0b b=%0b y=%0b exp=%0b", mode, a, b, y, exp[i]);
      end
    end
    // Mode switch with a=1, b=0: NAND gives 1, NOR gives 0.
    a = 1; b = 0; mode = 0; #1;
    checks++; if (y !== 1'b1) failures++;
    mode = 1; #1;
    checks++; if (y !== 1'b0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
