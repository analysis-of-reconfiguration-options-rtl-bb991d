// tb_config_shift_register - checks the 624-bit configuration shift
// register: reset clears it, a full configuration takes exactly 624 enabled
// clocks and lands with the first bit sent in bit 0, the previous contents
// come out of conf_out in order (read-back), and nothing moves while
// shift_en is low.
module tb_config_shift_register;
  localparam int LEN = 624;
  logic clk = 0, rst_n, shift_en, conf_in, conf_out;
  logic [LEN-1:0] cfg;
  logic [LEN-1:0] pat_a, pat_b;
  int checks = 0, failures = 0;
  int cycles;

  config_shift_register #(.LEN(LEN)) dut (
    .clk(clk), .rst_n(rst_n), .shift_en(shift_en), .conf_in(conf_in),
    .conf_out(conf_out), .cfg(cfg)
  );

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // Shift a whole pattern in, first bit = bit 0; compare what falls out with `old`.
  task automatic load(logic [LEN-1:0] pat, logic [LEN-1:0] old);
    int bad;
    bad = 0;
    cycles = 0;
    for (int i = 0; i < LEN; i++) begin
      shift_en = 1; conf_in = pat[i];
      if (conf_out !== old[i]) bad++;
      @(posedge clk); #1;
      cycles++;
    end
    shift_en = 0;
    check(bad == 0, "read-back through conf_out");
  endtask

  initial begin
    for (int i = 0; i < LEN; i++) begin
      pat_a[i] = 1'($urandom);
      pat_b[i] = 1'($urandom);
    end
    rst_n = 0; shift_en = 0; conf_in = 0;
    #12;
    check(cfg == '0, "reset clears the register");
    rst_n = 1;
    @(posedge clk); #1;
    load(pat_a, '0);
    check(cfg === pat_a, "pattern A loaded");
    check(cycles == LEN, "load takes LEN clocks");
    // Hold: no shift without enable.
    conf_in = 1;
    repeat (20) @(posedge clk);
    #1;
    check(cfg === pat_a, "hold while shift_en is low");
    // Partial shift by one position.
    load(pat_b, pat_a);
    check(cfg === pat_b, "pattern B loaded");
    shift_en = 1; conf_in = 1;
    @(posedge clk); #1;
    shift_en = 0;
    check(cfg === {1'b1, pat_b[LEN-1:1]}, "single shift moves one place");
    rst_n = 0; #1;
    check(cfg == '0, "asynchronous reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
