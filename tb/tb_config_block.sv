// tb_config_block - random check of one configurable block of column 1 of
// the extended chip (14 sources, 4-bit selects, function set FS6). The
// expected output is computed from the field layout {MUXB, MUXA, MUXY} and
// the function list AND, OR, XOR, NAND/NOR; every configuration field value
// (all 1024) is applied with random sources in both modes.
module tb_config_block;
  import repomo_pkg::*;
  localparam int N = 14;
  logic [N-1:0] src;
  logic [9:0]   cfg;
  logic         mode, y;
  int checks = 0, failures = 0;

  config_block #(.N_SRC(N), .SEL_W(4), .FUNC_SET(FS6)) dut (
    .src(src), .cfg(cfg), .mode(mode), .y(y)
  );

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit expect_y(logic [N-1:0] s, logic [9:0] c, bit m);
    int ia, ib;
    bit a, b;
    ia = int'(c[5:2]); if (ia >= N) ia -= N;
    ib = int'(c[9:6]); if (ib >= N) ib -= N;
    a = s[ia]; b = s[ib];
    case (c[1:0])
      2'd0: return a & b;
      2'd1: return a | b;
      2'd2: return a ^ b;
      default: return m ? !(a | b) : !(a & b);
    endcase
  endfunction

  initial begin
    for (int rep = 0; rep < 4; rep++)
      for (int c = 0; c < 1024; c++) begin
        cfg = 10'(c); src = N'($urandom); mode = 1'($urandom);
        #1;
        checks++;
        if (y !== expect_y(src, cfg, mode)) begin
          failures++;
          if (failures < 10) $display("FAIL cfg=%h src=%h mode=%0b y=%0b", cfg, src, mode, y);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
