// tb_cb_column - random check of a column of eight configurable blocks with
// 16 sources (a column of the extended chip beyond the second). Each row's
// output is compared with a model of its 10-bit field {MUXB, MUXA, MUXY},
// so a mis-sliced configuration or a swapped row shows up.
module tb_cb_column;
  import repomo_pkg::*;
  logic [15:0] src;
  logic [79:0] cfg;
  logic        mode;
  logic [7:0]  y;
  int checks = 0, failures = 0;

  cb_column #(.ROWS(8), .N_SRC(16), .SEL_W(4), .FUNC_SET(FS6)) dut (
    .src(src), .cfg(cfg), .mode(mode), .y(y)
  );

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic bit row_out(logic [15:0] s, logic [9:0] c, bit m);
    bit a, b;
    a = s[c[5:2]]; b = s[c[9:6]];
    case (c[1:0])
      2'd0: return a & b;
      2'd1: return a | b;
      2'd2: return a ^ b;
      default: return m ? !(a | b) : !(a & b);
    endcase
  endfunction

  initial begin
    for (int t = 0; t < 3000; t++) begin
      src = 16'($urandom);
      mode = 1'($urandom);
      cfg = {16'($urandom), 32'($urandom), 32'($urandom)};
      #1;
      for (int r = 0; r < 8; r++) begin
        checks++;
        if (y[r] !== row_out(src, cfg[r*10 +: 10], mode)) begin
          failures++;
          if (failures < 10) $display("FAIL t=%0d row=%0d y=%0b", t, r, y[r]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
