// tb_cb_input_mux - checks the block input multiplexer at the three sizes of
// the extended chip: 6 sources / 3 select bits (column 0), 14 sources /
// 4 bits (column 1) and 16 sources / 4 bits (later columns). Every select
// code is tried with one-hot and random source vectors; codes beyond the
// source count must wrap around to code - N.
module tb_cb_input_mux;
  logic [5:0]  src6;  logic [2:0] sel6;  logic y6;
  logic [13:0] src14; logic [3:0] sel14; logic y14;
  logic [15:0] src16; logic [3:0] sel16; logic y16;
  int checks = 0, failures = 0;

  cb_input_mux #(.N_SRC(6),  .SEL_W(3)) dut6  (.src(src6),  .sel(sel6),  .y(y6));
  cb_input_mux #(.N_SRC(14), .SEL_W(4)) dut14 (.src(src14), .sel(sel14), .y(y14));
  cb_input_mux #(.N_SRC(16), .SEL_W(4)) dut16 (.src(src16), .sel(sel16), .y(y16));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit got, bit exp, string what, int code);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s sel=%0d got=%0b exp=%0b", what, code, got, exp);
    end
  endtask

  initial begin
    // Expected source index per code, written out.
    int map6  [8]  = '{0, 1, 2, 3, 4, 5, 0, 1};
    int map14 [16] = '{0, 1, 2, 3, 4, 5, 6, 7, 8, 9, 10, 11, 12, 13, 0, 1};
    for (int t = 0; t < 40; t++) begin
      for (int s = 0; s < 16; s++) begin
        if (t < 16) begin
          src6 = 6'(1 << (t % 6)); src14 = 14'(1 << (t % 14)); src16 = 16'(1 << t);
        end else begin
          src6 = 6'($urandom); src14 = 14'($urandom); src16 = 16'($urandom);
        end
        sel6 = 3'(s); sel14 = 4'(s); sel16 = 4'(s);
        #1;
        if (s < 8) check(y6, src6[map6[s]], "mux6", s);
        check(y14, src14[map14[s]], "mux14", s);
        check(y16, src16[s], "mux16", s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
