// tb_cb_function_unit - exhaustive check of the four-function unit with the
// recommended set FS6 {AND, OR, XOR, NAND/NOR} and with the original chip's
// set FS1 {wire, AND, XOR, NAND/NOR}, for every select code, input pair and
// polymorphic mode. Expected values are written out as truth-table bits.
module tb_cb_function_unit;
  import repomo_pkg::*;
  logic a, b, mode;
  logic [1:0] fsel;
  logic y6, y1;
  int checks = 0, failures = 0;

  cb_function_unit #(.FUNC_SET(FS6)) dut6 (.a(a), .b(b), .mode(mode), .fsel(fsel), .y(y6));
  cb_function_unit #(.FUNC_SET(FS1)) dut1 (.a(a), .b(b), .mode(mode), .fsel(fsel), .y(y1));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Truth table of each function over {a,b} = 00,01,10,11 (bit index = {a,b}).
  function automatic bit tt(string fn, bit a_i, bit b_i);
    logic [3:0] t;
    case (fn)
      "AND":  t = 4'b1000;
      "OR":   t = 4'b1110;
      "XOR":  t = 4'b0110;
      "NAND": t = 4'b0111;
      "NOR":  t = 4'b0001;
      "WIRE": t = 4'b1100;
      default: t = 4'b0000;
    endcase
    return t[{a_i, b_i}];
  endfunction

  initial begin
    string fs6 [4] = '{"AND", "OR", "XOR", "NAND"};
    string fs1 [4] = '{"WIRE", "AND", "XOR", "NAND"};
    for (int m = 0; m < 2; m++)
      for (int f = 0; f < 4; f++)
        for (int v = 0; v < 4; v++) begin
          string e6, e1;
          mode = m[0]; fsel = f[1:0]; {a, b} = v[1:0];
          #1;
          e6 = (fs6[f] == "NAND" && m == 1) ? "NOR" : fs6[f];
          e1 = (fs1[f] == "NAND" && m == 1) ? "NOR" : fs1[f];
          checks += 2;
          if (y6 !== tt(e6, a, b)) begin
            failures++;
            $display("FAIL FS6 fsel=%0d mode=%0d a=%0b b=%0b y=%0b", f, m, a, b, y6);
          end
          if (y1 !== tt(e1, a, b)) begin
            failures++;
            $display("FAIL FS1 fsel=%0d mode=%0d a=%0b b=%0b y=%0b", f, m, a, b, y1);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
