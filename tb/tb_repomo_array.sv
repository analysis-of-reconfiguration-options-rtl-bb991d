// tb_repomo_array - checks the configurable array against the CGP-style
// reference model of repomo_ref_pkg.
//
// The main instance has the default geometry (8 x 8 blocks, 6 inputs,
// 6 outputs, L-back 2, i-forward 2, FS6). Random 624-bit configurations are
// applied with all 64 input vectors in both polymorphic modes. A second
// instance has the geometry of the original 4 x 4 chip (4 inputs, 4 outputs,
// function set {wire, AND, XOR, NAND/NOR}); its configuration must be
// exactly 120 bits long and it is checked against the same model.
module tb_repomo_array;
  import repomo_pkg::*;
  import repomo_ref_pkg::*;

  localparam int XB = REPOMOX_CFG_BITS;
  localparam int OB = col_offset(4, 4, 4, 2, 2);

  logic [5:0]    pi_x;  logic [XB-1:0] cfg_x; logic mode; logic [5:0] po_x;
  logic [3:0]    pi_o;  logic [OB-1:0] cfg_o; logic [3:0] po_o;
  int checks = 0, failures = 0;

  repomo_array dut_x (.pi(pi_x), .cfg(cfg_x), .mode(mode), .po(po_x));

  repomo_array #(.ROWS(4), .COLS(4), .NI(4), .NO(4), .L_BACK(2), .I_FWD(2),
                 .FUNC_SET(FS1)) dut_o (.pi(pi_o), .cfg(cfg_o), .mode(mode), .po(po_o));

  initial begin : watchdog
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    geom_t gx, go;
    cfg_t c;
    logic [15:0] exp;
    gx = repomox_geom();
    go.rows = 4; go.cols = 4; go.ni = 4; go.no = 4; go.l_back = 2; go.i_fwd = 2;
    go.fs = '{1, 2, 4, 5};

    checks++;
    if (XB != 624 || total_bits(gx) != 624) begin
      failures++; $display("FAIL extended configuration length %0d", XB);
    end
    checks++;
    if (OB != 120 || total_bits(go) != 120) begin
      failures++; $display("FAIL original configuration length %0d", OB);
    end

    for (int t = 0; t < 300; t++) begin
      c = random_cfg(XB);
      cfg_x = c[XB-1:0];
      for (int m = 0; m < 2; m++)
        for (int v = 0; v < 64; v++) begin
          pi_x = 6'(v); mode = m[0];
          #1;
          exp = ref_eval(gx, c, 16'(v), m[0]);
          checks++;
          if (po_x !== exp[5:0]) begin
            failures++;
            if (failures < 10) $display("FAIL 8x8 t=%0d pi=%0d mode=%0d po=%b exp=%b", t, v, m, po_x, exp[5:0]);
          end
        end
    end

    for (int t = 0; t < 300; t++) begin
      c = random_cfg(OB);
      cfg_o = c[OB-1:0];
      for (int m = 0; m < 2; m++)
        for (int v = 0; v < 16; v++) begin
          pi_o = 4'(v); mode = m[0];
          #1;
          exp = ref_eval(go, c, 16'(v), m[0]);
          checks++;
          if (po_o !== exp[3:0]) begin
            failures++;
            if (failures < 10) $display("FAIL 4x4 t=%0d pi=%0d mode=%0d po=%b exp=%b", t, v, m, po_o, exp[3:0]);
          end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
