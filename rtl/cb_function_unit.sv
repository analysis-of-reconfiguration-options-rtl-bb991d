// cb_function_unit - the four logic functions F0..F3 of a configurable block
// and the MUXY multiplexer that picks one of them.
//
// FUNC_SET lists, for MUXY codes 0..3, which function code (f0..f5 of
// repomo_pkg) is built at that position. The default is FS6 {AND, OR, XOR,
// NAND/NOR}, the set recommended for the extended chip; FS1 gives the
// original chip's {wire, AND, XOR, NAND/NOR}. The order of the functions
// inside a set follows the order in which the set is listed; the code
// assignment is this design's choice. A NAND/NOR entry is realised by the
// polymorphic gate, whose behaviour follows `mode`. Combinational.
module cb_function_unit
  import repomo_pkg::*;
#(
  parameter func_set_t FUNC_SET = FS6
) (
  input  logic              a,     // output of MUXA
  input  logic              b,     // output of MUXB
  input  logic              mode,  // polymorphic mode (supply level)
  input  logic [FSEL_W-1:0] fsel,  // MUXY select
  output logic              y
);

  logic pg_y;   // output of the polymorphic gate
  logic [3:0] f; // outputs of F0..F3

  polymorphic_nandnor u_pg (.a(a), .b(b), .mode(mode), .y(pg_y));

  always_comb begin
    for (int k = 0; k < 4; k++) begin
      unique case (func_code_e'(FUNC_SET[k]))
        F_ZERO:    f[k] = 1'b0;
        F_IDENT:   f[k] = a;
        F_AND:     f[k] = a & b;
        F_OR:      f[k] = a | b;
        F_XOR:     f[k] = a ^ b;
        F_NANDNOR: f[k] = pg_y;
        default:   f[k] = 1'b0;
      endcase
    end
    y = f[fsel];
  end

endmodule
