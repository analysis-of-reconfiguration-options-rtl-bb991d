// polymorphic_nandnor - digital equivalent of the polymorphic NAND/NOR gate.
//
// The physical gate is a single transistor-level cell whose function depends
// on the level of its supply voltage: at one Vdd level it is a NAND, at the
// other a NOR. That function is taken from the source design. Here the supply
// level is abstracted into the one-bit input `mode` (this design's choice):
// mode = 0 is the first mode (NAND), mode = 1 the second mode (NOR). Purely
// combinational; the output follows the inputs and the mode without a clock.
module polymorphic_nandnor (
  input  logic a,     // gate input A
  input  logic b,     // gate input B
  input  logic mode,  // supply-level mode: 0 = NAND, 1 = NOR
  output logic y      // gate output
);

  always_comb begin
    if (mode) y = ~(a | b);
    else      y = ~(a & b);
  end

endmodule
