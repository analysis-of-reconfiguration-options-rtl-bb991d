// repomox_top - the extended reconfigurable polymorphic module (REPOMOX).
//
// An 8 x 8 array of configurable blocks with 6 primary inputs and 6 primary
// outputs, whose every multiplexer and function selector is driven by a
// 624-bit configuration shift register. Each block computes AND, OR, XOR or
// polymorphic NAND/NOR of two signals chosen from the two previous columns
// (and from the primary inputs in the first two columns); the outputs are
// wired to fixed blocks of the last column. These are the sizes and
// reconfiguration options the source design recommends.
//
// Interface and timing: while conf_en is high, one configuration bit is taken
// from conf_data at every rising clock edge; after 624 such clocks the first
// bit sent is bit 0 of the configuration (layout in repomo_pkg). The data
// path from pi to po is combinational and does not use the clock. `mode`
// stands for the supply-voltage level that switches every polymorphic gate
// between NAND (0) and NOR (1); on the real chip it is the Vdd level, not a
// pin. conf_out (the bit shifted out) and the reset are this design's choices.
module repomox_top
  import repomo_pkg::*;
(
  input  logic                    clk,
  input  logic                    rst_n,      // asynchronous, clears the configuration
  input  logic                    conf_en,    // shift enable of the configuration register
  input  logic                    conf_data,  // serial configuration data
  output logic                    conf_out,   // serial data shifted out
  input  logic                    mode,       // polymorphic mode: 0 = NAND, 1 = NOR
  input  logic [REPOMOX_NI-1:0]   pi,         // primary inputs I0..I5
  output logic [REPOMOX_NO-1:0]   po          // primary outputs O0..O5
);

  logic [REPOMOX_CFG_BITS-1:0] cfg;

  config_shift_register #(.LEN(REPOMOX_CFG_BITS)) u_cfg (
    .clk(clk), .rst_n(rst_n), .shift_en(conf_en), .conf_in(conf_data),
    .conf_out(conf_out), .cfg(cfg)
  );

  repomo_array u_array (
    .pi(pi), .cfg(cfg), .mode(mode), .po(po)
  );

endmodule
