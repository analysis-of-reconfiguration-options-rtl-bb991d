// config_block - one configurable block of the array.
//
// Two input multiplexers, MUXA and MUXB, each pick one of the N_SRC signals
// that this block's column may read (primary inputs and/or outputs of
// earlier columns); the function unit computes F0..F3 of the two selected
// signals and MUXY passes one of them to the block output Y. The block is
// configured by a field of 2 + 2*SEL_W bits taken from the configuration
// register: bits [1:0] are the MUXY select, then SEL_W bits for MUXA, then
// SEL_W bits for MUXB (field order is this design's choice). Combinational.
module config_block
  import repomo_pkg::*;
#(
  parameter int unsigned N_SRC    = 16,
  parameter int unsigned SEL_W    = 4,
  parameter func_set_t   FUNC_SET = FS6,
  localparam int unsigned CFG_W   = FSEL_W + 2 * SEL_W
) (
  input  logic [N_SRC-1:0] src,   // signals the block may connect to
  input  logic [CFG_W-1:0] cfg,   // configuration field of this block
  input  logic             mode,  // polymorphic mode (supply level)
  output logic             y
);

  logic a, b;

  cb_input_mux #(.N_SRC(N_SRC), .SEL_W(SEL_W)) u_muxa (
    .src(src), .sel(cfg[FSEL_W +: SEL_W]), .y(a)
  );

  cb_input_mux #(.N_SRC(N_SRC), .SEL_W(SEL_W)) u_muxb (
    .src(src), .sel(cfg[FSEL_W + SEL_W +: SEL_W]), .y(b)
  );

  cb_function_unit #(.FUNC_SET(FUNC_SET)) u_func (
    .a(a), .b(b), .mode(mode), .fsel(cfg[FSEL_W-1:0]), .y(y)
  );

endmodule
