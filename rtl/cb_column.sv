// cb_column - one column of ROWS configurable blocks (CB0..CB7 in the
// extended chip are such columns).
//
// All blocks of a column see the same N_SRC candidate sources; block r takes
// its configuration field from cfg[r*BB +: BB], where BB = 2 + 2*SEL_W.
// Output bit r is the output of the block in row r. Combinational.
module cb_column
  import repomo_pkg::*;
#(
  parameter int unsigned ROWS     = 8,
  parameter int unsigned N_SRC    = 16,
  parameter int unsigned SEL_W    = 4,
  parameter func_set_t   FUNC_SET = FS6,
  localparam int unsigned BB      = FSEL_W + 2 * SEL_W
) (
  input  logic [N_SRC-1:0]   src,   // sources shared by the column
  input  logic [ROWS*BB-1:0] cfg,   // configuration of the column's blocks
  input  logic               mode,  // polymorphic mode (supply level)
  output logic [ROWS-1:0]    y      // block outputs, row 0 = bit 0
);

  for (genvar r = 0; r < ROWS; r++) begin : g_row
    config_block #(.N_SRC(N_SRC), .SEL_W(SEL_W), .FUNC_SET(FUNC_SET)) u_cb (
      .src(src), .cfg(cfg[r*BB +: BB]), .mode(mode), .y(y[r])
    );
  end

endmodule
