// repomo_array - the configurable array with its interconnect.
//
// COLS columns of ROWS configurable blocks. The blocks of column c may read
// the NI primary inputs when c < I_FWD (i-forward) and the outputs of the
// L_BACK columns before them (L-back); with the defaults (8 x 8 blocks,
// 6 inputs, L-back = 2, i-forward = 2) that is 6 sources (8-input muxes) in
// column 0, 6 + 8 = 14 sources (16-input muxes) in column 1 and 16 sources
// (16-input muxes) in columns 2..7, as the source design requires. There is
// no feedback, so the array is purely combinational: po settles a few gate
// delays after pi, mode or cfg change.
//
// Primary outputs are not configurable (o-back = 0): output k is wired to
// the block in row k of the last column. Which rows of the last column carry
// the outputs is not fixed by the source design; rows 0..NO-1 are this
// design's choice. See repomo_pkg for the order of the multiplexer sources
// and for the layout of cfg.
module repomo_array
  import repomo_pkg::*;
#(
  parameter int unsigned ROWS     = REPOMOX_ROWS,
  parameter int unsigned COLS     = REPOMOX_COLS,
  parameter int unsigned NI       = REPOMOX_NI,
  parameter int unsigned NO       = REPOMOX_NO,
  parameter int unsigned L_BACK   = REPOMOX_L_BACK,
  parameter int unsigned I_FWD    = REPOMOX_I_FWD,
  parameter func_set_t   FUNC_SET = FS6,
  localparam int unsigned CFG_BITS = col_offset(COLS, ROWS, NI, L_BACK, I_FWD)
) (
  input  logic [NI-1:0]       pi,    // primary inputs
  input  logic [CFG_BITS-1:0] cfg,   // configuration bits
  input  logic                mode,  // polymorphic mode (supply level)
  output logic [NO-1:0]       po     // primary outputs
);

  initial begin
    assert (NO <= ROWS) else $error("repomo_array: NO=%0d exceeds ROWS=%0d", NO, ROWS);
    assert (L_BACK >= 1 && I_FWD >= 1)
      else $error("repomo_array: L_BACK and I_FWD must be at least 1");
  end

  for (genvar c = 0; c < COLS; c++) begin : g_col
    localparam int unsigned NS   = n_sources(c, ROWS, NI, L_BACK, I_FWD);
    localparam int unsigned SW   = sel_width(NS);
    localparam int unsigned BB   = block_bits(c, ROWS, NI, L_BACK, I_FWD);
    localparam int unsigned OFF  = col_offset(c, ROWS, NI, L_BACK, I_FWD);
    localparam int unsigned PI_N = (c < I_FWD) ? NI : 0;

    logic [NS-1:0]   src;  // sources of this column
    logic [ROWS-1:0] y;    // block outputs of this column

    if (PI_N > 0) begin : g_pi
      assign src[NI-1:0] = pi;
    end

    for (genvar d = 1; d <= L_BACK; d++) begin : g_back
      if (d <= c) begin : g_link
        assign src[PI_N + (d-1)*ROWS +: ROWS] = g_col[c-d].y;
      end
    end

    cb_column #(.ROWS(ROWS), .N_SRC(NS), .SEL_W(SW), .FUNC_SET(FUNC_SET)) u_column (
      .src(src), .cfg(cfg[OFF +: ROWS*BB]), .mode(mode), .y(y)
    );
  end

  assign po = g_col[COLS-1].y[NO-1:0];

endmodule
