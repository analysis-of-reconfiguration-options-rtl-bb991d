// cb_input_mux - input multiplexer (MUXA or MUXB) of a configurable block.
//
// Selects one of N_SRC source signals with a SEL_W-bit code. The chip must
// accept any random configuration, so select codes that address no source
// (N_SRC <= code < 2**SEL_W) wrap around to source code - N_SRC; this
// wrap-around is this design's choice. With the defaults of the extended chip
// the first column uses 8-input muxes over 6 primary inputs and all other
// columns 16-input muxes. Combinational.
module cb_input_mux #(
  parameter int unsigned N_SRC = 16,
  parameter int unsigned SEL_W = 4
) (
  input  logic [N_SRC-1:0] src,  // candidate sources
  input  logic [SEL_W-1:0] sel,  // select code
  output logic             y
);

  initial begin
    assert (N_SRC >= 1 && (1 << SEL_W) >= N_SRC && (1 << SEL_W) <= 2 * N_SRC)
      else $error("cb_input_mux: SEL_W=%0d does not fit N_SRC=%0d", SEL_W, N_SRC);
  end

  localparam int unsigned IDX_W = (N_SRC > 1) ? $clog2(N_SRC) : 1;

  logic [IDX_W-1:0] idx;  // effective source index

  always_comb begin
    int unsigned s;
    s = int'(sel);
    if (s >= N_SRC) s = s - N_SRC;
    idx = IDX_W'(s);
    y   = src[idx];
  end

endmodule
