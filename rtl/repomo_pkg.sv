// repomo_pkg - shared types, constants and layout functions of the
// polymorphic reconfigurable array.
//
// The array is a Cartesian-Genetic-Programming style grid of COLS x ROWS
// two-input configurable blocks. Every block has two input multiplexers
// (MUXA, MUXB) and a function selector (MUXY) choosing one of four logic
// functions. The constants below are the main configuration of the extended
// chip: 8 x 8 blocks, 6 primary inputs, 6 primary outputs, the function set
// {AND, OR, XOR, NAND/NOR}, block inputs reaching back two columns (L-back = 2),
// primary inputs reaching the first two columns (i-forward = 2) and primary
// outputs wired to fixed blocks of the last column (o-back = 0).
//
// Layout of the multiplexer sources of column c (this design's choice, the
// order is not prescribed): first the NI primary inputs if c < I_FWD, then
// rows 0..ROWS-1 of column c-1, then rows 0..ROWS-1 of column c-2, and so on
// up to L_BACK columns back. A multiplexer has clog2(sources) select bits;
// select codes at or above the number of sources wrap around (code - N), so
// every bit pattern is a valid configuration.
//
// Layout of the configuration vector (this design's choice): blocks are
// stored column by column, row by row inside a column, starting at bit 0.
// Inside the field of one block, bits [1:0] are the function select (MUXY),
// the next SEL_W bits the MUXA select and the next SEL_W bits the MUXB select.
// With the defaults this is 8 blocks x 8 bits (column 0, 8-input muxes) plus
// 56 blocks x 10 bits (16-input muxes) = 624 bits. With the parameters of the
// original 4 x 4 chip (4 inputs, 4 outputs) the same layout gives 120 bits.
package repomo_pkg;

  // Logic function codes f0..f5 of the candidate function list.
  typedef enum logic [2:0] {
    F_ZERO    = 3'd0,  // f0: Y = 0
    F_IDENT   = 3'd1,  // f1: Y = A
    F_AND     = 3'd2,  // f2: Y = A & B
    F_OR      = 3'd3,  // f3: Y = A | B
    F_XOR     = 3'd4,  // f4: Y = A ^ B
    F_NANDNOR = 3'd5   // f5: Y = ~(A & B) in mode 0, ~(A | B) in mode 1
  } func_code_e;

  // A function set: element k is the function chosen by MUXY code k.
  typedef logic [3:0][2:0] func_set_t;

  // FS6 {AND, OR, XOR, NAND/NOR}: the recommended set.
  localparam func_set_t FS6 = {F_NANDNOR, F_XOR, F_OR, F_AND};
  // FS1 {wire, AND, XOR, NAND/NOR}: the set of the original 4 x 4 chip.
  localparam func_set_t FS1 = {F_NANDNOR, F_XOR, F_AND, F_IDENT};

  // Main configuration of the extended chip.
  localparam int unsigned REPOMOX_ROWS   = 8;
  localparam int unsigned REPOMOX_COLS   = 8;
  localparam int unsigned REPOMOX_NI     = 6;
  localparam int unsigned REPOMOX_NO     = 6;
  localparam int unsigned REPOMOX_L_BACK = 2;
  localparam int unsigned REPOMOX_I_FWD  = 2;

  localparam int unsigned FSEL_W = 2;  // MUXY select bits (four functions)

  // Number of multiplexer sources seen by the blocks of column c.
  function automatic int unsigned n_sources(int unsigned c, int unsigned rows,
                                            int unsigned ni, int unsigned l_back,
                                            int unsigned i_fwd);
    int unsigned back;
    back = (c < l_back) ? c : l_back;
    return ((c < i_fwd) ? ni : 0) + rows * back;
  endfunction

  // Select width of a multiplexer with n sources (at least one bit).
  function automatic int unsigned sel_width(int unsigned n);
    return (n <= 2) ? 1 : $clog2(n);
  endfunction

  // Configuration bits of one block of column c.
  function automatic int unsigned block_bits(int unsigned c, int unsigned rows,
                                             int unsigned ni, int unsigned l_back,
                                             int unsigned i_fwd);
    return FSEL_W + 2 * sel_width(n_sources(c, rows, ni, l_back, i_fwd));
  endfunction

  // Bit offset of the first block of column c (also the total length for c = COLS).
  function automatic int unsigned col_offset(int unsigned c, int unsigned rows,
                                             int unsigned ni, int unsigned l_back,
                                             int unsigned i_fwd);
    int unsigned off;
    off = 0;
    for (int unsigned k = 0; k < c; k++)
      off += rows * block_bits(k, rows, ni, l_back, i_fwd);
    return off;
  endfunction

  // Configuration length of the main configuration (624 bits).
  localparam int unsigned REPOMOX_CFG_BITS =
      col_offset(REPOMOX_COLS, REPOMOX_ROWS, REPOMOX_NI, REPOMOX_L_BACK, REPOMOX_I_FWD);

endpackage
