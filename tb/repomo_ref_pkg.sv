// repomo_ref_pkg - reference model and configuration helpers for the
// testbenches of the reconfigurable array.
//
// ref_eval() evaluates a configuration the way a Cartesian Genetic
// Programming chromosome is evaluated: node by node, column by column,
// decoding each block's select codes into (column, row) or primary-input
// references. It is written independently of the RTL's generate structure,
// from the layout rules only: blocks stored column-major from bit 0, each
// field = {MUXB sel, MUXA sel, MUXY sel[1:0]}; sources of column c = primary
// inputs (c < i_fwd), then column c-1, c-2, ... (up to l_back back);
// out-of-range select codes wrap around by subtracting the source count.
// set_block() and src_pi()/src_back() build configurations by hand.
package repomo_ref_pkg;

  localparam int MAX_CFG = 1024;
  typedef logic [MAX_CFG-1:0] cfg_t;

  // Array geometry used by the model.
  typedef struct {
    int rows, cols, ni, no, l_back, i_fwd;
    int fs[4];   // function code (0..5) per MUXY code
  } geom_t;

  function automatic geom_t repomox_geom();
    geom_t g;
    g.rows = 8; g.cols = 8; g.ni = 6; g.no = 6; g.l_back = 2; g.i_fwd = 2;
    g.fs = '{2, 3, 4, 5};   // AND, OR, XOR, NAND/NOR
    return g;
  endfunction

  function automatic int nsrc(geom_t g, int c);
    int n;
    n = (c < g.i_fwd) ? g.ni : 0;
    for (int d = 1; d <= g.l_back; d++) if (d <= c) n += g.rows;
    return n;
  endfunction

  function automatic int selw(int n);
    int w;
    w = 1;
    while ((1 << w) < n) w++;
    return w;
  endfunction

  function automatic int field_base(geom_t g, int c, int r);
    int off;
    off = 0;
    for (int k = 0; k < c; k++) off += g.rows * (2 + 2 * selw(nsrc(g, k)));
    return off + r * (2 + 2 * selw(nsrc(g, c)));
  endfunction

  function automatic int total_bits(geom_t g);
    return field_base(g, g.cols, 0);
  endfunction

  function automatic int get_bits(cfg_t cfg, int pos, int w);
    int v;
    v = 0;
    for (int i = 0; i < w; i++) v |= int'(cfg[pos + i]) << i;
    return v;
  endfunction

  function automatic bit apply_fn(int code, bit a, bit b, bit mode);
    case (code)
      0: return 1'b0;
      1: return a;
      2: return a & b;
      3: return a | b;
      4: return a ^ b;
      5: return mode ? !(a || b) : !(a && b);
      default: return 1'b0;
    endcase
  endfunction

  // Value of source code s as seen from column c.
  function automatic bit src_value(geom_t g, bit node[8][16], int c, int s,
                                   logic [15:0] pi);
    int n, pin;
    n = nsrc(g, c);
    if (s >= n) s -= n;
    pin = (c < g.i_fwd) ? g.ni : 0;
    if (s < pin) return pi[s];
    s -= pin;
    return node[c - 1 - s / g.rows][s % g.rows];
  endfunction

  function automatic logic [15:0] ref_eval(geom_t g, cfg_t cfg, logic [15:0] pi, bit mode);
    bit node[8][16];
    logic [15:0] po;
    for (int c = 0; c < g.cols; c++) begin
      int w;
      w = selw(nsrc(g, c));
      for (int r = 0; r < g.rows; r++) begin
        int base, f, sa, sb;
        bit a, b;
        base = field_base(g, c, r);
        f  = get_bits(cfg, base, 2);
        sa = get_bits(cfg, base + 2, w);
        sb = get_bits(cfg, base + 2 + w, w);
        a = src_value(g, node, c, sa, pi);
        b = src_value(g, node, c, sb, pi);
        node[c][r] = apply_fn(g.fs[f], a, b, mode);
      end
    end
    po = '0;
    for (int k = 0; k < g.no; k++) po[k] = node[g.cols - 1][k];
    return po;
  endfunction

  // Source code of primary input i (valid in columns c < i_fwd).
  function automatic int src_pi(int i);
    return i;
  endfunction

  // Source code of row r of column c-d, as seen from column c.
  function automatic int src_back(geom_t g, int c, int d, int r);
    return ((c < g.i_fwd) ? g.ni : 0) + (d - 1) * g.rows + r;
  endfunction

  // Write the field of block (c, r).
  function automatic cfg_t set_block(geom_t g, cfg_t cfg, int c, int r, int f, int sa, int sb);
    int base, w;
    base = field_base(g, c, r);
    w = selw(nsrc(g, c));
    for (int i = 0; i < 2; i++) cfg[base + i] = f[i];
    for (int i = 0; i < w; i++) cfg[base + 2 + i] = sa[i];
    for (int i = 0; i < w; i++) cfg[base + 2 + w + i] = sb[i];
    return cfg;
  endfunction

  function automatic cfg_t random_cfg(int nbits);
    cfg_t cfg;
    cfg = '0;
    for (int i = 0; i < nbits; i++) cfg[i] = 1'($urandom_range(0, 1));
    return cfg;
  endfunction

endpackage
