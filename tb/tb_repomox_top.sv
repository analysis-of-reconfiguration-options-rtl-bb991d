// tb_repomox_top - end-to-end test of the extended chip at its default size
// (8 x 8 blocks, 6 inputs, 6 outputs, 624 configuration bits).
//
// Every configuration goes in serially through conf_data, 624 clocks per
// load, while the previous configuration is read back on conf_out. Then all
// 64 input vectors are applied in both polymorphic modes and the outputs are
// compared with the reference model (random configurations) or with the
// function the configuration was built for:
//   - reset: an all-zero configuration routes I0 to every output;
//   - a 6-input sorting network (12 compare-exchange elements in 5 layers,
//     min = AND, max = OR), whose sorted output 2 is the 6-input majority;
//   - a polymorphic circuit that computes majority in mode 0 (NAND) and the
//     parity of the six inputs in mode 1 (NOR), built from a mode detector
//     made of polymorphic gates;
//   - a 3 x 3-bit multiplier (a = I2..I0, b = I5..I3, product on O5..O0);
//   - random configurations, which exercise wrapped select codes, links two
//     columns back and primary inputs read by the second column.
// Each of those mechanisms is counted and must occur at least once.
module tb_repomox_top;
  import repomo_pkg::*;
  import repomo_ref_pkg::*;

  localparam int NB = REPOMOX_CFG_BITS;

  logic clk = 0, rst_n, conf_en, conf_data, conf_out, mode;
  logic [5:0] pi, po;
  int checks = 0, failures = 0;
  int cycles;
  cfg_t loaded;   // configuration currently held by the chip

  // Mechanism counters.
  int n_loads, n_readback, n_mode_switch, n_wrap, n_lback2, n_pi_col1;
  int n_sort, n_maj, n_par, n_reset, n_random, n_mult;

  repomox_top dut (
    .clk(clk), .rst_n(rst_n), .conf_en(conf_en), .conf_data(conf_data),
    .conf_out(conf_out), .mode(mode), .pi(pi), .po(po)
  );

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  // Shift a configuration in serially, bit 0 first; check the read-back.
  task automatic load(cfg_t c);
    int bad;
    bad = 0;
    cycles = 0;
    for (int i = 0; i < NB; i++) begin
      conf_en = 1; conf_data = c[i];
      if (conf_out !== loaded[i]) bad++;
      @(posedge clk); #1;
      cycles++;
    end
    conf_en = 0;
    check(bad == 0, "read-back of the previous configuration");
    check(cycles == NB, "load takes 624 clocks");
    n_readback++;
    n_loads++;
    loaded = c;
  endtask

  task automatic set_mode(bit m);
    if (mode !== m) n_mode_switch++;
    mode = m;
  endtask

  // Compare all 64 input vectors in both modes with the reference model.
  task automatic check_vs_model(string what);
    geom_t g;
    logic [15:0] e;
    g = repomox_geom();
    for (int m = 0; m < 2; m++) begin
      set_mode(m[0]);
      for (int v = 0; v < 64; v++) begin
        pi = 6'(v); #1;
        e = ref_eval(g, loaded, 16'(v), m[0]);
        check(po === e[5:0], $sformatf("%s pi=%0d mode=%0d po=%b exp=%b", what, v, m, po, e[5:0]));
      end
    end
  endtask

  // Count structural features of a configuration.
  task automatic count_features(cfg_t c);
    geom_t g;
    g = repomox_geom();
    for (int col = 0; col < 8; col++) begin
      int n, w;
      n = nsrc(g, col); w = selw(n);
      for (int r = 0; r < 8; r++) begin
        int base;
        base = field_base(g, col, r);
        for (int k = 0; k < 2; k++) begin
          int s;
          s = get_bits(c, base + 2 + k * w, w);
          if (s >= n) n_wrap++;
          else if (col >= 2 && s >= 8) n_lback2++;
          else if (col == 1 && s < 6) n_pi_col1++;
        end
      end
    end
  endtask

  // 6-input sorting network, ascending from row 0, outputs on rows 0..5.
  function automatic cfg_t sorter_cfg();
    geom_t g;
    cfg_t c;
    int lay [5][6];   // partner row of each row per layer (-1: pass)
    g = repomox_geom();
    c = '0;
    lay = '{'{5, 3, 4, 1, 2, 0}, '{-1, 2, 1, 4, 3, -1}, '{3, -1, 5, 0, -1, 2},
           '{1, 0, 3, 2, 5, 4}, '{-1, 2, 1, 4, 3, -1}};
    for (int col = 0; col < 8; col++)
      for (int r = 0; r < 6; r++) begin
        int p, sa, sb, f;
        p = (col < 5) ? lay[col][r] : -1;
        sa = (col == 0) ? src_pi(r) : src_back(g, col, 1, r);
        if (p < 0) begin
          f = 0; sb = sa;                          // AND(x, x) passes x
        end else begin
          sb = (col == 0) ? src_pi(p) : src_back(g, col, 1, p);
          f = (r < p) ? 0 : 1;                     // lower row: min, upper row: max
        end
        c = set_block(g, c, col, r, f, sa, sb);
      end
    return c;
  endfunction

  // Majority in mode 0, parity in mode 1, on output 0.
  function automatic cfg_t majpar_cfg();
    geom_t g;
    cfg_t c;
    localparam int AND_ = 0, OR_ = 1, XOR_ = 2, PG = 3;
    g = repomox_geom();
    c = sorter_cfg();
    // Parity tree on rows 6 and 7.
    c = set_block(g, c, 0, 6, XOR_, src_pi(0), src_pi(1));
    c = set_block(g, c, 0, 7, XOR_, src_pi(2), src_pi(3));
    c = set_block(g, c, 1, 6, XOR_, src_back(g, 1, 1, 6), src_back(g, 1, 1, 7));
    c = set_block(g, c, 1, 7, XOR_, src_pi(4), src_pi(5));
    c = set_block(g, c, 2, 6, XOR_, src_back(g, 2, 1, 6), src_back(g, 2, 1, 7));
    // Constant 0, constant 1 and the mode detector s (1 in mode 0, 0 in mode 1).
    c = set_block(g, c, 2, 7, XOR_, src_back(g, 2, 1, 6), src_back(g, 2, 1, 6));
    c = set_block(g, c, 3, 6, AND_, src_back(g, 3, 1, 6), src_back(g, 3, 1, 6));
    c = set_block(g, c, 3, 7, PG,   src_back(g, 3, 1, 7), src_back(g, 3, 1, 7));
    c = set_block(g, c, 4, 6, AND_, src_back(g, 4, 1, 6), src_back(g, 4, 1, 6));
    c = set_block(g, c, 4, 7, PG,   src_back(g, 4, 2, 7), src_back(g, 4, 1, 7));
    // out = s & maj | ~s & parity
    c = set_block(g, c, 5, 0, AND_, src_back(g, 5, 1, 2), src_back(g, 5, 1, 7));
    c = set_block(g, c, 5, 1, PG,   src_back(g, 5, 1, 7), src_back(g, 5, 1, 7));
    c = set_block(g, c, 5, 6, AND_, src_back(g, 5, 1, 6), src_back(g, 5, 1, 6));
    c = set_block(g, c, 6, 0, AND_, src_back(g, 6, 1, 1), src_back(g, 6, 1, 6));
    c = set_block(g, c, 6, 1, AND_, src_back(g, 6, 1, 0), src_back(g, 6, 1, 0));
    c = set_block(g, c, 7, 0, OR_,  src_back(g, 7, 1, 0), src_back(g, 7, 1, 1));
    return c;
  endfunction


  // 3 x 3-bit multiplier: a = {I2,I1,I0}, b = {I5,I4,I3}, product on O0..O5.
  // Column 0 forms the partial products aXbY; a Wallace-style reduction
  // follows, with bit 5 computed directly as a2b2 & (a1b1 | (a1|b1) & a0b0).
  function automatic cfg_t mult_cfg();
    geom_t g;
    cfg_t c;
    localparam int AND_ = 0, OR_ = 1, XOR_ = 2;
    g = repomox_geom();
    c = '0;
    // Column 0: partial products.
    c = set_block(g, c, 0, 0, AND_, src_pi(0), src_pi(3));   // a0b0
    c = set_block(g, c, 0, 1, AND_, src_pi(1), src_pi(3));   // a1b0
    c = set_block(g, c, 0, 2, AND_, src_pi(0), src_pi(4));   // a0b1
    c = set_block(g, c, 0, 3, AND_, src_pi(2), src_pi(3));   // a2b0
    c = set_block(g, c, 0, 4, AND_, src_pi(1), src_pi(4));   // a1b1
    c = set_block(g, c, 0, 5, AND_, src_pi(0), src_pi(5));   // a0b2
    c = set_block(g, c, 0, 6, AND_, src_pi(2), src_pi(4));   // a2b1
    c = set_block(g, c, 0, 7, AND_, src_pi(1), src_pi(5));   // a1b2
    // Column 1: first half adders, a2b2 and a1|b1 straight from the inputs.
    c = set_block(g, c, 1, 0, XOR_, src_back(g, 1, 1, 1), src_back(g, 1, 1, 2)); // p1
    c = set_block(g, c, 1, 1, AND_, src_back(g, 1, 1, 1), src_back(g, 1, 1, 2)); // c1
    c = set_block(g, c, 1, 2, XOR_, src_back(g, 1, 1, 3), src_back(g, 1, 1, 4)); // x^y
    c = set_block(g, c, 1, 3, AND_, src_back(g, 1, 1, 3), src_back(g, 1, 1, 4)); // x&y
    c = set_block(g, c, 1, 4, XOR_, src_back(g, 1, 1, 6), src_back(g, 1, 1, 7)); // s3
    c = set_block(g, c, 1, 5, AND_, src_back(g, 1, 1, 6), src_back(g, 1, 1, 7)); // c3
    c = set_block(g, c, 1, 6, AND_, src_pi(2), src_pi(5));                       // a2b2
    c = set_block(g, c, 1, 7, OR_,  src_pi(1), src_pi(4));                       // a1|b1
    // Column 2.
    c = set_block(g, c, 2, 0, XOR_, src_back(g, 2, 1, 2), src_back(g, 2, 2, 5)); // s2
    c = set_block(g, c, 2, 1, AND_, src_back(g, 2, 1, 2), src_back(g, 2, 2, 5)); // z&(x^y)
    c = set_block(g, c, 2, 2, AND_, src_back(g, 2, 1, 7), src_back(g, 2, 2, 0)); // (a1|b1)&a0b0
    c = set_block(g, c, 2, 3, XOR_, src_back(g, 2, 1, 6), src_back(g, 2, 1, 5)); // h = a2b2^c3
    c = set_block(g, c, 2, 4, AND_, src_back(g, 2, 2, 0), src_back(g, 2, 2, 0)); // p0
    c = set_block(g, c, 2, 5, AND_, src_back(g, 2, 2, 4), src_back(g, 2, 2, 4)); // a1b1
    c = set_block(g, c, 2, 6, AND_, src_back(g, 2, 1, 0), src_back(g, 2, 1, 0)); // p1
    c = set_block(g, c, 2, 7, AND_, src_back(g, 2, 1, 1), src_back(g, 2, 1, 1)); // c1
    // Column 3.
    c = set_block(g, c, 3, 0, OR_,  src_back(g, 3, 2, 3), src_back(g, 3, 1, 1)); // c2
    c = set_block(g, c, 3, 1, XOR_, src_back(g, 3, 1, 0), src_back(g, 3, 1, 7)); // p2
    c = set_block(g, c, 3, 2, AND_, src_back(g, 3, 1, 0), src_back(g, 3, 1, 7)); // g2
    c = set_block(g, c, 3, 3, OR_,  src_back(g, 3, 1, 5), src_back(g, 3, 1, 2)); // carry of a'+b'
    c = set_block(g, c, 3, 4, AND_, src_back(g, 3, 2, 4), src_back(g, 3, 2, 4)); // s3
    c = set_block(g, c, 3, 5, AND_, src_back(g, 3, 2, 6), src_back(g, 3, 2, 6)); // a2b2
    c = set_block(g, c, 3, 6, AND_, src_back(g, 3, 1, 4), src_back(g, 3, 1, 4)); // p0
    c = set_block(g, c, 3, 7, AND_, src_back(g, 3, 1, 6), src_back(g, 3, 1, 6)); // p1
    // Column 4.
    c = set_block(g, c, 4, 0, XOR_, src_back(g, 4, 1, 0), src_back(g, 4, 1, 2)); // c2^g2
    c = set_block(g, c, 4, 1, AND_, src_back(g, 4, 1, 0), src_back(g, 4, 1, 2)); // c2&g2
    c = set_block(g, c, 4, 2, AND_, src_back(g, 4, 1, 3), src_back(g, 4, 1, 5)); // p5
    c = set_block(g, c, 4, 3, AND_, src_back(g, 4, 2, 3), src_back(g, 4, 2, 3)); // h
    c = set_block(g, c, 4, 4, AND_, src_back(g, 4, 1, 4), src_back(g, 4, 1, 4)); // s3
    c = set_block(g, c, 4, 5, AND_, src_back(g, 4, 1, 6), src_back(g, 4, 1, 6)); // p0
    c = set_block(g, c, 4, 6, AND_, src_back(g, 4, 1, 7), src_back(g, 4, 1, 7)); // p1
    c = set_block(g, c, 4, 7, AND_, src_back(g, 4, 1, 1), src_back(g, 4, 1, 1)); // p2
    // Column 5.
    c = set_block(g, c, 5, 0, XOR_, src_back(g, 5, 1, 4), src_back(g, 5, 1, 0)); // p3
    c = set_block(g, c, 5, 1, AND_, src_back(g, 5, 1, 4), src_back(g, 5, 1, 0)); // s3&(c2^g2)
    c = set_block(g, c, 5, 2, AND_, src_back(g, 5, 1, 1), src_back(g, 5, 1, 1)); // c2&g2
    c = set_block(g, c, 5, 3, AND_, src_back(g, 5, 1, 3), src_back(g, 5, 1, 3)); // h
    c = set_block(g, c, 5, 4, AND_, src_back(g, 5, 1, 2), src_back(g, 5, 1, 2)); // p5
    c = set_block(g, c, 5, 5, AND_, src_back(g, 5, 1, 5), src_back(g, 5, 1, 5)); // p0
    c = set_block(g, c, 5, 6, AND_, src_back(g, 5, 1, 6), src_back(g, 5, 1, 6)); // p1
    c = set_block(g, c, 5, 7, AND_, src_back(g, 5, 1, 7), src_back(g, 5, 1, 7)); // p2
    // Column 6.
    c = set_block(g, c, 6, 0, OR_,  src_back(g, 6, 1, 1), src_back(g, 6, 1, 2)); // k3
    c = set_block(g, c, 6, 1, AND_, src_back(g, 6, 1, 3), src_back(g, 6, 1, 3)); // h
    c = set_block(g, c, 6, 2, AND_, src_back(g, 6, 1, 5), src_back(g, 6, 1, 5)); // p0
    c = set_block(g, c, 6, 3, AND_, src_back(g, 6, 1, 6), src_back(g, 6, 1, 6)); // p1
    c = set_block(g, c, 6, 4, AND_, src_back(g, 6, 1, 7), src_back(g, 6, 1, 7)); // p2
    c = set_block(g, c, 6, 5, AND_, src_back(g, 6, 1, 0), src_back(g, 6, 1, 0)); // p3
    c = set_block(g, c, 6, 6, AND_, src_back(g, 6, 1, 4), src_back(g, 6, 1, 4)); // p5
    // Column 7: outputs.
    c = set_block(g, c, 7, 0, AND_, src_back(g, 7, 1, 2), src_back(g, 7, 1, 2)); // p0
    c = set_block(g, c, 7, 1, AND_, src_back(g, 7, 1, 3), src_back(g, 7, 1, 3)); // p1
    c = set_block(g, c, 7, 2, AND_, src_back(g, 7, 1, 4), src_back(g, 7, 1, 4)); // p2
    c = set_block(g, c, 7, 3, AND_, src_back(g, 7, 1, 5), src_back(g, 7, 1, 5)); // p3
    c = set_block(g, c, 7, 4, XOR_, src_back(g, 7, 1, 1), src_back(g, 7, 1, 0)); // p4 = h^k3
    c = set_block(g, c, 7, 5, AND_, src_back(g, 7, 1, 6), src_back(g, 7, 1, 6)); // p5
    return c;
  endfunction

  initial begin
    cfg_t c;
    loaded = '0;
    {n_loads, n_readback, n_mode_switch, n_wrap, n_lback2, n_pi_col1} = '0;
    {n_sort, n_maj, n_par, n_reset, n_random, n_mult} = '0;
    rst_n = 0; conf_en = 0; conf_data = 0; mode = 0; pi = '0;
    #12 rst_n = 1;

    // After reset every block is AND(source 0, source 0): I0 on all outputs.
    for (int v = 0; v < 64; v++) begin
      pi = 6'(v); #1;
      check(po === {6{pi[0]}}, $sformatf("reset configuration pi=%0d po=%b", v, po));
    end
    n_reset++;

    // Sorting network (and the majority on its output 2).
    load(sorter_cfg());
    for (int m = 0; m < 2; m++) begin
      set_mode(m[0]);
      for (int v = 0; v < 64; v++) begin
        int ones;
        logic [5:0] exp;
        pi = 6'(v); #1;
        ones = $countones(pi);
        for (int k = 0; k < 6; k++) exp[k] = (k >= 6 - ones);
        check(po === exp, $sformatf("sorter pi=%b po=%b", pi, po));
        check(po[2] === (ones >= 4), "majority on sorted output 2");
      end
    end
    n_sort++;
    check_vs_model("sorter vs model");

    // Polymorphic majority / parity.
    load(majpar_cfg());
    set_mode(0);
    for (int v = 0; v < 64; v++) begin
      pi = 6'(v); #1;
      check(po[0] === ($countones(pi) >= 4), $sformatf("majority pi=%b po0=%b", pi, po[0]));
    end
    n_maj++;
    set_mode(1);
    for (int v = 0; v < 64; v++) begin
      pi = 6'(v); #1;
      check(po[0] === ^pi, $sformatf("parity pi=%b po0=%b", pi, po[0]));
    end
    n_par++;
    check_vs_model("majority/parity vs model");

    // 3 x 3-bit multiplier (no polymorphic gate: the same in both modes).
    load(mult_cfg());
    for (int m = 0; m < 2; m++) begin
      set_mode(m[0]);
      for (int v = 0; v < 64; v++) begin
        int prod;
        pi = 6'(v); #1;
        prod = int'(pi[2:0]) * int'(pi[5:3]);
        check(po === 6'(prod), $sformatf("multiplier %0d*%0d po=%0d", pi[2:0], pi[5:3], po));
      end
    end
    n_mult++;

    // Random configurations.
    for (int t = 0; t < 40; t++) begin
      c = random_cfg(NB);
      load(c);
      count_features(c);
      check_vs_model($sformatf("random %0d", t));
      n_random++;
    end

    // Shift the last configuration out to read it back completely.
    load('0);

    $display("mechanisms: loads=%0d readbacks=%0d mode_switches=%0d wrapped_selects=%0d lback2_links=%0d pi_in_col1=%0d reset=%0d sorter=%0d majority=%0d parity=%0d random=%0d multiplier=%0d",
             n_loads, n_readback, n_mode_switch, n_wrap, n_lback2, n_pi_col1, n_reset,
             n_sort, n_maj, n_par, n_random, n_mult);
    check(n_loads > 0, "configuration load happened");
    check(n_readback > 0, "read-back happened");
    check(n_mode_switch > 0, "mode switch happened");
    check(n_wrap > 0, "wrapped select code happened");
    check(n_lback2 > 0, "link two columns back happened");
    check(n_pi_col1 > 0, "primary input in column 1 happened");
    check(n_reset > 0 && n_sort > 0 && n_maj > 0 && n_par > 0 && n_random > 0 && n_mult > 0,
          "every workload ran");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
