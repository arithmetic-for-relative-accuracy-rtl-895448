// End-to-end test of the floating-point unit (two AD modules and their
// sequencer) at its default size: 16-bit mantissas, 8-bit exponents, 32-bit
// modules. Three kinds of checks:
//   * floating-point multiply, divide, add and subtract on random operands,
//     bit for bit against a model that multiplies, divides or aligns and
//     adds with plain operators and truncates to MW bits, and against the exact real value
//     with a relative tolerance of 2^-(MW-3);
//   * every integer operation sent through to the mantissa module, against
//     the reference model of the AD module (ad_ref_pkg);
//   * power and root of integers, bit for bit against a model of the
//     log - multiply/divide - antilog sequence, and against the real power
//     with a tolerance that allows for the linear log/antilog error;
//   * clock cycles from start to done: a float multiplication or division
//     takes the mantissa operation's own latency plus a fixed overhead, a float
//     addition a fixed number of cycles, an integer command the module's own
//     latency plus two.
// Each mechanism (zero operand, negligible operand, cancellation, exponent
// overflow, power overflow, float division by zero, accuracy stop, iteration limit, operand swap, division
// correction, negative remainder, division by zero, each operation) must
// happen at least once.
module tb_ad_float_unit;
  import ad_pkg::*;
  import ad_ref_pkg::*;

  localparam int MW = 16;
  localparam int EW = 8;

  logic              clk = 0, rst_n = 0, start = 0, int_start = 0;
  fop_e              fop = FOP_MUL;
  ad_op_e            int_op = OP_ADD;
  logic [31:0]       int_a = 0, int_b = 0;
  logic [4:0]        int_exp_a = 0, int_exp_b = 0;
  logic [63:0]       int_c = 0, accuracy = 0;
  logic [5:0]        max_iter = 0;
  logic              a_sign = 0, b_sign = 0;
  logic [EW-1:0]     a_exp = 0, b_exp = 0;
  logic [MW-1:0]     a_man = 0, b_man = 0;
  logic              busy, done, r_sign, exp_ovf, acc_reached, limited;
  logic [EW-1:0]     r_exp;
  logic [MW-1:0]     r_man;
  logic [63:0]       int_result;
  logic signed [6:0] int_seg;
  logic [31:0]       int_remainder;
  logic [5:0]        iterations;

  int checks = 0, failures = 0, cyc = 0;
  int n_fop[6], n_iop[12];
  int n_pw_ovf = 0, n_fdivz = 0;
  int n_zero = 0, n_negligible = 0, n_cancel = 0, n_ovf = 0, n_acc = 0, n_lim = 0;
  int n_swap = 0, n_corr = 0, n_neg = 0, n_divz = 0;

  // Fixed parts of the float latencies (cycles from start to done).
  localparam int FMUL_EXTRA = 14;   // plus the mantissa module's own latency
  localparam int FADD_LAT   = 25;

  ad_float_unit dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  initial begin
    repeat (300000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real fval(logic s, logic [EW-1:0] e, logic [MW-1:0] m);
    real v = real'(m) / real'(1 << (MW - 1));
    int  ei = int'(signed'(e));
    v = v * (2.0 ** ei);
    return s ? -v : v;
  endfunction

  function automatic logic [MW-1:0] norm_man(logic [63:0] v, int p);
    return (p >= MW - 1) ? MW'(v >> (p - (MW - 1))) : MW'(v << ((MW - 1) - p));
  endfunction

  task automatic check(string what, bit ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic wait_done(output int lat);
    int t0;
    @(posedge clk);
    t0 = cyc;
    @(negedge clk);
    start = 0;
    int_start = 0;
    while (!done) @(negedge clk);
    lat = cyc - t0;
  endtask

  task automatic fop_run(fop_e o, logic as, logic [EW-1:0] ae, logic [MW-1:0] am,
                         logic bs, logic [EW-1:0] be, logic [MW-1:0] bm,
                         logic [63:0] acc = 0, int lim = 0);
    logic          ws, wovf;
    logic [MW-1:0] wm;
    int            we, lat, wlat;
    bit            exact_cmp;
    real           exact, got;
    @(negedge clk);
    fop = o; a_sign = as; a_exp = ae; a_man = am; b_sign = bs; b_exp = be; b_man = bm;
    accuracy = acc; max_iter = 6'(lim); start = 1;
    wait_done(lat);
    n_fop[int'(o)]++;
    wovf = 0;
    exact_cmp = 0;
    if (o == FOP_MUL || o == FOP_DIV) begin
      bit      dv = (o == FOP_DIV);
      expect_t e = dv ? model(OP_DIV, 32'(am) << MW, 32'(bm), 0, 0, 0, acc, lim)
                      : model(OP_MUL, 32'(am), 32'(bm), 0, 0, 0, acc, lim);
      if (e.acc) n_acc++;
      if (e.lim) n_lim++;
      n_neg += e.n_neg;
      if (e.corr) n_corr++;
      wlat = e.lat + FMUL_EXTRA;
      if (e.r == 0) begin
        ws = 0; we = 0; wm = 0;
        wlat = 7;   // bounded by the exponent addition running alongside
        n_zero++;
      end else begin
        int p = msb(e.r);
        ws = as ^ bs;
        wm = norm_man(e.r, p);
        we = dv ? int'(signed'(ae)) - int'(signed'(be)) + p - MW
                : int'(signed'(ae)) + int'(signed'(be)) + p - 2 * (MW - 1);
        exact_cmp = !e.acc && !e.lim;
      end
      check($sformatf("%s iterations %0d want %0d", o.name(), iterations, e.iters),
            int'(iterations) == e.iters && acc_reached == e.acc && limited == e.lim);
      exact = dv ? fval(as, ae, am) / fval(bs, be, bm) : fval(as, ae, am) * fval(bs, be, bm);
    end else begin
      logic bse = bs ^ (o == FOP_SUB);
      int   ea = int'(signed'(ae)), eb = int'(signed'(be));
      wlat = FADD_LAT;
      exact = fval(as, ae, am) + (o == FOP_SUB ? -fval(bs, be, bm) : fval(bs, be, bm));
      if (am == 0 || bm == 0) begin
        n_zero++;
        wlat = 1;
        if (am == 0 && bm == 0) begin ws = 0; we = 0; wm = 0; end
        else if (am == 0) begin ws = bse; we = eb; wm = bm; end
        else begin ws = as; we = ea; wm = am; end
      end else begin
        bit swap = (eb > ea) || (eb == ea && bm > am);
        int gap = swap ? eb - ea : ea - eb;
        logic [MW-1:0] ml = swap ? bm : am, ms = swap ? am : bm;
        int el = swap ? eb : ea, es = swap ? ea : eb;
        logic sl = swap ? bse : as;
        if (swap) n_swap++;
        if (gap > MW) begin
          n_negligible++;
          ws = sl; we = el; wm = ml;
          wlat = 7;
        end else begin
          logic [63:0] s = (as == bse) ? (64'(ml) << gap) + 64'(ms) : (64'(ml) << gap) - 64'(ms);
          if (s == 0) begin
            n_cancel++;
            ws = 0; we = 0; wm = 0;
            wlat = 13;
          end else begin
            int p = msb(s);
            ws = sl;
            wm = norm_man(s, p);
            we = es + p - (MW - 1);
            exact_cmp = (as == bse);
          end
        end
      end
    end
    wovf = (we > 2 ** (EW - 1) - 1) || (we < -(2 ** (EW - 1)));
    if (wovf) n_ovf++;
    if (o == FOP_DIV && bm == 0) begin
      wovf = 1;
      n_fdivz++;
    end
    check($sformatf("%s result s=%b e=%0d m=%h want s=%b e=%0d m=%h", o.name(), r_sign,
                    int'(signed'(r_exp)), r_man, ws, we, wm),
          r_sign == ws && r_exp == EW'(we) && r_man == wm && exp_ovf == wovf);
    check($sformatf("%s latency %0d want %0d", o.name(), lat, wlat), lat == wlat);
    if (exact_cmp && !wovf) begin
      got = fval(r_sign, r_exp, r_man);
      check($sformatf("%s value %g exact %g", o.name(), got, exact),
            ((got - exact) / exact < 2.0 ** (3 - MW)) && ((exact - got) / exact < 2.0 ** (3 - MW)));
    end
  endtask

  task automatic int_run(ad_op_e o, logic [31:0] a, logic [31:0] b, logic [4:0] ea,
                         logic [4:0] eb, logic [63:0] c, logic [63:0] acc, int lim);
    expect_t e;
    int lat;
    e = model(o, a, b, ea, eb, c, acc, lim);
    @(negedge clk);
    int_op = o; int_a = a; int_b = b; int_exp_a = ea; int_exp_b = eb; int_c = c;
    accuracy = acc; max_iter = 6'(lim); int_start = 1;
    wait_done(lat);
    n_iop[int'(o)]++;
    n_neg += e.n_neg;
    if (e.corr) n_corr++;
    if (e.divz) n_divz++;
    if (e.acc) n_acc++;
    if (e.lim) n_lim++;
    check($sformatf("%s a=%0d b=%0d result=%h want %h", o.name(), a, b, int_result, e.r),
          int_result == e.r);
    if (o inside {OP_NORM, OP_LOG, OP_SEGADD, OP_SEGSUB})
      check($sformatf("%s seg=%0d want %0d", o.name(), int_seg, e.seg), int_seg == e.seg);
    if (e.check_rem)
      check($sformatf("%s remainder=%0d want %0d", o.name(), int_remainder, e.rem),
            int_remainder == e.rem);
    check($sformatf("%s iterations=%0d want %0d", o.name(), iterations, e.iters),
          int'(iterations) == e.iters && acc_reached == e.acc && limited == e.lim);
    check($sformatf("%s latency %0d want %0d", o.name(), lat, e.lat + 2), lat == e.lat + 2);
  endtask

  // Power/root model: Mitchell log with 27 fraction bits, exact product or
  // quotient by n, Mitchell antilog into 32.32 fixed point.
  task automatic pw_run(bit root, logic [31:0] x, logic [31:0] n);
    logic [63:0] want, lg, t;
    bit          wovf;
    int          lat, wlat, j;
    real         exact, got, tol;
    @(negedge clk);
    fop = root ? FOP_ROOT : FOP_POW; int_a = x; int_b = n; accuracy = 0; max_iter = 0;
    start = 1;
    wait_done(lat);
    n_fop[root ? 4 : 3]++;
    wovf = 0;
    if (x == 0) begin
      want = 0;
      wlat = 7;
    end else begin
      expect_t e;
      j  = msb(64'(x));
      lg = (64'(j) << 27) | ((((64'(x) - (64'(1) << j)) << (32 - j)) & 64'hFFFF_FFFF) >> 5);
      if (root) begin
        e = model(OP_DIV, 32'(lg), n, 0, 0, 0, 0, 0);
        t = e.r;
      end else begin
        e = model(OP_MUL, 32'(lg), n, 0, 0, 0, 0, 0);
        t = e.r;
      end
      wlat = e.lat + 8;
      if (t >> 32 != 0) begin
        wovf = 1;
        want = '1;
        n_pw_ovf++;
      end else begin
        want = {31'b0, 1'b1, t[26:0], 5'b0} << t[31:27];
        wlat += 6;
      end
    end
    check($sformatf("%s x=%0d n=%0d result=%h want %h", root ? "ROOT" : "POW", x, n, int_result, want),
          int_result === want && exp_ovf === wovf);
    check($sformatf("%s latency %0d want %0d", root ? "ROOT" : "POW", lat, wlat), lat == wlat);
    if (x != 0 && n != 0 && !wovf) begin
      exact = root ? real'(x) ** (1.0 / real'(n)) : real'(x) ** real'(n);
      got   = real'(int_result) / (2.0 ** 32);
      tol   = (2.0 ** (0.09 * (root ? 1.0 : real'(n)))) * 1.07 - 1.0;
      check($sformatf("%s x=%0d n=%0d value %g exact %g", root ? "ROOT" : "POW", x, n, got, exact),
            (got - exact) / exact < tol && (exact - got) / exact < tol);
    end
  endtask

  function automatic logic [MW-1:0] rand_man();
    return MW'({1'b1, 15'($urandom)});
  endfunction

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;

    // Directed cases: 1.5 * 1.5, 1.5 + 1.5, x - x, operands far apart,
    // a zero operand, exponent overflow.
    fop_run(FOP_MUL, 0, 0, 16'hC000, 0, 0, 16'hC000);
    check("1.5*1.5 = 2.25", r_exp == 1 && r_man == 16'h9000);
    fop_run(FOP_ADD, 0, 0, 16'hC000, 0, 0, 16'hC000);
    check("1.5+1.5 = 3", r_exp == 1 && r_man == 16'hC000);
    fop_run(FOP_SUB, 1, 5, 16'hABCD, 1, 5, 16'hABCD);
    fop_run(FOP_ADD, 0, 40, 16'h8001, 1, 3, 16'hFFFF);
    fop_run(FOP_SUB, 0, -8'sd4, 16'h8000, 0, 2, 16'hC000);
    fop_run(FOP_ADD, 0, 7, 16'h0000, 1, 3, 16'h9000);
    fop_run(FOP_MUL, 0, 100, 16'hF000, 0, 100, 16'hF000);
    fop_run(FOP_MUL, 0, 0, 16'hFFFF, 0, 0, 16'hFFFF, 64'd1 << 20);
    fop_run(FOP_MUL, 0, 0, 16'hFFFF, 0, 0, 16'hFFFF, 0, 2);
    fop_run(FOP_DIV, 0, 3, 16'hC000, 1, 1, 16'h8000);
    check("1.5*2^3 / -1*2^1 = -6", r_sign == 1 && r_exp == 2 && r_man == 16'hC000);
    fop_run(FOP_DIV, 0, 0, 16'h8000, 0, 0, 16'hC000);
    fop_run(FOP_DIV, 0, 0, 16'h9000, 0, 0, 16'h0000);

    // Random floating-point operations.
    for (int n = 0; n < 600; n++) begin
      fop_e o;
      logic [EW-1:0] ae, be;
      logic [MW-1:0] am, bm;
      o  = fop_e'($urandom % 4);
      if (o == FOP_POW) o = FOP_DIV;
      ae = EW'($urandom % 64) - EW'(32);
      be = ($urandom % 3 == 0) ? ae : EW'($urandom % 64) - EW'(32);
      am = ($urandom % 30 == 0) ? '0 : rand_man();
      bm = ($urandom % 8 == 0) ? am : rand_man();
      if (o == FOP_DIV && $urandom % 40 == 0) bm = '0;
      fop_run(o, 1'($urandom), ae, am, 1'($urandom), be, bm,
              ($urandom % 5 == 0) ? 64'(1) << ($urandom % 30) : 64'd0,
              ($urandom % 5 == 0) ? int'($urandom % 6) : 0);
    end

    // Power and root: 3^2, 1000^3, 2^40 overflow, root 2 of 1e6, random.
    pw_run(0, 3, 2);
    pw_run(0, 1000, 3);
    pw_run(0, 4, 20);
    pw_run(1, 1000000, 2);
    pw_run(1, 0, 3);
    for (int n = 0; n < 200; n++)
      pw_run(n[0], $urandom >> ($urandom % 32), 1 + $urandom % 4);

    // Integer operations sent through to the mantissa module.
    int_run(OP_DIV, 308, 14, 0, 0, 0, 0, 0);
    check("308/14 = 22", int_result == 22);
    int_run(OP_DIV, 20, 28, 0, 0, 0, 0, 0);
    int_run(OP_DIV, 9, 0, 0, 0, 0, 0, 0);
    for (int n = 0; n < 400; n++) begin
      int_run(ad_op_e'($urandom % 12), $urandom >> ($urandom % 32), $urandom >> ($urandom % 32),
              5'($urandom), 5'($urandom), {$urandom, $urandom},
              ($urandom % 4 == 0) ? 64'(1) << ($urandom % 40) : 64'd0,
              ($urandom % 4 == 0) ? int'($urandom % 8) : 0);
    end

    begin
      int mech[string];
      mech["zero operand"]        = n_zero;
      mech["negligible operand"]  = n_negligible;
      mech["cancellation"]        = n_cancel;
      mech["exponent overflow"]   = n_ovf;
      mech["accuracy stop"]       = n_acc;
      mech["iteration limit"]     = n_lim;
      mech["operand swap"]        = n_swap;
      mech["division correction"] = n_corr;
      mech["negative remainder"]  = n_neg;
      mech["division by zero"]    = n_divz;
      mech["power overflow"]      = n_pw_ovf;
      mech["float division by 0"] = n_fdivz;
      foreach (mech[k]) begin
        $display("mechanism %-20s %0d", k, mech[k]);
        check($sformatf("mechanism never seen: %s", k), mech[k] > 0);
      end
      for (int i = 0; i < 6; i++) check($sformatf("float op %0d never run", i), n_fop[i] > 0);
      for (int i = 0; i < 12; i++) check($sformatf("integer op %0d never run", i), n_iop[i] > 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
