// Equation-solver workload on the floating-point unit: Newton-Raphson with a
// difference-quotient derivative on two cubic polynomials.
//
// The bench plays the host that drives the unit. For each equation and each
// iteration limit it runs the sequential solver, every arithmetic step on
// the unit:
//   f_k    = ((a3*x_k + a2)*x_k + a1)*x_k + a0            (Horner, FOP_MUL/ADD)
//   d_k    = (f_k - f_(k-1)) / (x_k - x_(k-1))            (FOP_SUB, FOP_DIV)
//   x_(k+1) = x_k - f_k / d_k                             (FOP_DIV, FOP_SUB)
// from x_0 = 0, x_1 = 1, until x stops changing, f_k is zero, the
// difference quotient is zero or 40 solver steps have run. The limit is
// applied through max_iter to every mantissa multiplication and division
// (0 means no limit). The root found, the solver steps and the clock cycles
// the whole run took are printed per run.
//
// Checks: the root reached must lie within a bound of the true root, which
// the bench finds with the same solver in real arithmetic. The bound is the
// error of evaluating f on the unit, divided by the slope at the root:
// 4 * (sum of |terms| at the root) * (2^-13 + 2^-2L) / |f'(root)|, where
// 2^-13 covers the truncation of a few 16-bit results and 2^-2L the rest
// term an L-iteration mantissa product leaves. A limited run must also see
// the iteration limit stop at least one operation.
//
// Interface and timing: operations are issued one at a time (operands on a
// falling edge, start for one cycle, wait for done); nothing overlaps. The
// equations, the solver and its two-point derivative and the use of
// iteration limits to trade accuracy for cycles follow the document; the
// starting points, stop rule, limits tried and the bound are this bench's
// choices. The document's 24-bit precision becomes the unit's 16-bit
// mantissa.
module tb_ad_newton;
  import ad_pkg::*;

  localparam int MW = 16;
  localparam int EW = 8;
  localparam int NLIM = 5;
  localparam int LIMS[NLIM] = '{0, 8, 6, 4, 3};

  typedef struct packed {
    logic          s;
    logic [EW-1:0] e;
    logic [MW-1:0] m;
  } fl_t;

  logic              clk = 0, rst_n = 0, start = 0;
  fop_e              fop = FOP_MUL;
  logic              a_sign = 0, b_sign = 0;
  logic [EW-1:0]     a_exp = 0, b_exp = 0;
  logic [MW-1:0]     a_man = 0, b_man = 0;
  logic [5:0]        max_iter = 0;
  logic              busy, done, r_sign, exp_ovf, acc_reached, limited;
  logic [EW-1:0]     r_exp;
  logic [MW-1:0]     r_man;
  logic [63:0]       int_result;
  logic signed [6:0] int_seg;
  logic [31:0]       int_remainder;
  logic [5:0]        iterations;

  int checks = 0, failures = 0;
  int cycles = 0, n_limited = 0;

  ad_float_unit dut (
    .clk(clk), .rst_n(rst_n), .start(start), .fop(fop),
    .int_start(1'b0), .int_op(OP_ADD), .int_a('0), .int_b('0), .int_exp_a('0), .int_exp_b('0),
    .int_c('0), .a_sign(a_sign), .a_exp(a_exp), .a_man(a_man),
    .b_sign(b_sign), .b_exp(b_exp), .b_man(b_man), .accuracy('0), .max_iter(max_iter),
    .busy(busy), .done(done), .r_sign(r_sign), .r_exp(r_exp), .r_man(r_man), .exp_ovf(exp_ovf),
    .int_result(int_result), .int_seg(int_seg), .int_remainder(int_remainder),
    .iterations(iterations), .acc_reached(acc_reached), .limited(limited)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real to_real(fl_t f);
    real v;
    int  ei;
    v  = real'(f.m) / real'(1 << (MW - 1));
    ei = int'(signed'(f.e));
    v  = v * (2.0 ** ei);
    return f.s ? -v : v;
  endfunction

  // truncated to the unit's format: |x| = m/2^15 * 2^e, 2^15 <= m < 2^16
  function automatic fl_t to_fl(real x);
    fl_t f;
    real a;
    int  e;
    f = '0;
    a = (x < 0.0) ? -x : x;
    if (a == 0.0) return f;
    e = 0;
    while (a >= 2.0 ** (e + 1)) e++;
    while (a < 2.0 ** e) e--;
    f.s = (x < 0.0);
    f.e = EW'(e);
    f.m = MW'($rtoi(a / (2.0 ** e) * 32768.0));
    return f;
  endfunction

  task automatic check(string what, bit ok);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  task automatic fpu(fop_e o, fl_t a, fl_t b, output fl_t r);
    @(negedge clk);
    fop = o;
    {a_sign, a_exp, a_man} = a;
    {b_sign, b_exp, b_man} = b;
    start = 1;
    @(negedge clk);
    start = 0;
    while (!done) @(negedge clk);
    if (limited) n_limited++;
    r = (r_man == '0) ? fl_t'('0) : fl_t'({r_sign, r_exp, r_man});
  endtask

  always @(posedge clk) cycles <= cycles + 1;

  function automatic real poly(real c[4], real x);
    return ((c[3] * x + c[2]) * x + c[1]) * x + c[0];
  endfunction

  // true root, by the same two-point iteration in real arithmetic
  function automatic real true_root(real c[4]);
    real x0 = 0.0, x1 = 1.0, f0, f1, x2;
    f0 = poly(c, x0);
    for (int k = 0; k < 200; k++) begin
      f1 = poly(c, x1);
      if (f1 == 0.0 || f1 == f0) break;
      x2 = x1 - f1 * (x1 - x0) / (f1 - f0);
      x0 = x1;
      f0 = f1;
      x1 = x2;
    end
    return x1;
  endfunction

  task automatic run_solver(real c[4], int lim, output real root, output int steps);
    fl_t cf[4], x0, x1, f0, f1, t, dx, df, d, q, x2;
    for (int i = 0; i < 4; i++) cf[i] = to_fl(c[i]);
    max_iter = 6'(lim);
    x0 = to_fl(0.0);
    x1 = to_fl(1.0);
    // f(x0)
    fpu(FOP_MUL, cf[3], x0, t);
    fpu(FOP_ADD, t, cf[2], t);
    fpu(FOP_MUL, t, x0, t);
    fpu(FOP_ADD, t, cf[1], t);
    fpu(FOP_MUL, t, x0, t);
    fpu(FOP_ADD, t, cf[0], f0);
    steps = 0;
    for (int k = 0; k < 40; k++) begin
      fpu(FOP_MUL, cf[3], x1, t);
      fpu(FOP_ADD, t, cf[2], t);
      fpu(FOP_MUL, t, x1, t);
      fpu(FOP_ADD, t, cf[1], t);
      fpu(FOP_MUL, t, x1, t);
      fpu(FOP_ADD, t, cf[0], f1);
      if (f1.m == '0) break;
      fpu(FOP_SUB, f1, f0, df);
      fpu(FOP_SUB, x1, x0, dx);
      if (df.m == '0 || dx.m == '0) break;
      fpu(FOP_DIV, df, dx, d);
      if (d.m == '0) break;
      fpu(FOP_DIV, f1, d, q);
      fpu(FOP_SUB, x1, q, x2);
      steps++;
      if (x2 == x1) break;
      x0 = x1;
      f0 = f1;
      x1 = x2;
    end
    root = to_real(x1);
  endtask

  initial begin
    real eqs[2][4];
    real r_true, r_got, slope, terms, bound;
    int  steps, c0, lim0;
    // x^3 - 9x^2 - 66x + 90 and -2x^3 + 33x^2 - 17x - 100
    eqs[0] = '{90.0, -66.0, -9.0, 1.0};
    eqs[1] = '{-100.0, -17.0, 33.0, -2.0};
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int q = 0; q < 2; q++) begin
      r_true = true_root(eqs[q]);
      slope = (3.0 * eqs[q][3] * r_true + 2.0 * eqs[q][2]) * r_true + eqs[q][1];
      if (slope < 0.0) slope = -slope;
      terms = 0.0;
      for (int i = 0; i < 4; i++) terms += ((eqs[q][i] < 0.0) ? -eqs[q][i] : eqs[q][i]) * (r_true ** i);
      $display("equation %0d: true root %f", q, r_true);
      $display("  limit  root        error      bound      steps  cycles");
      for (int l = 0; l < NLIM; l++) begin
        c0 = cycles;
        lim0 = n_limited;
        run_solver(eqs[q], LIMS[l], r_got, steps);
        bound = 4.0 * terms * (2.0 ** -13 + ((LIMS[l] == 0) ? 0.0 : 2.0 ** (-2 * LIMS[l]))) / slope;
        $display("  %5d  %10.6f  %9.2e  %9.2e  %5d  %6d", LIMS[l], r_got,
                 r_got - r_true, bound, steps, cycles - c0);
        check($sformatf("equation %0d limit %0d: root %f, true %f", q, LIMS[l], r_got, r_true),
              r_got - r_true <= bound && r_true - r_got <= bound);
        if (LIMS[l] != 0)
          check($sformatf("equation %0d limit %0d never stopped an operation", q, LIMS[l]),
                n_limited > lim0);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
