// Division sweep workload on the floating-point unit: A*A / A for
// A = 1000 .. 10000 in steps of 0.02 (450,001 values).
//
// Each A is rounded down to the unit's format (16-bit mantissa, so values
// closer than the mantissa step coincide). The unit squares it with FOP_MUL,
// then divides the square by A with FOP_DIV, both without an accuracy
// threshold or iteration limit. The number of mantissa division steps the
// division needed is collected in a histogram, which is printed with its
// mean. The quotient cannot always be exact: the square is truncated to 16
// bits first. Checks: every square and every quotient within 2^-13 relative
// of the exact real value, the division steps reported by the unit between
// 1 and 18 (a 17-bit quotient plus one correction step), and the sum of the
// histogram equal to the number of divisions. The histogram itself is only
// printed: the published curve for this sweep gives no accuracy target, so
// its counts are not compared.
//
// Interface and timing: the bench drives ad_float_unit one operation at a
// time, setting operands on a falling edge, pulsing start for one cycle and
// waiting for done. It never overlaps operations. A run takes about 20 s.
// The operand range, its step and the A*A/A form follow the published
// sweep. The truncation to the unit's format, the 2^-13 tolerance and the
// 18-step bound are this bench's choices.
module tb_ad_div_sweep;
  import ad_pkg::*;

  localparam int MW     = 16;
  localparam int EW     = 8;
  localparam int NSWEEP = 450_001;
  localparam int HMAX   = 24;

  logic              clk = 0, rst_n = 0, start = 0;
  fop_e              fop = FOP_MUL;
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

  int checks = 0, failures = 0;
  int hist[HMAX + 1];

  ad_float_unit dut (
    .clk(clk), .rst_n(rst_n), .start(start), .fop(fop),
    .int_start(1'b0), .int_op(OP_ADD), .int_a('0), .int_b('0), .int_exp_a('0), .int_exp_b('0),
    .int_c('0), .a_sign(a_sign), .a_exp(a_exp), .a_man(a_man),
    .b_sign(b_sign), .b_exp(b_exp), .b_man(b_man), .accuracy('0), .max_iter('0),
    .busy(busy), .done(done), .r_sign(r_sign), .r_exp(r_exp), .r_man(r_man), .exp_ovf(exp_ovf),
    .int_result(int_result), .int_seg(int_seg), .int_remainder(int_remainder),
    .iterations(iterations), .acc_reached(acc_reached), .limited(limited)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (60_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real fval(logic [EW-1:0] e, logic [MW-1:0] m);
    real v;
    int  ei;
    v  = real'(m) / real'(1 << (MW - 1));
    ei = int'(signed'(e));
    v  = v * (2.0 ** ei);
    return v;
  endfunction

  task automatic check(string what, bit ok);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  task automatic op(fop_e o, logic [EW-1:0] ae, logic [MW-1:0] am,
                    logic [EW-1:0] be, logic [MW-1:0] bm);
    @(negedge clk);
    fop = o; a_exp = ae; a_man = am; b_exp = be; b_man = bm; start = 1;
    @(negedge clk);
    start = 0;
    while (!done) @(negedge clk);
  endtask

  initial begin
    real           x, sq, q, rel;
    int            e;
    logic [MW-1:0] m, sm;
    logic [EW-1:0] se;
    int            total;
    real           mean;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < NSWEEP; k++) begin
      x = 1000.0 + 0.02 * k;
      // to the unit's format, truncated: x = m/2^15 * 2^e, 2^15 <= m < 2^16
      e = 9;
      while (x >= 2.0 ** (e + 1)) e++;
      m = MW'($rtoi(x / (2.0 ** e) * 32768.0));
      x = fval(EW'(e), m);
      op(FOP_MUL, EW'(e), m, EW'(e), m);
      sq = fval(r_exp, r_man);
      rel = (sq - x * x) / (x * x);
      check($sformatf("square of %f: %f", x, sq), rel <= 0.0 && rel > -(2.0 ** (3 - MW)));
      sm = r_man;
      se = r_exp;
      op(FOP_DIV, se, sm, EW'(e), m);
      q = fval(r_exp, r_man);
      rel = (q - x) / x;
      check($sformatf("%f / %f: %f", sq, x, q), rel < 2.0 ** (3 - MW) && rel > -(2.0 ** (3 - MW)));
      check($sformatf("division steps %0d", iterations), iterations >= 1 && iterations <= 18);
      hist[(int'(iterations) > HMAX) ? HMAX : int'(iterations)]++;
    end
    total = 0;
    mean = 0.0;
    $display("A*A/A for A = 1000 .. 10000 step 0.02: divisions needing i steps");
    for (int i = 0; i <= HMAX; i++) begin
      total += hist[i];
      mean += real'(i) * real'(hist[i]);
      if (hist[i] != 0) $display("  %2d  %7d", i, hist[i]);
    end
    mean = mean / real'(total);
    $display("  mean %.2f", mean);
    check("histogram holds every division", total == NSWEEP);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
