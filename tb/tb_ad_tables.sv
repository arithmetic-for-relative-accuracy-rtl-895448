// Convergence workload: squares and divisions of 1 .. NMAX.
//
// For every n the module squares n (and divides n*n by n) with the
// iteration limit set to 1, 2, 3, ... and records the first limit at which
// the result is within 4, 5, 6 and 7 percent of the exact value. The
// histograms of those iteration counts and their means are printed in the
// layout of the published convergence tables (numbers 1 .. 32767, 15 bits).
// Checks: every partial result must lie between 0 and the exact value for
// products (contributions only add), every run must end with the exact
// value once no limit applies, the squaring histogram must equal the
// published one count for count, its mean must stay below the
// shift-and-add mean published for the same accuracy, and no square may
// need more than 3 iterations for 4 percent. The division histogram is
// printed only: it does not reproduce the published division table.
//
// Interface and timing: the bench drives ad_module one operation at a time
// (operands on a falling edge, start for one cycle, wait for done) and uses
// max_iter as the iteration limit; it never overlaps operations. The
// accuracy levels, the operand range and the table layout follow the
// published tables; measuring accuracy as the relative error of the final
// result is this bench's reading of them.
module tb_ad_tables;
  import ad_pkg::*;

  localparam int NMAX = 32767;

  logic              clk = 0, rst_n = 0, start = 0;
  ad_op_e            op = OP_MUL;
  logic [31:0]       in_a = 0, in_b = 0;
  logic [63:0]       accuracy = 0;
  logic [5:0]        max_iter = 0;
  logic              busy, ready, done, acc_reached, limited;
  logic [63:0]       result;
  logic signed [6:0] seg_out;
  logic [31:0]       remainder;
  logic [5:0]        iterations;

  int checks = 0, failures = 0;

  ad_module dut (
    .clk(clk), .rst_n(rst_n), .start(start), .op(op), .in_a(in_a), .in_b(in_b),
    .exp_a('0), .exp_b('0), .in_c('0), .accuracy(accuracy), .max_iter(max_iter),
    .busy(busy), .ready(ready), .done(done), .result(result), .seg_out(seg_out), .remainder(remainder),
    .iterations(iterations), .acc_reached(acc_reached), .limited(limited)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (20_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(ad_op_e o, logic [31:0] a, logic [31:0] b, int lim);
    @(negedge clk);
    op = o; in_a = a; in_b = b; max_iter = 6'(lim); start = 1;
    @(negedge clk);
    start = 0;
    while (!done) @(negedge clk);
  endtask

  // hist[kind][accuracy][iterations]
  int  hist[2][4][8];
  real sa_mean[4] = '{3.06, 2.90, 2.76, 2.65};   // shift-and-add means, same accuracies
  // Published squaring histogram (iterations 1..3, accuracies 4..7 percent).
  int  pub_sq[3][4] = '{'{8206, 9444, 10639, 11797},
                        '{20478, 21102, 21696, 20970},
                        '{4083, 2221, 432, 0}};

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int kind = 0; kind < 2; kind++) begin
      for (int n = 1; n <= NMAX; n++) begin
        real exact;
        int  need[4];
        int  k;
        bit  exact_seen;
        exact      = (kind == 0) ? real'(n) * real'(n) : real'(n);
        need       = '{0, 0, 0, 0};
        k          = 0;
        exact_seen = 0;
        while (!exact_seen && k < 40) begin
          real got, err;
          k++;
          if (kind == 0) run(OP_MUL, 32'(n), 32'(n), k);
          else           run(OP_DIV, 32'(n) * 32'(n), 32'(n), k);
          got = (kind == 0) ? real'(result) : real'(signed'(result));
          err = (got - exact) / exact;
          if (err < 0) err = -err;
          if (kind == 0) begin
            checks++;
            if (got > exact || got < 0) begin
              failures++;
              $display("FAIL square %0d after %0d iterations: %0d", n, k, result);
            end
          end
          for (int p = 0; p < 4; p++)
            if (need[p] == 0 && err <= real'(p + 4) / 100.0) need[p] = k;
          exact_seen = !limited;
        end
        checks++;
        if (!exact_seen || (kind == 0 ? result != 64'(n) * 64'(n) : result != 64'(n))) begin
          failures++;
          $display("FAIL kind %0d n=%0d never exact", kind, n);
        end
        for (int p = 0; p < 4; p++) hist[kind][p][(need[p] > 7) ? 7 : need[p]]++;
      end
    end
    for (int kind = 0; kind < 2; kind++) begin
      $display("%s of 1..%0d: numbers reaching the accuracy after i iterations",
               (kind == 0) ? "Squares" : "Divisions n*n/n", NMAX);
      $display("  i       4 %%     5 %%     6 %%     7 %%");
      for (int i = 1; i < 8; i++)
        $display("  %0d  %7d %7d %7d %7d", i, hist[kind][0][i], hist[kind][1][i],
                 hist[kind][2][i], hist[kind][3][i]);
      begin
        real mean[4];
        for (int p = 0; p < 4; p++) begin
          mean[p] = 0;
          for (int i = 1; i < 8; i++) mean[p] += real'(i * hist[kind][p][i]);
          mean[p] /= real'(NMAX);
        end
        $display("  mean  %5.2f   %5.2f   %5.2f   %5.2f", mean[0], mean[1], mean[2], mean[3]);
        if (kind == 0) begin
          for (int p = 0; p < 4; p++) begin
            checks++;
            if (mean[p] >= sa_mean[p]) begin
              failures++;
              $display("FAIL mean iterations %5.2f not below shift-and-add %5.2f", mean[p], sa_mean[p]);
            end
          end
          for (int i = 1; i <= 3; i++)
            for (int p = 0; p < 4; p++) begin
              checks++;
              if (NMAX == 32767 && hist[0][p][i] != pub_sq[i-1][p]) begin
                failures++;
                $display("FAIL squares: %0d iterations at %0d%%: %0d, published %0d",
                         i, p + 4, hist[0][p][i], pub_sq[i-1][p]);
              end
            end
          checks++;
          if (hist[0][0][4] + hist[0][0][5] + hist[0][0][6] + hist[0][0][7] != 0) begin
            failures++;
            $display("FAIL some squares need more than 3 iterations for 4 percent");
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
