// End-to-end test of the AD arithmetic module at its default size (32-bit
// ports, 64-bit result). Every operation is run against a reference model
// written here as plain loops over the operand bits. The multiplication and
// division examples worked out by hand (22*14 and 308/14, with their
// partial results after one and two iterations) are checked first, then
// random operations of every kind, with and without accuracy thresholds
// and iteration limits. For each operation the number of clock cycles from
// the start cycle to the done cycle is checked against the pipeline timing:
// n + 4 for n iterations of a multiplication or one single-pass operation,
// 3s + 2 for s division steps (a final correction counts as a step), 2 when
// there is nothing to iterate. Every mechanism
// (multi-iteration product, zero operand, negative remainder, correction,
// accuracy stop, iteration limit, division by zero, overlapped start, each
// operation) must occur at least once. A final stream starts every
// operation as soon as the module is ready, so that operations overlap in
// the pipeline, and checks results, their order and the latencies.
module tb_ad_module;
  import ad_pkg::*;
  import ad_ref_pkg::*;

  logic              clk = 0, rst_n = 0, start = 0;
  ad_op_e            op = OP_ADD;
  logic [31:0]       in_a = 0, in_b = 0;
  logic [4:0]        exp_a = 0, exp_b = 0;
  logic [63:0]       in_c = 0, accuracy = 0;
  logic [5:0]        max_iter = 0;
  logic              busy, ready, done, acc_reached, limited;
  logic [63:0]       result;
  logic signed [6:0] seg_out;
  logic [31:0]       remainder;
  logic [5:0]        iterations;

  int checks = 0, failures = 0;
  int cyc = 0;

  // mechanism counters
  int n_multi_iter = 0, n_zero_operand = 0, n_neg_rem = 0, n_corr = 0;
  int n_acc_stop = 0, n_limit = 0, n_div_zero = 0, n_overlap = 0;
  int n_op[12];

  ad_module dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(ad_op_e o, logic [31:0] a, logic [31:0] b, logic [4:0] ea = 0,
                     logic [4:0] eb = 0, logic [63:0] c = 0, logic [63:0] acc = 0,
                     int lim = 0, bit quiet = 0);
    expect_t e;
    int t0, lat;
    e = model(o, a, b, ea, eb, c, acc, lim);
    n_neg_rem += e.n_neg;
    if (e.corr) n_corr++;
    if (e.divz) n_div_zero++;
    @(negedge clk);
    op = o; in_a = a; in_b = b; exp_a = ea; exp_b = eb; in_c = c;
    accuracy = acc; max_iter = 6'(lim); start = 1;
    @(posedge clk);
    t0 = cyc;
    @(negedge clk);
    start = 0;
    while (!done) @(negedge clk);
    lat = cyc - t0;
    n_op[int'(o)]++;
    if (e.acc) n_acc_stop++;
    if (e.lim) n_limit++;
    if ((o == OP_MUL || o == OP_MAC) && e.iters >= 2) n_multi_iter++;
    if (is_iterative(o) && (a == 0 || b == 0)) n_zero_operand++;
    checks++;
    if (result !== e.r || (o inside {OP_NORM, OP_LOG, OP_SEGADD, OP_SEGSUB} && seg_out !== e.seg)) begin
      failures++;
      $display("FAIL %s a=%0d b=%0d ea=%0d eb=%0d: result=%h want %h seg=%0d want %0d",
               o.name(), a, b, ea, eb, result, e.r, seg_out, e.seg);
    end
    checks++;
    if (int'(iterations) != e.iters || acc_reached !== e.acc || limited !== e.lim) begin
      failures++;
      $display("FAIL %s a=%0d b=%0d: iterations=%0d want %0d acc=%b/%b lim=%b/%b",
               o.name(), a, b, iterations, e.iters, acc_reached, e.acc, limited, e.lim);
    end
    checks++;
    if (lat != e.lat) begin
      failures++;
      $display("FAIL %s a=%0d b=%0d: latency %0d want %0d", o.name(), a, b, lat, e.lat);
    end
    if (e.check_rem) begin
      checks++;
      if (remainder !== e.rem) begin
        failures++;
        $display("FAIL %s a=%0d b=%0d: remainder=%0d want %0d", o.name(), a, b, remainder, e.rem);
      end
    end
    if (!quiet) $display("%-8s a=%0d b=%0d -> result=%0d iterations=%0d latency=%0d",
                         o.name(), a, b, result, iterations, lat);
  endtask

  task automatic expect_value(string what, logic [63:0] got, logic [63:0] want);
    checks++;
    if (got !== want) begin
      failures++;
      $display("FAIL %s: %0d want %0d", what, got, want);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;

    // Hand-worked examples: 22*14 gives 272, 304, 308 after 1, 2, 3
    // iterations; 308/14 gives 32 after one step and 22 after four.
    run(OP_MUL, 22, 14, .lim(1));  expect_value("22*14 one iteration", result, 272);
    run(OP_MUL, 22, 14, .lim(2));  expect_value("22*14 two iterations", result, 304);
    run(OP_MUL, 22, 14);           expect_value("22*14", result, 308);
    expect_value("22*14 iterations", 64'(iterations), 3);
    run(OP_MUL, 1, 32767);         expect_value("1*32767 iterations", 64'(iterations), 1);
    run(OP_DIV, 308, 14, .lim(1)); expect_value("308/14 one step", result, 32);
    run(OP_DIV, 308, 14);          expect_value("308/14", result, 22);
    expect_value("308/14 steps", 64'(iterations), 4);
    run(OP_DIV, 20, 28);
    run(OP_DIV, 100, 0);
    run(OP_MUL, 0, 77);
    run(OP_MUL, 32767, 32767, .acc(64'd1 << 20));
    run(OP_MAC, 1000, 1000, .c(64'd5));
    run(OP_ADD, 32'hFFFF_FFFF, 32'hFFFF_FFFF);
    run(OP_SUB, 5, 9);
    run(OP_FADD, 3, 5, 4, 2);
    run(OP_FSUB, 3, 5, 4, 2);
    run(OP_NORM, 32'h0000_0123, 0);
    run(OP_LOG, 32'd1000, 0);
    run(OP_ANTILOG, 32'h8000_0000, 0, 10);
    run(OP_SEGADD, 0, 0, 17, 30);
    run(OP_SEGSUB, 0, 0, 3, 29);

    // Random operations of every kind.
    for (int n = 0; n < 1500; n++) begin
      ad_op_e o;
      logic [31:0] a, b;
      logic [63:0] acc;
      int lim;
      o   = ad_op_e'($urandom % 12);
      a   = $urandom >> ($urandom % 32);
      b   = $urandom >> ($urandom % 32);
      acc = ($urandom % 4 == 0) ? (64'(1) << ($urandom % 40)) : 64'd0;
      lim = ($urandom % 4 == 0) ? int'($urandom % 8) : 0;
      run(o, a, b, 5'($urandom), 5'($urandom), {$urandom, $urandom}, acc, lim, 1);
    end

    // Back-to-back stream: each operation starts in the first cycle the
    // module is ready, usually while the previous one still drains. Results
    // come back in order and must match the model; an operation that issues
    // anything keeps its own latency, one that issues nothing may wait up
    // to three cycles for the older one to leave the pipeline.
    begin
      expect_t     q_e[$];
      int          q_t0[$];
      ad_op_e      q_o[$];
      int          n_stream;
      n_stream = 800;
      fork
        begin : driver
          for (int n = 0; n < n_stream; n++) begin
            ad_op_e o;
            logic [31:0] a, b, c0;
            logic [4:0]  ea, eb;
            logic [63:0] acc;
            int lim;
            o   = ad_op_e'($urandom % 12);
            if ($urandom % 2 == 0) o = OP_MUL;
            a   = $urandom >> ($urandom % 32);
            b   = $urandom >> ($urandom % 32);
            if ($urandom % 8 == 0) a = 0;
            ea  = 5'($urandom);
            eb  = 5'($urandom);
            c0  = $urandom;
            acc = ($urandom % 4 == 0) ? (64'(1) << ($urandom % 40)) : 64'd0;
            lim = ($urandom % 4 == 0) ? int'($urandom % 8) : 0;
            @(negedge clk);
            while (!ready) @(negedge clk);
            if (busy) n_overlap++;
            op = o; in_a = a; in_b = b; exp_a = ea; exp_b = eb; in_c = 64'(c0);
            accuracy = acc; max_iter = 6'(lim); start = 1;
            q_e.push_back(model(o, a, b, ea, eb, 64'(c0), acc, lim));
            q_o.push_back(o);
            @(posedge clk);
            q_t0.push_back(cyc);
            @(negedge clk);
            start = 0;
          end
        end
        begin : collector
          for (int n = 0; n < n_stream; n++) begin
            expect_t e;
            ad_op_e  o;
            int      lat;
            @(negedge clk);
            while (!done) @(negedge clk);
            e   = q_e.pop_front();
            o   = q_o.pop_front();
            lat = cyc - q_t0.pop_front();
            checks++;
            if (result !== e.r || iterations != 6'(e.iters) || acc_reached !== e.acc ||
                limited !== e.lim ||
                (o inside {OP_NORM, OP_LOG, OP_SEGADD, OP_SEGSUB} && seg_out !== e.seg) ||
                (e.check_rem && remainder !== e.rem)) begin
              failures++;
              $display("FAIL stream %s: result=%h want %h iterations=%0d want %0d",
                       o.name(), result, e.r, iterations, e.iters);
            end
            checks++;
            if (e.lat == 2 ? (lat < 2 || lat > 5) : (lat != e.lat)) begin
              failures++;
              $display("FAIL stream %s: latency %0d want %0d", o.name(), lat, e.lat);
            end
          end
        end
      join
      $display("stream of %0d operations, %0d started while the previous one drained",
               n_stream, n_overlap);
    end

    // Every mechanism must have occurred.
    begin
      int mech[string];
      mech["multi-iteration product"] = n_multi_iter;
      mech["zero operand"]            = n_zero_operand;
      mech["negative remainder"]      = n_neg_rem;
      mech["division correction"]     = n_corr;
      mech["accuracy stop"]           = n_acc_stop;
      mech["iteration limit"]         = n_limit;
      mech["division by zero"]        = n_div_zero;
      mech["overlapped start"]        = n_overlap;
      foreach (mech[k]) begin
        $display("mechanism %-24s %0d", k, mech[k]);
        checks++;
        if (mech[k] == 0) begin failures++; $display("FAIL mechanism never seen: %s", k); end
      end
      for (int i = 0; i < 12; i++) begin
        checks++;
        if (n_op[i] == 0) begin failures++; $display("FAIL operation %0d never run", i); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
