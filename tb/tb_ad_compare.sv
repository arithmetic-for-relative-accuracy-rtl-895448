// Accuracy guard: below, equal to and above the threshold (random and
// directed), and a zero threshold that must never trigger.
//
// The guard is combinational: the bench sets the contribution and the
// threshold, waits 1 time unit and checks reached. Stopping when a
// contribution falls below the required accuracy follows the document; the
// absolute threshold and "zero means never" are this design's choices.
module tb_ad_compare;
  logic [63:0] contribution, accuracy;
  logic        reached;
  int checks = 0, failures = 0;

  ad_compare #(.WIDTH(64)) dut (.contribution(contribution), .accuracy(accuracy), .reached(reached));

  task automatic check(logic [63:0] c, logic [63:0] acc, logic want);
    contribution = c;
    accuracy     = acc;
    #1;
    checks++;
    if (reached !== want) begin
      failures++;
      $display("FAIL c=%0d acc=%0d reached=%b", c, acc, reached);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check(0, 0, 0);
    check(5, 0, 0);
    check(4, 5, 1);
    check(5, 5, 0);
    check(6, 5, 0);
    for (int n = 0; n < 300; n++) begin
      logic [63:0] c, acc;
      c   = {$urandom, $urandom} >> ($urandom % 64);
      acc = {$urandom, $urandom} >> ($urandom % 64);
      check(c, acc, (acc != 0) && (c < acc));
      check(acc, acc, 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
