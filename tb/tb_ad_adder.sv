// Adder/subtractor: random 64-bit sums and differences and the borrow flag,
// against 65-bit arithmetic done here.
//
// The adder is combinational: the bench sets the operands and the
// subtract control, waits 1 time unit and compares the sum and neg. An
// adder/subtractor of the module's result width follows the document; the
// borrow flag neg is this design's choice.
module tb_ad_adder;
  logic [63:0] a, b, s;
  logic        sub, neg;
  int checks = 0, failures = 0;

  ad_adder #(.WIDTH(64)) dut (.a(a), .b(b), .sub(sub), .s(s), .neg(neg));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 500; n++) begin
      logic [64:0] want;
      a   = {$urandom, $urandom} >> ($urandom % 64);
      b   = {$urandom, $urandom} >> ($urandom % 64);
      sub = n[0];
      #1;
      want = sub ? ({1'b0, a} - {1'b0, b}) : ({1'b0, a} + {1'b0, b});
      checks++;
      if (s !== want[63:0] || neg !== (sub && a < b)) begin
        failures++;
        $display("FAIL a=%h b=%h sub=%b s=%h neg=%b", a, b, sub, s, neg);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
