// Barrel shifter at the module's size (64 bits, 5-bit shift): every shift
// amount with random data, against the shift operator.
//
// The shifter is combinational: the bench sets data and shift amount, waits
// 1 time unit and compares the output. A barrel shifter for the MA/MB
// registers follows the document; shifting in a single step is this design's
// choice.
module tb_barrel_shifter;
  logic [63:0] din, dout;
  logic [4:0]  sh;
  int checks = 0, failures = 0;

  barrel_shifter #(.WIDTH(64), .SHW(5)) dut (.din(din), .sh(sh), .dout(dout));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 320; n++) begin
      logic [63:0] want;
      din = {$urandom, $urandom};
      sh  = 5'(n);
      #1;
      want = din;
      for (int k = 0; k < n % 32; k++) want = {want[62:0], 1'b0};
      checks++;
      if (dout !== want) begin
        failures++;
        $display("FAIL din=%h sh=%0d dout=%h want=%h", din, sh, dout, want);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
