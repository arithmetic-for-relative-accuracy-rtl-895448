// Exhaustive test of the nibble leading-one cell: all 16 inputs, compared
// with the index of the highest set bit found by a loop.
//
// The cell is combinational: the bench sets the 4 bits, waits 1 time unit and
// compares the code and the detect output. The cell's equations follow the
// document.
module tb_lod_nibble;
  logic [3:0] bits;
  logic detect, ax, bx;
  int checks = 0, failures = 0;

  lod_nibble dut (.bits(bits), .detect(detect), .ax(ax), .bx(bx));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      int hi;
      bits = 4'(v);
      #1;
      hi = 0;
      for (int i = 0; i < 4; i++) if (v[i]) hi = i;
      checks++;
      if (detect !== (v != 0)) begin
        failures++;
        $display("FAIL detect bits=%b", bits);
      end
      if (v != 0) begin
        checks++;
        if ({bx, ax} !== 2'(hi)) begin
          failures++;
          $display("FAIL code bits=%b got %b%b want %0d", bits, bx, ax, hi);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
