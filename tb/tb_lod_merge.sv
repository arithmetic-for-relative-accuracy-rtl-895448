// Random test of the code selector: the output must be the code of the
// highest group whose detect is set (group 0 when none is).
//
// The selector is combinational: the bench sets the four detect signals and
// codes, waits 1 time unit and compares. The selector tree driven by the
// detect signals follows the document; returning group 0 when nothing is
// detected is this design's choice (the code is then marked invalid by the
// detect output of the tree).
module tb_lod_merge;
  localparam int W = 4;
  logic [3:0]        det;
  logic [3:0][W-1:0] code;
  logic [W-1:0]      sel;
  int checks = 0, failures = 0;

  lod_merge #(.W(W)) dut (.det(det), .code(code), .sel(sel));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 400; n++) begin
      logic [W-1:0] want;
      det  = 4'($urandom);
      code = 16'($urandom);
      #1;
      want = code[0];
      for (int g = 0; g < 4; g++) if (det[g]) want = code[g];
      checks++;
      if (sel !== want) begin
        failures++;
        $display("FAIL det=%b code=%h sel=%h want=%h", det, code, sel, want);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
