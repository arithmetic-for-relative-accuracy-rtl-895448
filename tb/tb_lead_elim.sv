// Leading-one elimination: the eliminator is fed with the position computed
// here by a loop; the rest must equal the word minus its highest power of
// two, and a zero word must stay zero.
//
// The eliminator is combinational: the bench sets word and position, waits
// 1 time unit and compares. Clearing the detected leading one follows the
// document; the one-gate-per-bit decode is this design's choice.
module tb_lead_elim;
  logic [31:0] word, rest;
  logic        detect;
  logic [4:0]  pos;
  int checks = 0, failures = 0;

  lead_elim #(.WIDTH(32)) dut (.word(word), .detect(detect), .pos(pos), .rest(rest));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 600; n++) begin
      logic [31:0] v, top;
      v = (n == 0) ? 32'd0 : ($urandom >> ($urandom % 32));
      top = 0;
      pos = 0;
      for (int i = 0; i < 32; i++) if (v[i]) begin top = 32'(1) << i; pos = 5'(i); end
      word   = v;
      detect = (v != 0);
      #1;
      checks++;
      if (rest !== v - top) begin
        failures++;
        $display("FAIL word=%h rest=%h want %h", v, rest, v - top);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
