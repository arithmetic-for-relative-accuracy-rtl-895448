// Leading-one tree at 32 bits (the module's width) and at 64 bits: every
// single-bit word, every word of the form 2^j + random lower bits, zero,
// and random words, against a loop that scans for the highest set bit.
//
// The tree is combinational: the bench sets the word, waits 1 time unit and
// compares position and detect. The 4-input cell tree follows the document;
// padding to a power of four and the 64-bit instance are this design's
// choices.
module tb_lod_tree;
  logic [31:0] w32;
  logic [63:0] w64;
  logic        d32, d64;
  logic [4:0]  p32;
  logic [5:0]  p64;
  int checks = 0, failures = 0;

  lod_tree #(.WIDTH(32)) dut32 (.word(w32), .detect(d32), .pos(p32));
  lod_tree #(.WIDTH(64)) dut64 (.word(w64), .detect(d64), .pos(p64));

  function automatic int highest(logic [63:0] v);
    int h = -1;
    for (int i = 0; i < 64; i++) if (v[i]) h = i;
    return h;
  endfunction

  task automatic check(logic [63:0] v);
    int h32, h64;
    w32 = v[31:0];
    w64 = v;
    #1;
    h32 = highest({32'b0, v[31:0]});
    h64 = highest(v);
    checks++;
    if (d32 !== (h32 >= 0) || (h32 >= 0 && p32 !== 5'(h32))) begin
      failures++;
      $display("FAIL 32-bit word=%h detect=%b pos=%0d want %0d", v[31:0], d32, p32, h32);
    end
    checks++;
    if (d64 !== (h64 >= 0) || (h64 >= 0 && p64 !== 6'(h64))) begin
      failures++;
      $display("FAIL 64-bit word=%h detect=%b pos=%0d want %0d", v, d64, p64, h64);
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check('0);
    for (int j = 0; j < 64; j++) begin
      check(64'(1) << j);
      check((64'(1) << j) | ({$urandom, $urandom} & ((64'(1) << j) - 1)));
    end
    for (int n = 0; n < 500; n++) check({$urandom, $urandom} >> ($urandom % 64));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
