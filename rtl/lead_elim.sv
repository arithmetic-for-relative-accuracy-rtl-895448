// Leading-one eliminator (the "E" blocks).
//
// Clears the bit at index `pos` of `word` when `detect` is high, so that a
// value 2^j + rest becomes its rest term. pos and detect come from the
// lod_tree that looks at the same word. Each output bit is the input bit
// AND NOT (detect AND pos == its index): one decoder and a row of gates.
// Purely combinational.
//
// Eliminating the leading one found by D follows the document; the
// decode-and-gate form is this design's choice.
module lead_elim #(
  parameter int WIDTH = 32,
  parameter int POSW  = $clog2(WIDTH)
) (
  input  logic [WIDTH-1:0] word,
  input  logic             detect,
  input  logic [POSW-1:0]  pos,
  output logic [WIDTH-1:0] rest
);

  always_comb begin
    for (int i = 0; i < WIDTH; i++) begin
      rest[i] = word[i] & ~(detect && (pos == POSW'(i)));
    end
  end

endmodule
