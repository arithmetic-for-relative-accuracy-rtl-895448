// Adder/subtractor (the "ADDER" blocks).
//
// s = a + b when sub is low, s = a - b when it is high, both modulo 2^WIDTH.
// neg is high when a subtraction borrowed, i.e. a < b as unsigned numbers.
// Written as a single carry-in adder on b or its complement; the adder
// architecture is left to synthesis. Purely combinational.
//
// The block and its place in the datapath follow the document; the borrow
// flag and the carry-in form are this design's choices.
module ad_adder #(
  parameter int WIDTH = 64
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             sub,
  output logic [WIDTH-1:0] s,
  output logic             neg
);

  logic [WIDTH:0] full;

  always_comb begin
    full = {1'b0, a} + {1'b0, (sub ? ~b : b)} + (WIDTH+1)'(sub);
    s    = full[WIDTH-1:0];
    neg  = sub & ~full[WIDTH];
  end

endmodule
