// Accuracy guard (the "COMPARE" block).
//
// In AD arithmetic every iteration adds a contribution that is smaller than
// the one before. The guard watches the magnitude of each contribution on
// its way to the result register and raises `reached` when it has fallen
// below the requested `accuracy` (an absolute threshold in units of the
// result's least significant bit). An accuracy of zero never triggers, so
// the operation then runs until its rest terms are exhausted. Purely
// combinational.
//
// Stopping once a contribution falls below the required accuracy follows
// the document; the absolute threshold and "zero means never" are this
// design's choices.
module ad_compare #(
  parameter int WIDTH = 64
) (
  input  logic [WIDTH-1:0] contribution,
  input  logic [WIDTH-1:0] accuracy,
  output logic             reached
);

  assign reached = (accuracy != '0) && (contribution < accuracy);

endmodule
