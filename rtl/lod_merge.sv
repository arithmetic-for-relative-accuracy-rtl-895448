// Selection of the lower position bits in the leading-one tree.
//
// A tree level combines four groups of the level below. Each group brings a
// detect signal and the position code it found inside itself. This block
// passes on the code of the highest group that detected a one, built as the
// document's tree of 2-to-1 selectors: det[1] chooses between groups 1 and 0,
// det[3] between groups 3 and 2, and (det[2] | det[3]) between the two pairs.
// The document draws one such tree per code bit (a and b); here W code bits
// share the same selection. Purely combinational.
// det[0] is an input only for symmetry with the four codes: when groups 3 to
// 1 detect nothing, code[0] is passed on whether group 0 detected or not
// (the parent's detect output tells the two cases apart), so lint reports
// det[0] as unused.
module lod_merge #(
  parameter int W = 2   // position code bits per group
) (
  input  logic [3:0]        det,
  input  logic [3:0][W-1:0] code,
  output logic [W-1:0]      sel
);

  logic [W-1:0] low_pair, high_pair;

  always_comb begin
    low_pair  = det[1] ? code[1] : code[0];
    high_pair = det[3] ? code[3] : code[2];
    sel       = (det[2] | det[3]) ? high_pair : low_pair;
  end

endmodule
