// Logarithmic barrel shifter (the "BARREL" blocks).
//
// Shifts `din` left by `sh` places, zeros entering at the bottom. It is a
// cascade of SHW steps; step s shifts by 2^s when bit s of sh is set. With
// the default 5-bit segment register this is the five shift steps that the
// 32-bit module performs on its 64-bit MA/MB paths. Purely combinational:
// the surrounding module registers the result.
//
// Barrel shifters on the MA/MB paths follow the document; the logarithmic
// cascade and finishing the shift within one cycle are this design's
// choices.
module barrel_shifter #(
  parameter int WIDTH = 64,
  parameter int SHW   = 5
) (
  input  logic [WIDTH-1:0] din,
  input  logic [SHW-1:0]   sh,
  output logic [WIDTH-1:0] dout
);

  logic [SHW:0][WIDTH-1:0] stage;

  assign stage[0] = din;
  for (genvar s = 0; s < SHW; s++) begin : g_step
    assign stage[s+1] = sh[s] ? (stage[s] << (2 ** s)) : stage[s];
  end
  assign dout = stage[SHW];

endmodule
