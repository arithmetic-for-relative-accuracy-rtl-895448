// Tree leading-one detector and position encoder (the "D" blocks).
//
// Finds the highest bit of `word` that is one and returns its index on `pos`;
// `detect` says whether there was any one at all (pos is 0 otherwise). The
// word is padded with zeros to a power of four and cut into nibbles. Each
// level of the tree is a row of lod_nibble cells: on the lowest level they
// look at the data bits, on each next level at the detect outputs of the
// four cells below, and every level adds two bits to the top of the
// position code. lod_merge carries the lower code bits of the winning group
// upwards. A 32-bit word needs three levels, so the path is logarithmic in
// the word width instead of rippling through every bit. Purely
// combinational.
//
// The tree of nibble cells with selector merging follows the document; the
// padding to a power of four and the parameterised width are this design's
// choices.
module lod_tree #(
  parameter int WIDTH = 32,
  parameter int POSW  = $clog2(WIDTH)
) (
  input  logic [WIDTH-1:0] word,
  output logic             detect,
  output logic [POSW-1:0]  pos
);

  localparam int L     = ad_pkg::lod_levels(WIDTH);   // tree levels
  localparam int NPAD  = 4 ** L;                       // padded width
  localparam int NLEAF = 4 ** (L - 1);                 // cells on level 0
  localparam int CW    = 2 * L;                        // full code width

  logic [NPAD-1:0] padded;
  logic [L-1:0][NLEAF-1:0]         det;
  logic [L-1:0][NLEAF-1:0][CW-1:0] code;

  assign padded = NPAD'(word);

  for (genvar l = 0; l < L; l++) begin : g_level
    localparam int NODES = 4 ** (L - 1 - l);
    for (genvar i = 0; i < NODES; i++) begin : g_node
      logic [3:0] in_bits;
      logic       ax, bx;
      if (l == 0) begin : g_leaf
        assign in_bits = padded[4*i +: 4];
      end else begin : g_inner
        assign in_bits = det[l-1][4*i +: 4];
      end
      lod_nibble u_cell (.bits(in_bits), .detect(det[l][i]), .ax(ax), .bx(bx));
      if (l == 0) begin : g_code0
        assign code[l][i] = CW'({bx, ax});
      end else begin : g_coden
        logic [3:0][2*l-1:0] sub_code;
        logic [2*l-1:0]      low_bits;
        for (genvar k = 0; k < 4; k++) begin : g_sub
          assign sub_code[k] = code[l-1][4*i+k][2*l-1:0];
        end
        lod_merge #(.W(2*l)) u_merge (
          .det (det[l-1][4*i +: 4]),
          .code(sub_code),
          .sel (low_bits)
        );
        assign code[l][i] = CW'({bx, ax, low_bits});
      end
    end
    // Unused upper entries of the shared level arrays.
    if (NODES < NLEAF) begin : g_pad
      assign det[l][NLEAF-1:NODES]  = '0;
      assign code[l][NLEAF-1:NODES] = '0;
    end
  end

  assign detect = det[L-1][0];
  assign pos    = POSW'(code[L-1][0]);

endmodule
