// Elementary leading-one detector for one nibble.
//
// detect is high when any of the four inputs is high. {bx, ax} then encodes,
// as a 2-bit binary number, the index of the highest input that is high:
// bit3 -> 11, bit2 -> 10, bit1 -> 01, bit0 -> 00. The gate structure is the
// document's elementary cell: bx is the OR of bit2 and bit3, ax is the OR of
// bit3 and (bit1 AND NOT bx), detect is the OR of all four bits. The same
// cell encodes a nibble of data bits on the lowest tree level and the four
// detect signals of the level below on every higher level. Purely
// combinational.
module lod_nibble (
  input  logic [3:0] bits,
  output logic       detect,
  output logic       ax,
  output logic       bx
);

  always_comb begin
    bx     = bits[2] | bits[3];
    ax     = bits[3] | (bits[1] & ~bx);
    detect = |bits;
  end

endmodule
