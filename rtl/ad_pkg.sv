// Shared definitions of the accuracy-driven (AD) arithmetic module.
//
// The AD module takes one operation at a time on its two 32-bit data ports
// and two segment (exponent) ports. ad_op_e lists the operations it knows:
// the integer operations on the A and B ports, the operations in which the
// segment registers are loaded from outside (float-to-fix addition, log,
// normalisation, antilog) and the arithmetic on the segment registers
// themselves. fop_e lists the operations of the floating-point unit that
// pairs two AD modules. The sets of operations follow the module
// description; the encodings are this design's own choice.
package ad_pkg;

  typedef enum logic [3:0] {
    OP_ADD     = 4'd0,   // R = A + B
    OP_SUB     = 4'd1,   // R = A - B (two's complement in R)
    OP_MUL     = 4'd2,   // R = A * B, accuracy-driven iterations
    OP_MAC     = 4'd3,   // R = inC + A * B
    OP_DIV     = 4'd4,   // R = A / B, remainder on the remainder port
    OP_FADD    = 4'd5,   // R = (A << expA) + (B << expB)
    OP_FSUB    = 4'd6,   // R = (A << expA) - (B << expB)
    OP_NORM    = 4'd7,   // R = A shifted so its leading one is bit DW-1
    OP_LOG     = 4'd8,   // R = {characteristic, segment fraction}
    OP_ANTILOG = 4'd9,   // R = {1, A} << expA (fixed point, DW fraction bits)
    OP_SEGADD  = 4'd10,  // seg_out = expA + expB
    OP_SEGSUB  = 4'd11   // seg_out = expA - expB
  } ad_op_e;

  // Operations of the floating-point unit built from two AD modules.
  typedef enum logic [2:0] {
    FOP_MUL  = 3'd0,   // floating-point multiply
    FOP_ADD  = 3'd1,   // floating-point add
    FOP_SUB  = 3'd2,   // floating-point subtract
    FOP_POW  = 3'd3,   // integer x to the power n, via log and antilog
    FOP_ROOT = 3'd4,   // integer n-th root of x, via log and antilog
    FOP_DIV  = 3'd5    // floating-point divide
  } fop_e;

  // Operations that iterate over the rest terms and accumulate into R.
  function automatic logic is_iterative(ad_op_e op);
    return (op == OP_MUL) || (op == OP_MAC) || (op == OP_DIV);
  endfunction

  // Number of 4-input levels a leading-one tree needs for a word of w bits.
  function automatic int lod_levels(int w);
    int l, span;
    l = 1;
    span = 4;
    while (span < w) begin
      span = span * 4;
      l = l + 1;
    end
    return l;
  endfunction

endpackage
