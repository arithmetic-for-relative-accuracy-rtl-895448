// Segment-register control (the "SPEC" block between the two halves).
//
// Chooses what the two segment registers SA and SB (the shift amounts of the
// left and right barrel shifters) are loaded with, and does the arithmetic on
// segment values. Inputs are the leading-one positions found in the A and B
// registers and the external segment ports expA/expB:
//   MUL/MAC       SA = pos(B), SB = pos(A): the positions cross over, so the
//                 rest of A is shifted by B's characteristic and B by A's.
//   DIV           SA = SB = pos(A) - pos(B), the alignment of divisor to
//                 remainder; step_ok says whether pos(A) >= pos(B).
//   FADD/FSUB,    SA = expA, SB = expB (segment registers loaded directly).
//   ANTILOG
//   NORM          SA = DW-1 - pos(A): moves the leading one to the top.
//   LOG           SA = DW - pos(A): moves the rest term under the binary
//                 point of a DW-bit fraction.
//   SEGADD/SEGSUB seg_res = expA +/- expB.
// seg_res also returns pos(A) for NORM and LOG and the alignment for DIV.
// The block's name and place are the document's; what it computes for each
// operation is this design's reading of the operation list. Combinational.
module spec_unit
  import ad_pkg::*;
#(
  parameter int DW  = 32,
  parameter int SW  = $clog2(DW),
  parameter int SGW = SW + 2
) (
  input  ad_op_e                op,
  input  logic                  det_a,
  input  logic [SW-1:0]         pos_a,
  input  logic                  det_b,
  input  logic [SW-1:0]         pos_b,
  input  logic [SW-1:0]         exp_a,
  input  logic [SW-1:0]         exp_b,
  output logic [SW-1:0]         sa,
  output logic [SW-1:0]         sb,
  output logic signed [SGW-1:0] seg_res,
  output logic                  step_ok
);

  logic signed [SGW-1:0] pa_s, pb_s, ea_s, eb_s;

  always_comb begin
    pa_s    = SGW'(pos_a);
    pb_s    = SGW'(pos_b);
    ea_s    = SGW'(exp_a);
    eb_s    = SGW'(exp_b);
    sa      = '0;
    sb      = '0;
    seg_res = '0;
    step_ok = det_a && det_b && (pos_a >= pos_b);
    unique case (op)
      OP_MUL, OP_MAC: begin
        sa = pos_b;
        sb = pos_a;
      end
      OP_DIV: begin
        sa      = pos_a - pos_b;
        sb      = pos_a - pos_b;
        seg_res = pa_s - pb_s;
      end
      OP_FADD, OP_FSUB, OP_ANTILOG: begin
        sa = exp_a;
        sb = exp_b;
      end
      OP_NORM: begin
        sa      = det_a ? SW'(DW - 1 - int'(pos_a)) : '0;
        seg_res = pa_s;
      end
      OP_LOG: begin
        sa      = det_a ? SW'(DW - int'(pos_a)) : '0;
        seg_res = pa_s;
      end
      OP_SEGADD: seg_res = ea_s + eb_s;
      OP_SEGSUB: seg_res = ea_s - eb_s;
      default: ;
    endcase
  end

endmodule
