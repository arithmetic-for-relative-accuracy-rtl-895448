// Segment-register control: for every operation and random positions and
// segment inputs, the shift amounts, the segment result and the division
// step condition are compared with values worked out here.
//
// The unit is combinational: the bench sets operation, positions and segment
// inputs, waits 1 time unit and compares. The crossed loading of the shift
// amounts for multiplication follows the document; the encodings and the
// division step condition are this design's choices.
module tb_spec_unit;
  import ad_pkg::*;
  ad_op_e            op;
  logic              det_a, det_b, step_ok;
  logic [4:0]        pos_a, pos_b, exp_a, exp_b, sa, sb;
  logic signed [6:0] seg_res;
  int checks = 0, failures = 0;

  spec_unit #(.DW(32)) dut (
    .op(op), .det_a(det_a), .pos_a(pos_a), .det_b(det_b), .pos_b(pos_b),
    .exp_a(exp_a), .exp_b(exp_b), .sa(sa), .sb(sb), .seg_res(seg_res), .step_ok(step_ok)
  );

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 1200; n++) begin
      int wsa, wsb, wseg;
      op    = ad_op_e'(n % 12);
      det_a = ($urandom % 8) != 0;
      det_b = ($urandom % 8) != 0;
      pos_a = det_a ? 5'($urandom) : 5'd0;
      pos_b = det_b ? 5'($urandom) : 5'd0;
      exp_a = 5'($urandom);
      exp_b = 5'($urandom);
      #1;
      wsa = 0; wsb = 0; wseg = 0;
      case (op)
        OP_MUL, OP_MAC: begin wsa = pos_b; wsb = pos_a; end
        OP_DIV: begin
          wsa = (32 + pos_a - pos_b) % 32; wsb = wsa; wseg = int'(pos_a) - int'(pos_b);
        end
        OP_FADD, OP_FSUB, OP_ANTILOG: begin wsa = exp_a; wsb = exp_b; end
        OP_NORM: begin wsa = det_a ? 31 - pos_a : 0; wseg = pos_a; end
        OP_LOG:  begin wsa = det_a ? (32 - pos_a) % 32 : 0; wseg = pos_a; end
        OP_SEGADD: wseg = int'(exp_a) + int'(exp_b);
        OP_SEGSUB: wseg = int'(exp_a) - int'(exp_b);
        default: ;
      endcase
      checks++;
      if (int'(sa) != wsa || int'(sb) != wsb || int'(seg_res) != wseg ||
          step_ok !== (det_a && det_b && pos_a >= pos_b)) begin
        failures++;
        $display("FAIL op=%s pa=%0d pb=%0d ea=%0d eb=%0d: sa=%0d/%0d sb=%0d/%0d seg=%0d/%0d ok=%b",
                 op.name(), pos_a, pos_b, exp_a, exp_b, sa, wsa, sb, wsb, seg_res, wseg, step_ok);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
