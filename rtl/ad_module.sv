// Accuracy-driven (AD) arithmetic module.
//
// Main idea: write each operand as 2^j + rest, where j is the position of its
// leading one. Then A*B = 2^j*B + 2^k*restA + restA*restB, and the last term
// is again a product of two smaller numbers. Each iteration therefore needs
// only a leading-one detection, two shifts and an addition, adds a
// contribution that is smaller than the one before, and leaves the rest
// terms for the next iteration. The product is exact once a rest term is
// zero; stopping earlier gives a result whose relative error shrinks with
// every iteration. Division runs the same machinery backwards: it aligns the
// divisor's leading one under the remainder's, adds or subtracts 2^(j-k) to
// the quotient and lets the remainder go negative (a non-restoring scheme).
//
// Datapath (register transfer level, names of the document's drawing):
//   A, B    operand registers (DW bits); they recirculate the rest terms of
//           a multiplication and the remainder of a division.
//   D, E    lod_tree and lead_elim on A and on B.
//   SPEC    spec_unit: loads the segment registers SA/SB.
//   stage 2 SA, SB and the pre-shift operands (the "shift latches").
//   stage 3 MA, MB = barrel-shifted operands (RW = 2*DW bits).
//   stage 4 IR = MA +/- MB, or a shifted operand passed around the adder.
//   stage 5 R  = R + IR for iterating operations, R = IR otherwise.
//   COMPARE ad_compare on each contribution against `accuracy`.
// One multiplication iteration enters the pipeline per clock cycle. A
// division iteration needs its remainder back in A before the next one can
// start, so it issues every third cycle. After a division whose remainder
// ended negative, one correction step (quotient - 1, remainder + divisor)
// makes the integer quotient and remainder exact.
//
// Interface and timing: pulse `start` for one cycle while `ready` is high,
// with `op` and the operands valid in that cycle; they are registered.
// `done` pulses for one cycle when `result`, `seg_out`, `remainder` and
// `iterations` of an operation are final; they stay so until the next done.
// An operation of n iterations takes n + 4 cycles from the start cycle to
// done (single-pass operations count as n = 1); a division of n steps takes
// 3n + 2 cycles; one with nothing to iterate takes 2. An operation stops
// early when a contribution falls below a non-zero `accuracy`
// (acc_reached) or after `max_iter` iterations if that is non-zero
// (limited); its younger iterations in flight are then discarded.
//
// Overlapping instructions: as soon as the running operation has issued its
// last iteration, `ready` rises and the next operation may start while the
// last iterations of the first still travel through stages 2 to 5. Every
// pipeline entry carries a one-bit tag of its operation and its operation
// code, so that the adder, the accuracy guard and the R accumulator treat
// it by its own operation; the first entry of an operation starts R afresh.
// At most two operations are in flight, and results come back in order.
// An overlapped operation keeps its latency, except one that issues nothing
// (a zero operand), which may wait up to three cycles for the older one. A
// division holds A until its last step is back, so it overlaps only with
// the operation after it. `busy` is high while any operation is in flight.
//
// What follows the document: the register set and its widths (32-bit ports,
// 64-bit MA/MB/IR/R), the D/E/SPEC/BARREL/ADDER/COMPARE split, the crossed
// segment loading of a multiplication, the operation list, one
// shift-and-add iteration per clock cycle, zero needing no special case,
// a pipeline with data-valid signals that lets instructions overlap.
// This design's own choices: the pipeline stage boundaries and valid bits,
// the sign handling of division (magnitude plus sign flag) and its final
// correction, the fixed-point formats of LOG and ANTILOG (DW fraction bits),
// inC as the starting value of R for MAC, the absolute accuracy threshold, the
// iteration limit input, and the tagging scheme of the overlap.
// The reset is asynchronous and active low. The assertions at the end use
// rst_n in `disable iff`; lint therefore reports rst_n as used both
// synchronously and asynchronously, which concerns only the assertions.
module ad_module
  import ad_pkg::*;
#(
  parameter int DW  = 32,              // data port width
  parameter int RW  = 2 * DW,          // MA, MB, IR and R width
  parameter int SW  = $clog2(DW),      // segment register width
  parameter int SGW = SW + 2,          // signed segment result width
  parameter int IW  = 6                // iteration counter width
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  start,
  input  ad_op_e                op,
  input  logic [DW-1:0]         in_a,
  input  logic [DW-1:0]         in_b,
  input  logic [SW-1:0]         exp_a,
  input  logic [SW-1:0]         exp_b,
  input  logic [RW-1:0]         in_c,
  input  logic [RW-1:0]         accuracy,
  input  logic [IW-1:0]         max_iter,
  output logic                  busy,
  output logic                  ready,
  output logic                  done,
  output logic [RW-1:0]         result,
  output logic signed [SGW-1:0] seg_out,
  output logic [DW-1:0]         remainder,
  output logic [IW-1:0]         iterations,
  output logic                  acc_reached,
  output logic                  limited
);

  typedef enum logic {S_IDLE, S_RUN} state_e;

  state_e          state;
  ad_op_e          op_r;
  logic [DW-1:0]   a_q, b_q;
  logic            a_neg, corr_done;
  logic [RW-1:0]   acc_q;
  logic [IW-1:0]   max_q, issued, retired;
  logic [SW-1:0]   exp_a_q, exp_b_q;
  logic [RW-1:0]   r_q, c_q;
  logic            g_f;                  // tag of the front operation
  logic            drain;                // an older operation is draining
  logic [RW-1:0]   acc_d, base_d;        // draining operation's copies
  logic [IW-1:0]   retired_d;
  logic            lim_d;
  logic [DW-1:0]   rem_d;
  logic signed [SGW-1:0] seg_f, seg_d;

  // Pipeline registers.
  logic            v2, neg2, corr2, g2, first2;
  ad_op_e          op2, op3, op4;
  logic            g3, first3, g4, first4;
  logic [SW-1:0]   sa2, sb2;
  logic [RW-1:0]   pa2, pb2;
  logic            v3, neg3, corr3;
  logic [RW-1:0]   ma3, mb3;
  logic            v4, neg4, corr4;
  logic [RW-1:0]   irm4;

  // ---------------------------------------------------------------- D and E
  logic            det_a, det_b;
  logic [SW-1:0]   pos_a, pos_b;
  logic [DW-1:0]   rest_a, rest_b;

  lod_tree  #(.WIDTH(DW), .POSW(SW)) u_d_a (.word(a_q), .detect(det_a), .pos(pos_a));
  lod_tree  #(.WIDTH(DW), .POSW(SW)) u_d_b (.word(b_q), .detect(det_b), .pos(pos_b));
  lead_elim #(.WIDTH(DW), .POSW(SW)) u_e_a (.word(a_q), .detect(det_a), .pos(pos_a), .rest(rest_a));
  lead_elim #(.WIDTH(DW), .POSW(SW)) u_e_b (.word(b_q), .detect(det_b), .pos(pos_b), .rest(rest_b));

  // ------------------------------------------------------------------- SPEC
  logic [SW-1:0]         spec_sa, spec_sb;
  logic signed [SGW-1:0] spec_seg;
  logic                  div_step_ok;

  spec_unit #(.DW(DW), .SW(SW), .SGW(SGW)) u_spec (
    .op(op_r), .det_a(det_a), .pos_a(pos_a), .det_b(det_b), .pos_b(pos_b),
    .exp_a(exp_a_q), .exp_b(exp_b_q),
    .sa(spec_sa), .sb(spec_sb), .seg_res(spec_seg), .step_ok(div_step_ok)
  );

  // ---------------------------------------------------------- issue control
  // The front operation is the one that owns A and B and issues iterations.
  // Once it has nothing left to issue it may hand over to a new operation
  // and drain: its remaining entries finish in stages 2 to 5 while the new
  // operation starts issuing behind them. Every pipeline entry carries the
  // tag of its operation; the draining operation keeps its own copies of
  // what the back end needs (accuracy, R preset, counts, remainder).
  logic lim_hit, lim_block, want_step, want_corr, want, div_block;
  logic issue, squash, squash_f, squash_d, fin_f, fin_d, handover, accept;
  logic reached, front2, front3, front4, f_inflight, d_inflight;
  logic [RW-1:0] acc4, base4, base_f;

  always_comb begin
    lim_hit   = (max_q != '0) && (issued == max_q);
    want_step = 1'b0;
    want_corr = 1'b0;
    lim_block = 1'b0;
    unique case (op_r)
      OP_MUL, OP_MAC: begin
        lim_block = lim_hit && (a_q != '0) && (b_q != '0);
        want_step = (a_q != '0) && (b_q != '0) && !lim_hit;
      end
      OP_DIV: begin
        lim_block = lim_hit && div_step_ok;
        want_step = div_step_ok && !lim_hit && !corr_done;
        want_corr = !div_step_ok && a_neg && (a_q != '0) && det_b && !corr_done;
      end
      default:        want_step = (issued == '0);
    endcase
    front2     = v2 && (g2 == g_f);
    front3     = v3 && (g3 == g_f);
    front4     = v4 && (g4 == g_f);
    f_inflight = front2 || front3;
    d_inflight = (v2 && !front2) || (v3 && !front3);
    base_f     = (op_r == OP_MAC) ? c_q : '0;
    acc4       = front4 ? acc_q : acc_d;
    base4      = front4 ? base_f : base_d;
    want       = (state == S_RUN) && (want_step || want_corr);
    div_block  = (op_r == OP_DIV) && f_inflight;
    squash     = v4 && is_iterative(op4) && !corr4 && reached;
    squash_f   = squash && front4;
    squash_d   = squash && !front4;
    issue      = want && !div_block && !squash_f;
    // The front operation ends when nothing of it is left to issue or in
    // flight before stage 5, but only after an older draining operation.
    fin_f      = (state == S_RUN) && !drain && (squash_f || (!want && !f_inflight));
    fin_d      = drain && (squash_d || !d_inflight);
    // A new operation may start while the front one only drains.
    accept     = start && ready;
    handover   = accept && (state == S_RUN) && !fin_f;
  end

  assign ready = (state == S_IDLE) || (!want && !drain && !((op_r == OP_DIV) && f_inflight));

  // ------------------------------------------------------ stage 2 operands
  logic [SW-1:0] nsa, nsb;
  logic [RW-1:0] npa, npb;

  always_comb begin
    nsa = spec_sa;
    nsb = spec_sb;
    npa = RW'(a_q);
    npb = RW'(b_q);
    unique case (op_r)
      OP_MUL, OP_MAC: npa = RW'(rest_a);
      OP_DIV: begin
        npa = RW'(1);
        if (want_corr) begin
          nsa = '0;
          nsb = '0;
        end
      end
      OP_NORM:    npb = '0;
      OP_LOG: begin
        npa = RW'(rest_a);
        npb = det_a ? (RW'(pos_a) << DW) : '0;
        nsb = '0;
      end
      OP_ANTILOG: begin
        npa = RW'({1'b1, a_q});
        npb = '0;
      end
      OP_SEGADD, OP_SEGSUB: begin
        npa = RW'(signed'(spec_seg));
        npb = '0;
        nsa = '0;
        nsb = '0;
      end
      default: ;
    endcase
  end

  // ------------------------------------------------------------- BARRELs
  logic [RW-1:0] ma_shift, mb_shift;

  barrel_shifter #(.WIDTH(RW), .SHW(SW)) u_barrel_a (.din(pa2), .sh(sa2), .dout(ma_shift));
  barrel_shifter #(.WIDTH(RW), .SHW(SW)) u_barrel_b (.din(pb2), .sh(sb2), .dout(mb_shift));

  // ----------------------------------------------------------- IR adder
  logic [RW-1:0] add_x, add_y, add_s;
  logic          add_sub, add_neg;

  always_comb begin
    add_x   = ma3;
    add_y   = mb3;
    add_sub = 1'b0;
    unique case (op3)
      OP_DIV: begin
        add_x   = corr3 ? mb3 : RW'(a_q);
        add_y   = corr3 ? RW'(a_q) : mb3;
        add_sub = 1'b1;
      end
      OP_SUB, OP_FSUB: add_sub = 1'b1;
      default: ;
    endcase
  end

  ad_adder #(.WIDTH(RW)) u_ir_adder (.a(add_x), .b(add_y), .sub(add_sub), .s(add_s), .neg(add_neg));

  logic [RW-1:0] nirm;
  always_comb begin
    unique case (op3)
      OP_DIV, OP_NORM, OP_ANTILOG, OP_SEGADD, OP_SEGSUB: nirm = ma3;
      default:                                           nirm = add_s;
    endcase
  end

  // -------------------------------------------------- COMPARE and R adder
  ad_compare #(.WIDTH(RW)) u_compare (.contribution(irm4), .accuracy(acc4), .reached(reached));

  logic [RW-1:0] r_next;
  logic          r_unused_neg;
  ad_adder #(.WIDTH(RW)) u_r_adder (
    .a(first4 ? base4 : r_q), .b(irm4), .sub(neg4), .s(r_next), .neg(r_unused_neg)
  );

  // --------------------------------------------------------------- registers
  // Kill the entries that a squash makes unnecessary: those of the same
  // operation as the stopping entry.
  logic kill2, kill3;
  assign kill2 = squash && (g2 == g4);
  assign kill3 = squash && (g3 == g4);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= S_IDLE;
      op_r        <= OP_ADD;
      a_q         <= '0;
      b_q         <= '0;
      a_neg       <= 1'b0;
      corr_done   <= 1'b0;
      acc_q       <= '0;
      max_q       <= '0;
      exp_a_q     <= '0;
      exp_b_q     <= '0;
      issued      <= '0;
      retired     <= '0;
      r_q         <= '0;
      c_q         <= '0;
      g_f         <= 1'b0;
      drain       <= 1'b0;
      acc_d       <= '0;
      base_d      <= '0;
      retired_d   <= '0;
      lim_d       <= 1'b0;
      rem_d       <= '0;
      seg_f       <= '0;
      seg_d       <= '0;
      v2          <= 1'b0;
      v3          <= 1'b0;
      v4          <= 1'b0;
      g2          <= 1'b0;
      g3          <= 1'b0;
      g4          <= 1'b0;
      first2      <= 1'b0;
      first3      <= 1'b0;
      first4      <= 1'b0;
      op2         <= OP_ADD;
      op3         <= OP_ADD;
      op4         <= OP_ADD;
      neg2        <= 1'b0;
      neg3        <= 1'b0;
      neg4        <= 1'b0;
      corr2       <= 1'b0;
      corr3       <= 1'b0;
      corr4       <= 1'b0;
      sa2         <= '0;
      sb2         <= '0;
      pa2         <= '0;
      pb2         <= '0;
      ma3         <= '0;
      mb3         <= '0;
      irm4        <= '0;
      result      <= '0;
      seg_out     <= '0;
      remainder   <= '0;
      iterations  <= '0;
      done        <= 1'b0;
      acc_reached <= 1'b0;
      limited     <= 1'b0;
    end else begin
      done <= 1'b0;

      // stage 1 -> 2: issue one iteration of the front operation
      v2 <= issue;
      if (issue) begin
        sa2    <= nsa;
        sb2    <= nsb;
        pa2    <= npa;
        pb2    <= npb;
        g2     <= g_f;
        op2    <= op_r;
        first2 <= (issued == '0) && !want_corr;
        neg2   <= (op_r == OP_DIV) && (a_neg || want_corr);
        corr2  <= want_corr;
        if (want_corr) corr_done <= 1'b1;
        if (!want_corr) issued <= issued + 1'b1;
        if (op_r inside {OP_MUL, OP_MAC}) begin
          a_q <= rest_a;
          b_q <= rest_b;
        end
        if (op_r inside {OP_NORM, OP_LOG, OP_SEGADD, OP_SEGSUB}) seg_f <= spec_seg;
      end
      // stage 2 -> 3: barrel shift
      v3 <= v2 && !kill2;
      if (v2) begin
        ma3    <= ma_shift;
        mb3    <= mb_shift;
        g3     <= g2;
        op3    <= op2;
        first3 <= first2;
        neg3   <= neg2;
        corr3  <= corr2;
      end
      // stage 3 -> 4: IR, and the new remainder of a division step
      v4 <= v3 && !kill3;
      if (v3 && !kill3) begin
        irm4   <= nirm;
        g4     <= g3;
        op4    <= op3;
        first4 <= first3;
        neg4   <= neg3;
        corr4  <= corr3;
        if (op3 == OP_DIV) begin
          if (corr3) begin
            a_q   <= add_s[DW-1:0];
            a_neg <= 1'b0;
          end else if (add_neg) begin
            a_q   <= DW'(-add_s);
            a_neg <= ~a_neg;
          end else begin
            a_q   <= add_s[DW-1:0];
          end
        end
      end
      // stage 4 -> 5: accumulate into R
      if (v4) begin
        r_q <= r_next;
        if (!corr4) begin
          if (front4) retired   <= retired + 1'b1;
          else        retired_d <= retired_d + 1'b1;
        end
      end

      // results of the operation that ends in this cycle
      if (fin_d) begin
        drain       <= 1'b0;
        done        <= 1'b1;
        result      <= (v4 && !front4) ? r_next : (retired_d != '0) ? r_q : base_d;
        iterations  <= retired_d + IW'(v4 && !front4 && !corr4);
        remainder   <= rem_d;
        seg_out     <= seg_d;
        acc_reached <= squash_d;
        limited     <= !squash_d && lim_d;
      end
      if (fin_f) begin
        state       <= S_IDLE;
        done        <= 1'b1;
        result      <= front4 ? r_next : (retired != '0) ? r_q : base_f;
        iterations  <= retired + IW'(front4 && !corr4);
        remainder   <= a_q;
        seg_out     <= seg_f;
        acc_reached <= squash_f;
        limited     <= !squash_f && lim_block;
      end

      // a new operation becomes the front one; an unfinished front one
      // hands over and drains
      if (handover) begin
        drain     <= 1'b1;
        acc_d     <= acc_q;
        base_d    <= base_f;
        retired_d <= retired + IW'(front4 && !corr4);
        lim_d     <= lim_block;
        rem_d     <= a_q;
        seg_d     <= seg_f;
      end
      if (accept) begin
        state       <= S_RUN;
        op_r        <= op;
        g_f         <= ~g_f;
        a_q         <= in_a;
        b_q         <= in_b;
        a_neg       <= 1'b0;
        corr_done   <= 1'b0;
        acc_q       <= accuracy;
        max_q       <= max_iter;
        exp_a_q     <= exp_a;
        exp_b_q     <= exp_b;
        c_q         <= in_c;
        issued      <= '0;
        retired     <= '0;
      end
    end
  end

  assign busy = (state == S_RUN) || drain;

  // A division keeps at most one step in flight: its remainder must be back
  // in A before the next step reads it.
  a_div_single_step: assert property (@(posedge clk) disable iff (!rst_n)
    (state == S_RUN && op_r == OP_DIV) |-> $onehot0({front2, front3, front4}));
  // An operation is only started when the module can take it.
  a_start_ready: assert property (@(posedge clk) disable iff (!rst_n)
    start |-> ready);
  // At most one operation ends per cycle.
  a_one_end: assert property (@(posedge clk) disable iff (!rst_n)
    !(fin_f && fin_d));

endmodule
