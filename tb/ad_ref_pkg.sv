// Reference model of the AD module's operations for the testbenches.
//
// model() works out, from the operands alone, what the module must return:
// the result, segment output, remainder, number of iterations, whether the
// accuracy guard or the iteration limit stopped it, and the number of clock
// cycles from the start cycle to the done cycle. Products and quotients are
// computed with loops over the operand bits that follow the arithmetic
// definition (2^j + rest decomposition, non-restoring division with a final
// correction), not the module's pipeline.
package ad_ref_pkg;
  import ad_pkg::*;

  function automatic int msb(logic [63:0] v);
    int h = -1;
    for (int i = 0; i < 64; i++) if (v[i]) h = i;
    return h;
  endfunction

// Reference model: result, iteration count, flags, expected latency.
  typedef struct {
    logic [63:0]       r;
    logic signed [6:0] seg;
    logic [31:0]       rem;
    int                iters;
    bit                acc, lim;
    int                lat;
    bit                check_rem;
    int                n_neg;     // division steps whose remainder went negative
    bit                corr;      // division needed the final correction
    bit                divz;      // division by zero
  } expect_t;

  function automatic expect_t model(ad_op_e o, logic [31:0] a, logic [31:0] b,
                                    logic [4:0] ea, logic [4:0] eb, logic [63:0] c,
                                    logic [63:0] acc, int lim);
    expect_t e;
    e = '{r: 0, seg: 0, rem: 0, iters: 1, acc: 0, lim: 0, lat: 5, check_rem: 0,
           n_neg: 0, corr: 0, divz: 0};
    case (o)
      OP_ADD: e.r = 64'(a) + 64'(b);
      OP_SUB: e.r = 64'(a) - 64'(b);
      OP_FADD: e.r = (64'(a) << ea) + (64'(b) << eb);
      OP_FSUB: e.r = (64'(a) << ea) - (64'(b) << eb);
      OP_NORM: begin
        e.r   = (a == 0) ? 64'd0 : 64'(a) << (31 - msb(64'(a)));
        e.seg = (a == 0) ? 7'sd0 : 7'(msb(64'(a)));
      end
      OP_LOG: begin
        int j = msb(64'(a));
        if (a != 0) begin
          logic [63:0] restv = 64'(a) - (64'(1) << j);
          e.r = (64'(j) << 32) | ((restv << (32 - j)) & 64'hFFFF_FFFF);
        end
        e.seg = (a == 0) ? 7'sd0 : 7'(j);
      end
      OP_ANTILOG: e.r = {31'b0, 1'b1, a} << ea;
      OP_SEGADD: begin e.seg = 7'(int'(ea) + int'(eb)); e.r = 64'(signed'(e.seg)); end
      OP_SEGSUB: begin e.seg = 7'(int'(ea) - int'(eb)); e.r = 64'(signed'(e.seg)); end
      OP_MUL, OP_MAC: begin
        logic [63:0] x = 64'(a), y = 64'(b), contrib;
        e.r = (o == OP_MAC) ? c : 64'd0;
        e.iters = 0;
        while (x != 0 && y != 0) begin
          int j = msb(x), k = msb(y);
          if (lim != 0 && e.iters == lim) begin e.lim = 1; break; end
          contrib = (y << j) + ((x - (64'(1) << j)) << k);
          e.r += contrib;
          e.iters++;
          x -= 64'(1) << j;
          y -= 64'(1) << k;
          if (acc != 0 && contrib < acc) begin e.acc = 1; break; end
        end
        e.lat = (e.iters == 0) ? 2 : e.iters + 4;
      end
      OP_DIV: begin
        longint rem = longint'(a), q = 0, t;
        bit neg = 0;
        int steps = 0;
        e.iters = 0;
        e.divz = (b == 0);
        while (b != 0 && rem != 0 && msb(64'(rem)) >= msb(64'(b))) begin
          int d = msb(64'(rem)) - msb(64'(b));
          longint contrib = longint'(1) << d;
          if (lim != 0 && e.iters == lim) begin e.lim = 1; break; end
          q = neg ? q - contrib : q + contrib;
          t = rem - (longint'(b) << d);
          if (t < 0) begin rem = -t; neg = !neg; e.n_neg++; end else rem = t;
          e.iters++;
          steps++;
          if (acc != 0 && 64'(contrib) < acc) begin e.acc = 1; break; end
        end
        if (!e.acc && !e.lim && neg && rem != 0 && b != 0) begin
          q -= 1;
          rem = longint'(b) - rem;
          steps++;
          e.corr = 1;
        end
        e.r = 64'(q);
        e.rem = 32'(rem);
        e.check_rem = !e.acc && !e.lim;
        e.lat = (steps == 0) ? 2 : 3 * steps + 2;
      end
      default: ;
    endcase
    return e;
  endfunction


endpackage
