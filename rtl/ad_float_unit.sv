// Floating-point unit built from two AD modules.
//
// One AD module (the exponent module) works on exponents, the other (the
// mantissa module) on mantissas; a small sequencer passes values between
// them. No separate floating-point adder or multiplier exists: both
// operations reuse the shifters and adders of the two modules.
//
// Number format (this design's choice): sign, EW-bit two's complement
// exponent e and MW-bit mantissa m with its leading one at bit MW-1, value
// (-1)^sign * m/2^(MW-1) * 2^e. A zero mantissa is zero whatever the
// exponent. MW is half the module width, so that a mantissa product or an
// aligned mantissa sum always fits the 32-bit data port of the
// normalisation step.
//
// Multiplication: (1) exponent module adds the exponents while the mantissa
// module multiplies the mantissas, accuracy-driven, with `accuracy` and
// `max_iter` passed on; (2) mantissa module normalises the product (NORM),
// returning the position of its leading one on its segment output; (3)
// exponent module adds that position, less 2*(MW-1), to the exponent sum.
// Division runs the same three steps: the exponent module subtracts the
// exponents while the mantissa module divides the dividend mantissa, shifted
// up by MW bits, by the divisor mantissa (accuracy-driven); NORM of the
// quotient; the exponent module adds its leading-one position less MW. A
// zero divisor returns zero with exp_ovf set.
// Addition/subtraction: (1) exponent module subtracts the exponents; the
// operand with the larger magnitude becomes L, the other S; (2) mantissa
// module aligns and adds, (mL << d) +/- mS, with d loaded straight into its
// segment register (FADD/FSUB); (3) NORM of the sum; (4) exponent module
// adds the leading-one position, less MW-1, to S's exponent. When d > MW,
// S is below L's last bit and L is returned; a zero operand returns the
// other operand. Results are truncated, not rounded.
//
// Power and root (FOP_POW, FOP_ROOT) work on the integer operands: x on
// int_a, n on int_b. The mantissa module takes the logarithm of x (LOG,
// SW.FB fixed point with FB = DW-SW), multiplies it by n or divides it by n
// (accuracy-driven, like any multiplication or division), and takes the
// antilog of the result (ANTILOG). int_result returns x^n or x^(1/n) as a
// DW.DW fixed-point number. Log and antilog are the linear (Mitchell)
// approximations of the module, so the result carries their few-percent
// error. A result of 2^DW or more sets exp_ovf and returns all ones; x = 0
// returns 0.
//
// Besides the floating-point operations, any integer operation of the AD
// module (multiply, divide, log, antilog, ...) can be sent straight to the
// mantissa module with int_start; its results appear on int_result,
// int_seg and int_remainder.
//
// Interface: pulse `start` (floating point) or `int_start` (integer) while
// idle, with the operands; `start` wins if both are high. `done` pulses when
// the outputs of that operation are valid; they hold until the next one. exp_ovf flags a
// result exponent outside the EW-bit range (r_exp then wraps).
// iterations/acc_reached/limited report the mantissa multiplication.
// The sequencer starts a module only when it is idle: each step needs the
// result of the one before, so the modules' instruction overlap is not used.
//
// What follows the document: building floating-point arithmetic from two
// integer AD modules, division among its operations, the multiplication as exponent addition plus mantissa
// multiplication followed by the overflow handling, the addition as
// exponent subtraction into the mantissa module's segment register,
// alignment shift, mantissa addition and overflow handling. The number
// format, the operand swap, sign handling and the sequencer are this
// design's own. The document names power and root among the operations of
// the unit but not how they are computed; the log-multiply-antilog
// sequence is this design's choice, built from the module's own LOG, MUL,
// DIV and ANTILOG operations.
//
// Lint notes: the exponent module's accuracy, limit, remainder, segment and
// iteration outputs and the upper half of its result are not needed (an
// exponent always fits DW bits), and only the low half of the scaled
// logarithm t feeds the antilog once its upper half has been tested for
// overflow; lint lists these as unused. Asynchronous active-low reset; the
// assertions use rst_n in `disable iff`, which lint reports as a net used
// both synchronously and asynchronously.
module ad_float_unit
  import ad_pkg::*;
#(
  parameter int DW = 32,          // width of each AD module's data ports
  parameter int MW = DW / 2,      // mantissa width
  parameter int EW = 8,           // exponent width
  parameter int RW = 2 * DW,
  parameter int SW = $clog2(DW),
  parameter int IW = 6
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  fop_e          fop,
  input  logic          int_start,
  input  ad_op_e        int_op,
  input  logic [DW-1:0] int_a,
  input  logic [DW-1:0] int_b,
  input  logic [SW-1:0] int_exp_a,
  input  logic [SW-1:0] int_exp_b,
  input  logic [RW-1:0] int_c,
  input  logic          a_sign,
  input  logic [EW-1:0] a_exp,
  input  logic [MW-1:0] a_man,
  input  logic          b_sign,
  input  logic [EW-1:0] b_exp,
  input  logic [MW-1:0] b_man,
  input  logic [RW-1:0] accuracy,
  input  logic [IW-1:0] max_iter,
  output logic          busy,
  output logic          done,
  output logic          r_sign,
  output logic [EW-1:0] r_exp,
  output logic [MW-1:0] r_man,
  output logic          exp_ovf,
  output logic [RW-1:0] int_result,
  output logic signed [SW+1:0] int_seg,
  output logic [DW-1:0] int_remainder,
  output logic [IW-1:0] iterations,
  output logic          acc_reached,
  output logic          limited
);

  typedef enum logic [4:0] {
    S_IDLE,
    S_MUL1, S_MUL1_W, S_MUL2, S_MUL2_W, S_MUL3, S_MUL3_W,
    S_ADD1, S_ADD1_W, S_ADD2, S_ADD2_W, S_ADD3, S_ADD3_W, S_ADD4, S_ADD4_W,
    S_INT, S_INT_W,
    S_PW1, S_PW1_W, S_PW2, S_PW2_W, S_PW3, S_PW3_W
  } state_e;

  localparam int FB = DW - SW;   // fraction bits of the log value in power/root

  localparam int SGW = SW + 2;

  state_e state;

  // Exponent module (X) and mantissa module (M) ports.
  logic                  x_start, x_busy, x_ready, x_done, x_acc, x_lim;
  ad_op_e                x_op;
  logic [DW-1:0]         x_a, x_b, x_rem;
  logic [RW-1:0]         x_res;
  logic signed [SGW-1:0] x_seg;
  logic [IW-1:0]         x_iter;

  logic                  m_start, m_busy, m_ready, m_done, m_acc, m_lim;
  ad_op_e                m_op;
  logic [DW-1:0]         m_a, m_b, m_rem;
  logic [SW-1:0]         m_ea, m_eb;
  logic [RW-1:0]         m_c;
  logic [RW-1:0]         m_res;
  logic signed [SGW-1:0] m_seg;
  logic [IW-1:0]         m_iter;

  ad_module #(.DW(DW), .IW(IW)) u_exp (
    .clk(clk), .rst_n(rst_n), .start(x_start), .op(x_op), .in_a(x_a), .in_b(x_b),
    .exp_a('0), .exp_b('0), .in_c('0), .accuracy('0), .max_iter('0),
    .busy(x_busy), .ready(x_ready), .done(x_done), .result(x_res), .seg_out(x_seg), .remainder(x_rem),
    .iterations(x_iter), .acc_reached(x_acc), .limited(x_lim)
  );

  ad_module #(.DW(DW), .IW(IW)) u_man (
    .clk(clk), .rst_n(rst_n), .start(m_start), .op(m_op), .in_a(m_a), .in_b(m_b),
    .exp_a(m_ea), .exp_b(m_eb), .in_c(m_c), .accuracy(accuracy), .max_iter(max_iter),
    .busy(m_busy), .ready(m_ready), .done(m_done), .result(m_res), .seg_out(m_seg), .remainder(m_rem),
    .iterations(m_iter), .acc_reached(m_acc), .limited(m_lim)
  );

  // Operand registers and intermediate values.
  logic                 as_q, bs_q;          // effective signs
  logic signed [DW-1:0] ae_q, be_q;          // sign-extended exponents
  logic [MW-1:0]        am_q, bm_q;
  logic signed [DW-1:0] esum_q;              // exponent sum / S's exponent
  logic [MW-1:0]        lm_q, sm_q;          // larger and smaller mantissa
  logic [SW-1:0]        d_q;                 // alignment distance
  logic                 sub_q, ls_q;         // effective subtraction, L's sign
  logic                 x_seen, m_seen;
  ad_op_e               iop_q;               // integer command
  logic [DW-1:0]        ia_q, ib_q;
  logic [SW-1:0]        iea_q, ieb_q;
  logic [RW-1:0]        ic_q;
  logic                 pw_root_q;           // power/root: root
  logic                 div_q;               // float division
  logic [DW-1:0]        lg_q;                // log2(x), SW.FB fixed point
  logic [RW-1:0]        t_q;                 // n*log2(x) or log2(x)/n

  logic signed [DW-1:0] x_val, gap;
  logic                 swap;
  assign x_val = signed'(x_res[DW-1:0]);
  // Addition: the operand with the larger exponent (or, at equal exponents,
  // the larger mantissa) becomes L; gap is the exponent distance.
  assign swap  = (x_val < 0) || (x_val == 0 && bm_q > am_q);
  assign gap   = swap ? -x_val : x_val;

  // Command decode: what each state asks the two modules to do.
  always_comb begin
    x_start = 1'b0;
    m_start = 1'b0;
    x_op    = OP_ADD;
    m_op    = OP_ADD;
    x_a     = '0;
    x_b     = '0;
    m_a     = '0;
    m_b     = '0;
    m_ea    = '0;
    m_eb    = '0;
    m_c     = '0;
    unique case (state)
      S_PW1: begin
        m_start = 1'b1; m_op = OP_LOG; m_a = ia_q;
      end
      S_PW2: begin
        m_start = 1'b1; m_op = pw_root_q ? OP_DIV : OP_MUL; m_a = lg_q; m_b = ib_q;
      end
      S_PW3: begin
        m_start = 1'b1; m_op = OP_ANTILOG; m_a = {t_q[FB-1:0], SW'(0)}; m_ea = t_q[DW-1:FB];
      end
      S_INT: begin
        m_start = 1'b1; m_op = iop_q; m_a = ia_q; m_b = ib_q;
        m_ea = iea_q; m_eb = ieb_q; m_c = ic_q;
      end
      S_MUL1: begin
        x_start = 1'b1; x_op = div_q ? OP_SUB : OP_ADD; x_a = ae_q; x_b = be_q;
        m_start = 1'b1; m_op = div_q ? OP_DIV : OP_MUL; m_b = DW'(bm_q);
        m_a = div_q ? (DW'(am_q) << MW) : DW'(am_q);
      end
      S_MUL2: begin
        m_start = 1'b1; m_op = OP_NORM; m_a = m_res[DW-1:0];
      end
      S_MUL3: begin
        x_start = 1'b1; x_op = OP_ADD; x_a = esum_q;
        x_b = DW'(signed'(m_seg)) - (div_q ? DW'(MW) : DW'(2 * (MW - 1)));
      end
      S_ADD1: begin
        x_start = 1'b1; x_op = OP_SUB; x_a = ae_q; x_b = be_q;
      end
      S_ADD2: begin
        m_start = 1'b1; m_op = sub_q ? OP_FSUB : OP_FADD;
        m_a = DW'(lm_q); m_ea = d_q; m_b = DW'(sm_q);
      end
      S_ADD3: begin
        m_start = 1'b1; m_op = OP_NORM; m_a = m_res[DW-1:0];
      end
      S_ADD4: begin
        x_start = 1'b1; x_op = OP_ADD; x_a = esum_q;
        x_b = DW'(signed'(m_seg)) - DW'(MW - 1);
      end
      default: ;
    endcase
  end

  // Result of the final exponent addition and its range check.
  logic signed [DW-1:0] emin, emax;
  assign emax = DW'(2 ** (EW - 1) - 1);
  assign emin = -DW'(2 ** (EW - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= S_IDLE;
      as_q        <= 1'b0;
      bs_q        <= 1'b0;
      ae_q        <= '0;
      be_q        <= '0;
      am_q        <= '0;
      bm_q        <= '0;
      esum_q      <= '0;
      lm_q        <= '0;
      sm_q        <= '0;
      d_q         <= '0;
      sub_q       <= 1'b0;
      ls_q        <= 1'b0;
      x_seen      <= 1'b0;
      m_seen      <= 1'b0;
      iop_q       <= OP_ADD;
      ia_q        <= '0;
      ib_q        <= '0;
      iea_q       <= '0;
      ieb_q       <= '0;
      ic_q        <= '0;
      pw_root_q   <= 1'b0;
      div_q       <= 1'b0;
      lg_q        <= '0;
      t_q         <= '0;
      int_result  <= '0;
      int_seg     <= '0;
      int_remainder <= '0;
      done        <= 1'b0;
      r_sign      <= 1'b0;
      r_exp       <= '0;
      r_man       <= '0;
      exp_ovf     <= 1'b0;
      iterations  <= '0;
      acc_reached <= 1'b0;
      limited     <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          as_q    <= a_sign;
          bs_q    <= b_sign ^ (fop == FOP_SUB);
          ae_q    <= DW'(signed'(a_exp));
          be_q    <= DW'(signed'(b_exp));
          am_q    <= a_man;
          bm_q    <= b_man;
          x_seen  <= 1'b0;
          m_seen  <= 1'b0;
          exp_ovf <= 1'b0;
          iterations  <= '0;
          acc_reached <= 1'b0;
          limited     <= 1'b0;
          ia_q      <= int_a;
          ib_q      <= int_b;
          pw_root_q <= (fop == FOP_ROOT);
          div_q     <= (fop == FOP_DIV);
          if (fop == FOP_POW || fop == FOP_ROOT) begin
            state <= S_PW1;
          end else if ((fop == FOP_ADD || fop == FOP_SUB) && (a_man == '0 || b_man == '0)) begin
            // A zero operand: the result is the other operand.
            r_sign <= (a_man == '0) ? ((b_man == '0) ? 1'b0 : (b_sign ^ (fop == FOP_SUB)))
                                    : a_sign;
            r_exp  <= (a_man == '0) ? ((b_man == '0) ? '0 : b_exp) : a_exp;
            r_man  <= (a_man == '0) ? b_man : a_man;
            done   <= 1'b1;
          end else begin
            state <= (fop == FOP_MUL || fop == FOP_DIV) ? S_MUL1 : S_ADD1;
          end
        end else if (int_start) begin
          iop_q <= int_op;
          ia_q  <= int_a;
          ib_q  <= int_b;
          iea_q <= int_exp_a;
          ieb_q <= int_exp_b;
          ic_q  <= int_c;
          iterations  <= '0;
          acc_reached <= 1'b0;
          limited     <= 1'b0;
          state <= S_INT;
        end
        // ----------------------------------------------- power and root
        S_PW1:   state <= S_PW1_W;
        S_PW1_W: if (m_done) begin
          if (ia_q == '0) begin
            int_result <= '0;
            done       <= 1'b1;
            state      <= S_IDLE;
          end else begin
            lg_q  <= m_res[DW+SW-1:SW];
            state <= S_PW2;
          end
        end
        S_PW2:   state <= S_PW2_W;
        S_PW2_W: if (m_done) begin
          iterations  <= m_iter;
          acc_reached <= m_acc;
          limited     <= m_lim;
          t_q         <= m_res;
          if (m_res[RW-1:DW] != '0) begin
            // 2^(n*log2 x) does not fit the DW.DW result
            exp_ovf    <= 1'b1;
            int_result <= '1;
            done       <= 1'b1;
            state      <= S_IDLE;
          end else begin
            state <= S_PW3;
          end
        end
        S_PW3:   state <= S_PW3_W;
        S_PW3_W: if (m_done) begin
          int_result <= m_res;
          done       <= 1'b1;
          state      <= S_IDLE;
        end
        // ------------------------------------- integer command, module M
        S_INT:   state <= S_INT_W;
        S_INT_W: if (m_done) begin
          int_result    <= m_res;
          int_seg       <= m_seg;
          int_remainder <= m_rem;
          iterations    <= m_iter;
          acc_reached   <= m_acc;
          limited       <= m_lim;
          done          <= 1'b1;
          state         <= S_IDLE;
        end
        // ---------------------------------------------- multiplication
        S_MUL1: state <= S_MUL1_W;
        S_MUL1_W: begin
          if (x_done) begin
            x_seen <= 1'b1;
            esum_q <= x_val;
          end
          if (m_done) m_seen <= 1'b1;
          if ((x_seen || x_done) && (m_seen || m_done)) begin
            iterations  <= m_iter;
            acc_reached <= m_acc;
            limited     <= m_lim;
            if (m_res[DW-1:0] == '0) begin
              // zero product or dividend; a zero divisor also flags exp_ovf
              r_sign  <= 1'b0;
              r_exp   <= '0;
              r_man   <= '0;
              exp_ovf <= div_q && (bm_q == '0);
              done   <= 1'b1;
              state  <= S_IDLE;
            end else begin
              state <= S_MUL2;
            end
          end
        end
        S_MUL2:   state <= S_MUL2_W;
        S_MUL2_W: if (m_done) begin
          r_man <= m_res[DW-1 -: MW];
          state <= S_MUL3;
        end
        S_MUL3:   state <= S_MUL3_W;
        S_MUL3_W: if (x_done) begin
          r_sign  <= as_q ^ bs_q;
          r_exp   <= x_val[EW-1:0];
          exp_ovf <= (x_val > emax) || (x_val < emin);
          done    <= 1'b1;
          state   <= S_IDLE;
        end
        // ------------------------------------------ addition/subtraction
        S_ADD1: state <= S_ADD1_W;
        S_ADD1_W: if (x_done) begin
          lm_q  <= swap ? bm_q : am_q;
          sm_q  <= swap ? am_q : bm_q;
          ls_q  <= swap ? bs_q : as_q;
          sub_q <= as_q ^ bs_q;
          esum_q <= swap ? ae_q : be_q;
          d_q   <= SW'(gap);
          if (gap > DW'(MW)) begin
            r_sign <= swap ? bs_q : as_q;
            r_exp  <= swap ? be_q[EW-1:0] : ae_q[EW-1:0];
            r_man  <= swap ? bm_q : am_q;
            done   <= 1'b1;
            state  <= S_IDLE;
          end else begin
            state <= S_ADD2;
          end
        end
        S_ADD2:   state <= S_ADD2_W;
        S_ADD2_W: if (m_done) begin
          if (m_res[DW-1:0] == '0) begin
            r_sign <= 1'b0;
            r_exp  <= '0;
            r_man  <= '0;
            done   <= 1'b1;
            state  <= S_IDLE;
          end else begin
            state <= S_ADD3;
          end
        end
        S_ADD3:   state <= S_ADD3_W;
        S_ADD3_W: if (m_done) begin
          r_man <= m_res[DW-1 -: MW];
          state <= S_ADD4;
        end
        S_ADD4:   state <= S_ADD4_W;
        S_ADD4_W: if (x_done) begin
          r_sign  <= ls_q;
          r_exp   <= x_val[EW-1:0];
          exp_ovf <= (x_val > emax) || (x_val < emin);
          done    <= 1'b1;
          state   <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign busy = (state != S_IDLE);

  // The sequencer only starts a module that is idle.
  a_x_idle: assert property (@(posedge clk) disable iff (!rst_n) x_start |-> x_ready && !x_busy);
  a_m_idle: assert property (@(posedge clk) disable iff (!rst_n) m_start |-> m_ready && !m_busy);

endmodule
