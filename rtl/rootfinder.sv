// rootfinder: isolates the P roots of the two Chebyshev series G1(x), G2(x)
// in [-1, 1] by a coarse-then-fine sign-change search.
//
// The search starts at x = 1 on G1 and walks down in coarse steps of 0.02.
// When the series changes sign between x_hi and x_lo = x_hi - 0.02, it walks
// down again from x_hi in fine steps of 0.0015 (never below x_lo) until the
// sign changes once more; the root is reported as the midpoint of that last
// fine interval. Because the roots of G1 and G2 interlace, the search then
// switches to the other series and resumes from the top of the fine interval
// just found. Roots thus come out in descending x (ascending frequency),
// alternating G1, G2, G1, ... A series value whose sign bit is set counts as
// negative.
//
// Each series value comes from a clenshaw evaluator through the eval_*
// handshake: eval_start (one-cycle pulse) with eval_x and eval_sel (0: G1,
// 1: G2), answered by eval_done with eval_y. Step and midpoint arithmetic
// uses the shared adder and multiplier. A pulse on start latches P; done
// pulses when P roots are found (err = 0), or when x = -1 is reached first
// (err = 1, nroots tells how many were found).
//
// The steps 0.02 and 0.0015, the sign-change test, the start at x = 1 and
// the alternation between G1 and G2 follow the design. Restarting from the
// top of the fine interval, clamping the last coarse step to -1, and the
// midpoint estimate are this implementation's choices.
module rootfinder
  import lsf_pkg::*;
#(
  parameter int PMAX = 12,
  localparam int PW = $clog2(PMAX + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [PW-1:0] p_order,
  output fp32_t         roots [PMAX],
  output logic [PW-1:0] nroots,
  output logic          err,
  output logic          busy,
  output logic          done,
  // Series evaluation (to clenshaw)
  output logic          eval_start,
  output logic          eval_sel,
  output fp32_t         eval_x,
  input  fp32_t         eval_y,
  input  logic          eval_done,
  // Shared floating point units
  output fp_req_t       fp_req,
  input  fp_rsp_t       fp_rsp
);

  typedef enum logic [3:0] {
    S_IDLE,
    S_EV_TOP, S_WT_TOP,     // value at the start of a coarse walk
    S_CSTEP, S_EV_C, S_WT_C, // coarse step
    S_FSTEP, S_EV_F, S_WT_F, // fine step
    S_MID_ADD, S_MID_MUL,    // midpoint of the final fine interval
    S_DONE
  } state_t;

  state_t        state;
  logic [PW-1:0] p;
  logic          sel;
  logic          sp;                 // sign of the series at the upper point
  fp32_t         xc, xn, xlo, xf, t;

  assign busy = (state != S_IDLE);

  always_comb begin
    eval_start = (state == S_EV_TOP) || (state == S_EV_C) || (state == S_EV_F);
    eval_sel   = sel;
    eval_x     = (state == S_EV_TOP) ? xc : xn;
  end

  always_comb begin
    fp_req = '0;
    case (state)
      S_CSTEP: begin
        fp_req.add_a = xc;
        fp_req.add_b = FP_NEG_COARSE;
      end
      S_FSTEP: begin
        fp_req.add_a = xf;
        fp_req.add_b = FP_NEG_FINE;
      end
      S_MID_ADD: begin
        fp_req.add_a = xf;
        fp_req.add_b = xn;
      end
      S_MID_MUL: begin
        fp_req.mul_a = t;
        fp_req.mul_b = FP_HALF;
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= S_IDLE;
      done   <= 1'b0;
      err    <= 1'b0;
      nroots <= '0;
      p      <= '0;
      sel    <= 1'b0;
      sp     <= 1'b0;
      xc     <= FP_ZERO;
      xn     <= FP_ZERO;
      xlo    <= FP_ZERO;
      xf     <= FP_ZERO;
      t      <= FP_ZERO;
      for (int i = 0; i < PMAX; i++) roots[i] <= FP_ZERO;
    end else begin
      done <= 1'b0;
      case (state)
        S_IDLE:
          if (start) begin
            p      <= p_order;
            nroots <= '0;
            err    <= 1'b0;
            sel    <= 1'b0;
            xc     <= FP_ONE;
            for (int i = 0; i < PMAX; i++) roots[i] <= FP_ZERO;
            state  <= S_EV_TOP;
          end
        S_EV_TOP: state <= S_WT_TOP;
        S_WT_TOP:
          if (eval_done) begin
            sp    <= eval_y[31];
            state <= S_CSTEP;
          end
        S_CSTEP:
          if (xc == FP_NEG_ONE) begin
            err   <= 1'b1;
            state <= S_DONE;
          end else begin
            xn    <= fp_lt(fp_rsp.add_y, FP_NEG_ONE) ? FP_NEG_ONE : fp_rsp.add_y;
            state <= S_EV_C;
          end
        S_EV_C: state <= S_WT_C;
        S_WT_C:
          if (eval_done) begin
            if (eval_y[31] != sp) begin
              xlo   <= xn;
              xf    <= xc;
              state <= S_FSTEP;
            end else begin
              xc    <= xn;
              state <= S_CSTEP;
            end
          end
        S_FSTEP: begin
          xn    <= fp_lt(xlo, fp_rsp.add_y) ? fp_rsp.add_y : xlo;
          state <= S_EV_F;
        end
        S_EV_F: state <= S_WT_F;
        S_WT_F:
          if (eval_done) begin
            if (eval_y[31] != sp) begin
              state <= S_MID_ADD;
            end else begin
              xf    <= xn;
              state <= S_FSTEP;
            end
          end
        S_MID_ADD: begin
          t     <= fp_rsp.add_y;
          state <= S_MID_MUL;
        end
        S_MID_MUL: begin
          roots[nroots] <= fp_rsp.mul_y;
          nroots        <= nroots + PW'(1);
          if (nroots + PW'(1) == p) begin
            state <= S_DONE;
          end else begin
            sel   <= ~sel;
            xc    <= xf;
            state <= S_EV_TOP;
          end
        end
        default: begin
          done  <= 1'b1;
          state <= S_IDLE;
        end
      endcase
    end
  end

  start_while_busy: assert property (@(posedge clk) disable iff (!rst_n) start |-> !busy);
  // A new evaluation is only requested once the previous one has answered.
  eval_then_wait: assert property (@(posedge clk) disable iff (!rst_n) eval_start |=> !eval_start);

endmodule
