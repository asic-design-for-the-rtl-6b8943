// lsf_asic: converts the P coefficients of a linear-prediction filter
// A(z) = 1 - sum a(k) z^-k into its P line spectral frequencies (LSFs).
//
// The conversion is a cascade of state-machine entities, each run once per
// frame by a one-cycle start pulse and reporting back with a one-cycle done
// pulse:
//   1. atopq      F1 = A + z^-(P+1) A(1/z), F2 = A - z^-(P+1) A(1/z)
//   2. polydiv    G1 = F1 deflated (by 1 + z^-1, or nothing for odd P)
//   3. polydiv    G2 = F2 deflated (by 1 - z^-1, or 1 - z^-2 for odd P)
//   4. chebform   G1, G2 rewritten as Chebyshev series in x = cos(w)
//   5. rootfinder coarse/fine sign-change search from x = 1 to -1, calling
//                 clenshaw for every series value, alternating G1 and G2
//   6. acos_unit  w = arccos(x) for every root
// One combinational fpadd, fpmult and fpdiv serve all entities. Only one
// entity is active at a time (the root finder waits while clenshaw runs), so
// the operands of the units are simply taken from whichever entity is busy.
//
// Interface: pulse start for one cycle while busy is low, with p_order (the
// LP order P, 2..PMAX; 10 or 12 in the intended applications) and a_coef
// (a_coef[k-1] = a(k), IEEE single) held stable until done. done pulses
// for one cycle when lsf[0..P-1] hold the LSFs in radians, in ascending
// order. err = 1 means the search reached x = -1 before finding P roots
// (roots closer than the search steps); nlsf then tells how many LSFs are
// valid. A frame of order 10 to 12 takes about 3,000 to 5,200 cycles,
// depending on where the roots lie (most of it in the root search).
//
// The entity split, the START/DONE handshake, the sequential one-at-a-time
// operation and the shared 32-bit floating point units follow the design;
// the controller, the port names and the unit sharing by busy flags are this
// implementation's.
module lsf_asic
  import lsf_pkg::*;
#(
  parameter int PMAX = 12,
  localparam int NC = PMAX / 2 + 1,
  localparam int PW = $clog2(PMAX + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [PW-1:0] p_order,
  input  fp32_t         a_coef [PMAX],
  output fp32_t         lsf [PMAX],
  output logic [PW-1:0] nlsf,
  output logic          err,
  output logic          busy,
  output logic          done
);

  typedef enum logic [3:0] {
    C_IDLE, C_ATOPQ, C_DIV1, C_DIV2, C_CHEB, C_ROOT, C_ACOS, C_DONE
  } ctrl_t;

  ctrl_t         cs;
  logic          kick;              // first cycle of a stage: start its entity
  logic [PW-1:0] p, m1, m2;
  logic          p_odd;

  // Entity outputs
  fp32_t   f1 [NC], f2 [NC], gd [NC], g1 [NC], g2 [NC], c1 [NC], c2 [NC];
  fp32_t   pd_f [NC], cl_coef [NC];
  fp32_t   roots [PMAX];
  logic [PW-1:0] nroots, cl_n;
  logic    rf_err;
  logic    aq_busy, aq_done, pd_busy, pd_done, cf_busy, cf_done;
  logic    cl_busy, cl_done, rf_busy, rf_done, ac_busy, ac_done;
  logic    ev_start, ev_sel;
  fp32_t   ev_x, ev_y;
  defl_t   pd_mode;
  logic [PW-1:0] pd_len;
  fp_req_t aq_req, pd_req, cf_req, cl_req, rf_req, ac_req, req;
  fp_rsp_t rsp;

  assign busy = (cs != C_IDLE);

  // ---------------------------------------------------------------- control
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cs    <= C_IDLE;
      kick  <= 1'b0;
      done  <= 1'b0;
      err   <= 1'b0;
      nlsf  <= '0;
      p     <= '0;
      m1    <= '0;
      m2    <= '0;
      p_odd <= 1'b0;
      for (int i = 0; i < NC; i++) begin
        g1[i] <= FP_ZERO;
        g2[i] <= FP_ZERO;
      end
    end else begin
      kick <= 1'b0;
      done <= 1'b0;
      case (cs)
        C_IDLE:
          if (start) begin
            p     <= p_order;
            p_odd <= p_order[0];
            m1    <= PW'((p_order + PW'(1)) >> 1);
            m2    <= PW'(p_order >> 1);
            kick  <= 1'b1;
            cs    <= C_ATOPQ;
          end
        C_ATOPQ:
          if (aq_done) begin
            kick <= 1'b1;
            cs   <= C_DIV1;
          end
        C_DIV1:
          if (pd_done) begin
            g1   <= gd;
            kick <= 1'b1;
            cs   <= C_DIV2;
          end
        C_DIV2:
          if (pd_done) begin
            g2   <= gd;
            kick <= 1'b1;
            cs   <= C_CHEB;
          end
        C_CHEB:
          if (cf_done) begin
            kick <= 1'b1;
            cs   <= C_ROOT;
          end
        C_ROOT:
          if (rf_done) begin
            err  <= rf_err;
            nlsf <= nroots;
            if (nroots == '0) begin
              cs <= C_DONE;
            end else begin
              kick <= 1'b1;
              cs   <= C_ACOS;
            end
          end
        C_ACOS:
          if (ac_done) cs <= C_DONE;
        default: begin
          done <= 1'b1;
          cs   <= C_IDLE;
        end
      endcase
    end
  end

  // Deflation selector and length for the two polydiv runs.
  always_comb begin
    if (cs == C_DIV2) begin
      pd_mode = p_odd ? DEFL_M2 : DEFL_M1;
      pd_len  = m2;
      pd_f    = f2;
    end else begin
      pd_mode = p_odd ? DEFL_NONE : DEFL_P1;
      pd_len  = m1;
      pd_f    = f1;
    end
  end

  // Series selected by the root finder for evaluation.
  always_comb begin
    cl_coef = ev_sel ? c2 : c1;
    cl_n    = ev_sel ? m2 : m1;
  end

  // ---------------------------------------------------------------- entities
  atopq #(.PMAX(PMAX)) u_atopq (
    .clk, .rst_n, .start(kick && cs == C_ATOPQ), .p_order(p), .a_coef,
    .f1, .f2, .busy(aq_busy), .done(aq_done), .fp_req(aq_req), .fp_rsp(rsp)
  );

  polydiv #(.PMAX(PMAX)) u_polydiv (
    .clk, .rst_n, .start(kick && (cs == C_DIV1 || cs == C_DIV2)), .mode(pd_mode),
    .m_len(pd_len), .f(pd_f), .g(gd), .busy(pd_busy), .done(pd_done),
    .fp_req(pd_req), .fp_rsp(rsp)
  );

  chebform #(.PMAX(PMAX)) u_chebform (
    .clk, .rst_n, .start(kick && cs == C_CHEB), .m1, .m2, .g1, .g2, .c1, .c2,
    .busy(cf_busy), .done(cf_done), .fp_req(cf_req), .fp_rsp(rsp)
  );

  rootfinder #(.PMAX(PMAX)) u_rootfinder (
    .clk, .rst_n, .start(kick && cs == C_ROOT), .p_order(p), .roots, .nroots,
    .err(rf_err), .busy(rf_busy), .done(rf_done),
    .eval_start(ev_start), .eval_sel(ev_sel), .eval_x(ev_x), .eval_y(ev_y),
    .eval_done(cl_done), .fp_req(rf_req), .fp_rsp(rsp)
  );

  clenshaw #(.PMAX(PMAX)) u_clenshaw (
    .clk, .rst_n, .start(ev_start), .n(cl_n), .x(ev_x), .coef(cl_coef), .y(ev_y),
    .busy(cl_busy), .done(cl_done), .fp_req(cl_req), .fp_rsp(rsp)
  );

  acos_unit #(.PMAX(PMAX)) u_acos (
    .clk, .rst_n, .start(kick && cs == C_ACOS), .n(nroots), .x(roots), .lsf,
    .busy(ac_busy), .done(ac_done), .fp_req(ac_req), .fp_rsp(rsp)
  );

  // ------------------------------------------------- shared floating point
  always_comb begin
    if      (cl_busy) req = cl_req;
    else if (rf_busy) req = rf_req;
    else if (aq_busy) req = aq_req;
    else if (pd_busy) req = pd_req;
    else if (cf_busy) req = cf_req;
    else if (ac_busy) req = ac_req;
    else              req = '0;
  end

  fpadd  u_fpadd  (.a(req.add_a), .b(req.add_b), .y(rsp.add_y));
  fpmult u_fpmult (.a(req.mul_a), .b(req.mul_b), .y(rsp.mul_y));
  fpdiv  u_fpdiv  (.a(req.div_a), .b(req.div_b), .y(rsp.div_y));

  // At most one entity drives the shared units, except the root finder,
  // which is idle while clenshaw evaluates for it.
  one_user: assert property (@(posedge clk) disable iff (!rst_n)
    $countones({aq_busy, pd_busy, cf_busy, rf_busy && !cl_busy, cl_busy, ac_busy}) <= 1);

endmodule
