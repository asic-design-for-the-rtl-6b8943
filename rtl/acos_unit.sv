// acos_unit: converts the roots x = cos(w) into line spectral frequencies
// w = arccos(x), in radians in [0, pi].
//
// For |x| it uses the approximation
//   arccos(|x|) ~= sqrt(1 - |x|) * (c0 + c1|x| + ... + c7|x|^7),
// whose error is below 2.2e-8 rad over [0, 1], and for negative x it returns
// pi - arccos(|x|). The square root is found with Newton's iteration
// s <- (s + v/s) / 2 (divide, add, multiply on the shared units), seeded by
// halving the exponent of v with an integer add on its bit pattern, which is
// within a few percent; NEWTON_ITERS = 3 iterations reach full single
// precision. The polynomial is evaluated in Horner form. x = +-1 gives 0 or
// pi exactly.
//
// The entity converts n values per run, one after the other: a pulse on
// start latches n (1..PMAX) and done pulses when lsf[0..n-1] are written,
// 27 cycles per value (one for |x|, one for 1 - |x|, three per Newton
// iteration, two per polynomial term, two to finish). Entries at and above
// n read as zero.
//
// That the design ends with an arccosine entity on the shared floating point
// units follows the design; the approximation, the square-root method and
// the schedule are this implementation's choices.
module acos_unit
  import lsf_pkg::*;
#(
  parameter int PMAX = 12,
  parameter int NEWTON_ITERS = 3,
  localparam int PW = $clog2(PMAX + 1)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  logic [PW-1:0] n,
  input  fp32_t         x [PMAX],
  output fp32_t         lsf [PMAX],
  output logic          busy,
  output logic          done,
  output fp_req_t       fp_req,
  input  fp_rsp_t       fp_rsp
);

  typedef enum logic [3:0] {
    S_IDLE, S_LOAD, S_ONEMINUS, S_NDIV, S_NADD, S_NMUL,
    S_PMUL, S_PADD, S_RMUL, S_FIX, S_DONE
  } state_t;

  localparam logic [31:0] SQRT_SEED = 32'h1FBD_1DF5;

  state_t        state;
  logic [PW-1:0] cnt, i;
  logic [2:0]    jc;                 // polynomial coefficient index
  logic [1:0]    it;                 // Newton iteration
  logic          neg;
  fp32_t         ax, v, s, q, pa, r;

  assign busy = (state != S_IDLE);

  always_comb begin
    fp_req = '0;
    case (state)
      S_ONEMINUS: begin fp_req.add_a = FP_ONE; fp_req.add_b = fp_neg(ax); end
      S_NDIV:     begin fp_req.div_a = v;      fp_req.div_b = s;          end
      S_NADD:     begin fp_req.add_a = s;      fp_req.add_b = q;          end
      S_NMUL:     begin fp_req.mul_a = q;      fp_req.mul_b = FP_HALF;    end
      S_PMUL:     begin fp_req.mul_a = pa;     fp_req.mul_b = ax;         end
      S_PADD:     begin fp_req.add_a = pa;     fp_req.add_b = ACOS_C[jc]; end
      S_RMUL:     begin fp_req.mul_a = s;      fp_req.mul_b = pa;         end
      S_FIX:      begin fp_req.add_a = FP_PI;  fp_req.add_b = fp_neg(r);  end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      done  <= 1'b0;
      cnt   <= '0;
      i     <= '0;
      jc    <= '0;
      it    <= '0;
      neg   <= 1'b0;
      ax    <= FP_ZERO;
      v     <= FP_ZERO;
      s     <= FP_ZERO;
      q     <= FP_ZERO;
      pa    <= FP_ZERO;
      r     <= FP_ZERO;
      for (int k = 0; k < PMAX; k++) lsf[k] <= FP_ZERO;
    end else begin
      done <= 1'b0;
      case (state)
        S_IDLE:
          if (start) begin
            cnt   <= n;
            i     <= '0;
            for (int k = 0; k < PMAX; k++) lsf[k] <= FP_ZERO;
            state <= S_LOAD;
          end
        S_LOAD: begin
          ax    <= fp_abs(x[i]);
          neg   <= x[i][31];
          state <= S_ONEMINUS;
        end
        S_ONEMINUS: begin
          v  <= fp_rsp.add_y;
          s  <= (fp_rsp.add_y >> 1) + SQRT_SEED;
          it <= '0;
          pa <= ACOS_C[ACOS_TERMS-1];
          jc <= 3'(ACOS_TERMS - 2);
          if (fp_rsp.add_y[30:23] == 8'd0 || fp_rsp.add_y[31]) begin
            r     <= FP_ZERO;          // |x| >= 1: arccos is 0 (or pi)
            state <= S_FIX;
          end else begin
            state <= S_NDIV;
          end
        end
        S_NDIV: begin
          q     <= fp_rsp.div_y;
          state <= S_NADD;
        end
        S_NADD: begin
          q     <= fp_rsp.add_y;
          state <= S_NMUL;
        end
        S_NMUL: begin
          s <= fp_rsp.mul_y;
          if (it == 2'(NEWTON_ITERS - 1)) begin
            state <= S_PMUL;
          end else begin
            it    <= it + 2'd1;
            state <= S_NDIV;
          end
        end
        S_PMUL: begin
          pa    <= fp_rsp.mul_y;
          state <= S_PADD;
        end
        S_PADD: begin
          pa <= fp_rsp.add_y;
          if (jc == 3'd0) begin
            state <= S_RMUL;
          end else begin
            jc    <= jc - 3'd1;
            state <= S_PMUL;
          end
        end
        S_RMUL: begin
          r     <= fp_rsp.mul_y;
          state <= S_FIX;
        end
        S_FIX: begin
          lsf[i] <= neg ? fp_rsp.add_y : r;
          if (i + PW'(1) == cnt) begin
            state <= S_DONE;
          end else begin
            i     <= i + PW'(1);
            state <= S_LOAD;
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
  iters_fit: assert property (@(posedge clk) 1'b1 |-> (NEWTON_ITERS >= 1 && NEWTON_ITERS <= 4));

endmodule
