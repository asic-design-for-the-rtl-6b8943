// polydiv: removes the trivial roots at z = +1 / z = -1 from one polynomial.
//
// The divisor is chosen by the selector mode (defl_t):
//   DEFL_P1  G = F / (1 + z^-1):  g[k] = f[k] - g[k-1]
//   DEFL_M1  G = F / (1 - z^-1):  g[k] = f[k] + g[k-1]
//   DEFL_M2  G = F / (1 - z^-2):  g[k] = f[k] + g[k-2]
//   DEFL_NONE G = F:              g[k] = f[k]
// with g[0] = f[0]. For an even LP order P the symmetric polynomial uses
// DEFL_P1 and the antisymmetric one DEFL_M1; for odd P they use DEFL_NONE
// and DEFL_M2. Because G is symmetric of order 2M, only g[0..M] is
// computed, from f[0..M]; m_len gives M.
//
// One polynomial is processed per run, one coefficient per clock cycle,
// each with one addition on the shared adder (DEFL_NONE adds zero). A pulse
// on start latches mode and m_len; done pulses M + 1 cycles after the edge that accepted it. Entries
// above M read as zero.
//
// One polynomial at a time with a selector for the root to remove follows
// the design; the single-state-per-coefficient schedule and the handling of
// odd orders through DEFL_NONE/DEFL_M2 are this implementation's choices.
module polydiv
  import lsf_pkg::*;
#(
  parameter int PMAX = 12,
  localparam int NC = PMAX / 2 + 1,
  localparam int PW = $clog2(PMAX + 1),
  localparam int IW = $clog2(NC)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  defl_t         mode,
  input  logic [PW-1:0] m_len,
  input  fp32_t         f [NC],
  output fp32_t         g [NC],
  output logic          busy,
  output logic          done,
  output fp_req_t       fp_req,
  input  fp_rsp_t       fp_rsp
);

  typedef enum logic [1:0] {S_IDLE, S_STEP, S_DONE} state_t;

  state_t        state;
  defl_t         md;
  logic [PW-1:0] m, k;

  assign busy = (state != S_IDLE);

  always_comb begin
    fp_req = '0;
    if (state == S_STEP) begin
      fp_req.add_a = f[IW'(k)];
      case (md)
        DEFL_P1: fp_req.add_b = fp_neg(g[IW'(k - PW'(1))]);
        DEFL_M1: fp_req.add_b = g[IW'(k - PW'(1))];
        DEFL_M2: fp_req.add_b = (k >= PW'(2)) ? g[IW'(k - PW'(2))] : FP_ZERO;
        default: fp_req.add_b = FP_ZERO;
      endcase
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      done  <= 1'b0;
      md    <= DEFL_NONE;
      m     <= '0;
      k     <= '0;
      for (int i = 0; i < NC; i++) g[i] <= FP_ZERO;
    end else begin
      done <= 1'b0;
      case (state)
        S_IDLE:
          if (start) begin
            md <= mode;
            m  <= m_len;
            k  <= PW'(1);
            for (int i = 0; i < NC; i++) g[i] <= (i == 0) ? f[0] : FP_ZERO;
            state <= S_STEP;
          end
        S_STEP: begin
          g[IW'(k)] <= fp_rsp.add_y;
          if (k == m) state <= S_DONE;
          else        k     <= k + PW'(1);
        end
        default: begin
          done  <= 1'b1;
          state <= S_IDLE;
        end
      endcase
    end
  end

  start_while_busy: assert property (@(posedge clk) disable iff (!rst_n) start |-> !busy);
  length_in_range: assert property (@(posedge clk) disable iff (!rst_n)
                                    (start && !busy) |-> (m_len >= PW'(1) && m_len < PW'(NC)));

endmodule
