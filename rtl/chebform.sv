// chebform: rewrites the two deflated polynomials as Chebyshev series.
//
// A symmetric polynomial G(z) of order 2M with g[0] = 1 equals, on the unit
// circle and after removing its linear phase, the series
//   G(x) = 2 T_M(x) + 2 g[1] T_{M-1}(x) + ... + 2 g[M-1] T_1(x) + g[M],
// with x = cos(w). The entity produces the series coefficient c[j] of T_j:
//   c[M-k] = 2 g[k] for k = 0 .. M-1,   c[0] = g[M].
//
// Both polynomials are handled in the same pass: in cycle k the series of
// G1 is doubled on the shared multiplier (times 2.0) while the series of G2
// is doubled on the shared adder (g + g), so one step per index serves both.
// A pulse on start latches m1, m2 (orders M1, M2 of the series); done pulses
// max(M1, M2) + 2 cycles after the edge that accepted it. Entries above M read as zero.
//
// Being given both coefficient sets and working on them side by side follows
// the design; the split of the doublings between multiplier and adder is this
// implementation's choice.
module chebform
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
  input  logic [PW-1:0] m1,
  input  logic [PW-1:0] m2,
  input  fp32_t         g1 [NC],
  input  fp32_t         g2 [NC],
  output fp32_t         c1 [NC],
  output fp32_t         c2 [NC],
  output logic          busy,
  output logic          done,
  output fp_req_t       fp_req,
  input  fp_rsp_t       fp_rsp
);

  typedef enum logic [1:0] {S_IDLE, S_STEP, S_DONE} state_t;

  state_t        state;
  logic [PW-1:0] n1, n2, k, kmax;

  assign busy = (state != S_IDLE);

  always_comb begin
    fp_req = '0;
    if (state == S_STEP) begin
      fp_req.mul_a = g1[IW'(k)];
      fp_req.mul_b = FP_TWO;
      fp_req.add_a = g2[IW'(k)];
      fp_req.add_b = g2[IW'(k)];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      done  <= 1'b0;
      n1    <= '0;
      n2    <= '0;
      k     <= '0;
      kmax  <= '0;
      for (int i = 0; i < NC; i++) begin
        c1[i] <= FP_ZERO;
        c2[i] <= FP_ZERO;
      end
    end else begin
      done <= 1'b0;
      case (state)
        S_IDLE:
          if (start) begin
            n1   <= m1;
            n2   <= m2;
            kmax <= (m1 > m2) ? m1 : m2;
            k    <= '0;
            for (int i = 0; i < NC; i++) begin
              c1[i] <= FP_ZERO;
              c2[i] <= FP_ZERO;
            end
            state <= S_STEP;
          end
        S_STEP: begin
          if (k < n1)       c1[IW'(n1 - k)] <= fp_rsp.mul_y;
          else if (k == n1) c1[0]      <= g1[IW'(k)];
          if (k < n2)       c2[IW'(n2 - k)] <= fp_rsp.add_y;
          else if (k == n2) c2[0]      <= g2[IW'(k)];
          if (k == kmax) state <= S_DONE;
          else           k     <= k + PW'(1);
        end
        default: begin
          done  <= 1'b1;
          state <= S_IDLE;
        end
      endcase
    end
  end

  start_while_busy: assert property (@(posedge clk) disable iff (!rst_n) start |-> !busy);

endmodule
