// atopq: forms the symmetric and antisymmetric polynomials of an LP filter.
//
// With A(z) = 1 - sum_{k=1..P} a(k) z^-k, the entity computes
//   F1(z) = A(z) + z^-(P+1) A(z^-1)   (symmetric)
//   F2(z) = A(z) - z^-(P+1) A(z^-1)   (antisymmetric)
// Both have P+2 coefficients and a mirror symmetry, so only the first half,
// k = 0 .. floor((P+1)/2), is produced:
//   f1[k] = -a(k) - a(P+1-k),   f2[k] = a(P+1-k) - a(k),   f1[0] = f2[0] = 1.
// These are exactly the coefficients the later deflation and Chebyshev steps
// read.
//
// Sequencing: a state machine in the style of all the design's entities. A
// one-cycle pulse on start (while not busy) latches the order P (2..PMAX);
// each coefficient index k then takes two states, one addition each on the
// shared floating point adder (operand negation is a sign-bit flip), with
// the sum registered on the edge that leaves the state. done pulses for one
// cycle when f1/f2 are complete, 2*floor((P+1)/2) + 1 cycles after the
// clock edge that accepted start.
// Entries above floor((P+1)/2) read as zero.
//
// The entity name, its function and the START/DONE arbitration follow the
// design; the half-length output, the two-states-per-index schedule and
// the reset values are this implementation's choices.
module atopq
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
  input  logic [PW-1:0] p_order,
  input  fp32_t         a_coef [PMAX],   // a_coef[k-1] = a(k)
  output fp32_t         f1 [NC],
  output fp32_t         f2 [NC],
  output logic          busy,
  output logic          done,
  output fp_req_t       fp_req,
  input  fp_rsp_t       fp_rsp
);

  typedef enum logic [1:0] {S_IDLE, S_SUM, S_DIFF, S_DONE} state_t;

  state_t        state;
  logic [PW-1:0] p, k, nh;

  assign busy = (state != S_IDLE);

  always_comb begin
    fp_req = '0;
    case (state)
      S_SUM: begin
        fp_req.add_a = fp_neg(a_coef[k - PW'(1)]);
        fp_req.add_b = fp_neg(a_coef[p - k]);
      end
      S_DIFF: begin
        fp_req.add_a = a_coef[p - k];
        fp_req.add_b = fp_neg(a_coef[k - PW'(1)]);
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      done  <= 1'b0;
      p     <= '0;
      k     <= '0;
      nh    <= '0;
      for (int i = 0; i < NC; i++) begin
        f1[i] <= FP_ZERO;
        f2[i] <= FP_ZERO;
      end
    end else begin
      done <= 1'b0;
      case (state)
        S_IDLE:
          if (start) begin
            p  <= p_order;
            nh <= PW'((p_order + PW'(1)) >> 1);
            k  <= PW'(1);
            for (int i = 0; i < NC; i++) begin
              f1[i] <= (i == 0) ? FP_ONE : FP_ZERO;
              f2[i] <= (i == 0) ? FP_ONE : FP_ZERO;
            end
            state <= S_SUM;
          end
        S_SUM: begin
          f1[IW'(k)] <= fp_rsp.add_y;
          state <= S_DIFF;
        end
        S_DIFF: begin
          f2[IW'(k)] <= fp_rsp.add_y;
          if (k == nh) begin
            state <= S_DONE;
          end else begin
            k     <= k + PW'(1);
            state <= S_SUM;
          end
        end
        S_DONE: begin
          done  <= 1'b1;
          state <= S_IDLE;
        end
      endcase
    end
  end

  start_while_busy: assert property (@(posedge clk) disable iff (!rst_n) start |-> !busy);
  order_in_range: assert property (@(posedge clk) disable iff (!rst_n)
                                   (start && !busy) |-> (p_order >= PW'(2) && p_order <= PW'(PMAX)));

endmodule
