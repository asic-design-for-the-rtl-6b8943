// clenshaw: evaluates a Chebyshev series y = sum_{j=0..n} c[j] T_j(x) with
// Clenshaw's recurrence.
//
//   b(n+1) = b(n+2) = 0
//   b(j)   = 2x * b(j+1) - b(j+2) + c[j]     for j = n .. 1
//   y      = x * b(1) - b(2) + c[0]
//
// Each of the n + 1 steps takes one multiplication and two additions on
// the shared floating point units (three states, one operation each); 2x is
// formed once at the start as x + x. A pulse on start latches x and n;
// done pulses 3n + 5 cycles after the accepting edge with y valid from then until the next
// start. The coefficient array must stay stable while busy.
//
// The recurrence and its cost of n multiplications and 2n additions per
// evaluation follow the design; the state schedule is this implementation's.
module clenshaw
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
  input  logic [PW-1:0] n,
  input  fp32_t         x,
  input  fp32_t         coef [NC],
  output fp32_t         y,
  output logic          busy,
  output logic          done,
  output fp_req_t       fp_req,
  input  fp_rsp_t       fp_rsp
);

  typedef enum logic [2:0] {S_IDLE, S_TWOX, S_MUL, S_SUB, S_ADD, S_DONE} state_t;

  state_t        state;
  logic [PW-1:0] j;
  fp32_t         xr, tx, b1, b2, t;

  assign busy = (state != S_IDLE);

  // In the last step (j = 0) the multiplier is x instead of 2x.
  always_comb begin
    fp_req = '0;
    case (state)
      S_TWOX: begin
        fp_req.add_a = xr;
        fp_req.add_b = xr;
      end
      S_MUL: begin
        fp_req.mul_a = (j == '0) ? xr : tx;
        fp_req.mul_b = b1;
      end
      S_SUB: begin
        fp_req.add_a = t;
        fp_req.add_b = fp_neg(b2);
      end
      S_ADD: begin
        fp_req.add_a = t;
        fp_req.add_b = coef[IW'(j)];
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      done  <= 1'b0;
      j     <= '0;
      xr    <= FP_ZERO;
      tx    <= FP_ZERO;
      b1    <= FP_ZERO;
      b2    <= FP_ZERO;
      t     <= FP_ZERO;
      y     <= FP_ZERO;
    end else begin
      done <= 1'b0;
      case (state)
        S_IDLE:
          if (start) begin
            xr    <= x;
            j     <= n;
            b1    <= FP_ZERO;
            b2    <= FP_ZERO;
            state <= S_TWOX;
          end
        S_TWOX: begin
          tx    <= fp_rsp.add_y;
          state <= S_MUL;
        end
        S_MUL: begin
          t     <= fp_rsp.mul_y;
          state <= S_SUB;
        end
        S_SUB: begin
          t     <= fp_rsp.add_y;
          state <= S_ADD;
        end
        S_ADD: begin
          if (j == '0) begin
            y     <= fp_rsp.add_y;
            state <= S_DONE;
          end else begin
            b2    <= b1;
            b1    <= fp_rsp.add_y;
            j     <= j - PW'(1);
            state <= S_MUL;
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

endmodule
