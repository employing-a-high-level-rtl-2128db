// fp_div: single-precision floating-point divider, iterative and not
// pipelined.
//
// A division takes exactly LAT = 29 cycles, the worst-case division time
// assumed for the accelerator, and the unit accepts no new operands while
// it is busy: this is the non-pipelined divider that limits the issue rate
// of the stencil datapath. Inside, the quotient of the two significands is
// produced by restoring division, one bit per cycle: the first cycle
// unpacks the operands, the next 26 produce 26 quotient bits (an integer
// bit, 23 fraction bits and the guard bits), the remaining cycles
// normalise and round to nearest even. The bit-serial method is this
// design's own choice.
//
// Interface: in_valid/a/b are taken on a rising edge when in_ready is
// high; out_valid pulses with y = a/b in the LAT-th cycle after that edge,
// and in that same cycle in_ready is high again, so back-to-back divisions
// start every LAT cycles; y holds its value until the next result. Subnormals are treated
// as zero.
module fp_div
  import fp32_pkg::*;
#(
  parameter int unsigned LAT = DIV_LAT
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  output logic  in_ready,
  input  fp32_t a,
  input  fp32_t b,
  output logic  out_valid,
  output fp32_t y
);

  localparam int unsigned QBITS = 26;

  typedef enum logic [1:0] {S_IDLE, S_ITER, S_WAIT} state_e;

  state_e              state;
  logic [5:0]          cnt;       // cycles since the operands were taken
  logic                special;   // result decided without iterating
  fp32_t               special_y;
  logic                q_sign;
  logic signed [10:0]  q_exp;
  logic [24:0]         rem;
  logic [23:0]         divisor;
  logic [QBITS-1:0]    q;
  fp32_t               result;

  // Normalise and round the finished quotient.
  always_comb begin
    if (special) begin
      result = special_y;
    end else if (q[QBITS-1]) begin
      result = round_pack(q_sign, q_exp, q[25:2], q[1], q[0] | (rem != '0));
    end else begin
      result = round_pack(q_sign, q_exp - 11'sd1, q[24:1], q[0], rem != '0);
    end
  end

  assign in_ready = (state == S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_IDLE;
      cnt       <= '0;
      special   <= 1'b0;
      special_y <= FP_ZERO;
      q_sign    <= 1'b0;
      q_exp     <= '0;
      rem       <= '0;
      divisor   <= '0;
      q         <= '0;
      out_valid <= 1'b0;
      y         <= FP_ZERO;
    end else begin
      out_valid <= 1'b0;
      unique case (state)
        S_IDLE: begin
          if (in_valid) begin
            q_sign  <= a[31] ^ b[31];
            q_exp   <= 11'(a[30:23]) - 11'(b[30:23]) + 11'sd127;
            rem     <= {1'b0, 1'b1, a[22:0]};
            divisor <= {1'b1, b[22:0]};
            q       <= '0;
            cnt     <= 6'd1;
            special <= 1'b1;
            if (is_nan(a) || is_nan(b) || (is_inf(a) && is_inf(b)) ||
                (is_zero(a) && is_zero(b)))
              special_y <= FP_QNAN;
            else if (is_inf(a) || is_zero(b))
              special_y <= {a[31] ^ b[31], 8'hFF, 23'd0};
            else if (is_zero(a) || is_inf(b))
              special_y <= {a[31] ^ b[31], 31'd0};
            else
              special <= 1'b0;
            state <= S_ITER;
          end
        end
        S_ITER: begin
          // One restoring-division step per cycle.
          if (rem >= {1'b0, divisor}) begin
            rem <= (rem - {1'b0, divisor}) << 1;
            q   <= {q[QBITS-2:0], 1'b1};
          end else begin
            rem <= rem << 1;
            q   <= {q[QBITS-2:0], 1'b0};
          end
          cnt <= cnt + 6'd1;
          if (cnt == 6'(QBITS)) state <= S_WAIT;
        end
        S_WAIT: begin
          cnt <= cnt + 6'd1;
          if (cnt == 6'(LAT - 1)) begin
            y         <= result;
            out_valid <= 1'b1;
            state     <= S_IDLE;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // The divider must not be offered operands while it is busy.
  a_no_overrun: assert property (@(posedge clk) disable iff (!rst_n)
                                 in_valid |-> in_ready)
    else $error("fp_div: operands offered while busy");

endmodule
