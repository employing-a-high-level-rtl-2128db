// bench_proc: benchmark hardware process that repeats one floating-point
// operation.
//
// A request on the input stream carries a binary32 value s and a count n.
// The process sets sol to the identity of its operation (0 for addition,
// 1 for multiplication and division) and then performs sol = sol OP s
// n times, each step depending on the previous one, and sends sol back on
// the output stream. Because every step waits for the previous result,
// the time per operation is the latency of the arithmetic unit: 5 cycles
// for + and *, 29 cycles for /. The integer variant (OP_IADD) adds 32-bit
// integers in a 2-cycle loop step, the time one step of a loop with an
// integer addition takes on this fabric (the addition overlaps the loop
// bookkeeping). The next step is issued in the same cycle
// the previous result appears, so a request takes n*LAT + 1 cycles from
// its acceptance to a valid result. Several of these processes, each with
// its own input and output stream, run side by side in rpu_top to measure
// parallel speed-up.
//
// The (s, n) request and sol reply follow the benchmark as described; the
// identity start value, the valid/ready stream handshake and the
// compile-time choice of the operation (parameter OP) are this design's
// own choices.
module bench_proc
  import fp32_pkg::*;
#(
  parameter bench_op_e OP = OP_ADD
) (
  input  logic        clk,
  input  logic        rst_n,
  // request stream: s and n
  input  logic        in_valid,
  output logic        in_ready,
  input  fp32_t       in_s,
  input  logic [31:0] in_n,
  // reply stream: sol
  output logic        out_valid,
  input  logic        out_ready,
  output fp32_t       out_sol
);

  typedef enum logic [1:0] {S_IDLE, S_ISSUE, S_WAIT, S_REPLY} state_e;

  state_e      state;
  fp32_t       s_q, sol;
  logic [31:0] left;          // operations still to complete

  logic  u_in_valid, u_out_valid, u_ready;
  fp32_t u_a, u_y;

  // Issue on entry to the loop, and again in the cycle a result returns
  // while more operations remain.
  assign u_in_valid = (state == S_ISSUE) ||
                      (state == S_WAIT && u_out_valid && left != 32'd1);
  assign u_a        = (state == S_WAIT && u_out_valid) ? u_y : sol;

  generate
    if (OP == OP_ADD) begin : g_add
      fp_add u_op (.clk, .rst_n, .in_valid(u_in_valid), .a(u_a), .b(s_q),
                   .sub(1'b0), .out_valid(u_out_valid), .y(u_y));
      assign u_ready = 1'b1;
    end else if (OP == OP_MUL) begin : g_mul
      fp_mul u_op (.clk, .rst_n, .in_valid(u_in_valid), .a(u_a), .b(s_q),
                   .out_valid(u_out_valid), .y(u_y));
      assign u_ready = 1'b1;
    end else if (OP == OP_DIV) begin : g_div
      fp_div u_op (.clk, .rst_n, .in_valid(u_in_valid), .in_ready(u_ready),
                   .a(u_a), .b(s_q), .out_valid(u_out_valid), .y(u_y));
    end else begin : g_iadd
      // Integer addition: add, then one register for the loop test.
      logic        v1, v2;
      logic [31:0] y1, y2;
      always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n) begin
          v1 <= 1'b0; v2 <= 1'b0; y1 <= '0; y2 <= '0;
        end else begin
          v1 <= u_in_valid; y1 <= u_a + s_q;
          v2 <= v1;         y2 <= y1;
        end
      end
      assign u_out_valid = v2;
      assign u_y         = y2;
      assign u_ready     = 1'b1;
    end
  endgenerate

  assign in_ready  = (state == S_IDLE);
  assign out_valid = (state == S_REPLY);
  assign out_sol   = sol;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      s_q   <= FP_ZERO;
      sol   <= FP_ZERO;
      left  <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (in_valid) begin
          s_q   <= in_s;
          sol   <= (OP == OP_ADD || OP == OP_IADD) ? FP_ZERO : FP_ONE;
          left  <= in_n;
          state <= (in_n == '0) ? S_REPLY : S_ISSUE;
        end
        S_ISSUE: state <= S_WAIT;
        S_WAIT: if (u_out_valid) begin
          sol  <= u_y;
          left <= left - 32'd1;
          if (left == 32'd1) state <= S_REPLY;
        end
        S_REPLY: if (out_ready) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  a_unit_ready: assert property (@(posedge clk) disable iff (!rst_n)
                                 u_in_valid |-> u_ready)
    else $error("bench_proc: arithmetic unit busy at issue");

endmodule
