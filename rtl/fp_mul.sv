// fp_mul: single-precision floating-point multiplier with a fixed latency.
//
// The 24x24-bit significand product is normalised by at most one place,
// rounded to nearest even and packed in one combinational step, then
// carried through LAT register stages. A new pair is accepted every cycle
// and each result appears exactly LAT cycles later. The default latency of
// 5 cycles matches the per-operation time assumed for addition and
// multiplication on the accelerator; the delay-line structure is this
// design's own choice.
//
// Interface: in_valid/a/b sampled on a rising edge; out_valid/y valid LAT
// edges later. Subnormals are treated as zero.
module fp_mul
  import fp32_pkg::*;
#(
  parameter int unsigned LAT = MUL_LAT
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  fp32_t a,
  input  fp32_t b,
  output logic  out_valid,
  output fp32_t y
);

  fp32_t prod;

  always_comb begin
    logic        s;
    logic [47:0] p;
    logic signed [10:0] e;
    s = a[31] ^ b[31];
    p = '0;
    e = '0;
    if (is_nan(a) || is_nan(b) || (is_inf(a) && is_zero(b)) || (is_zero(a) && is_inf(b))) begin
      prod = FP_QNAN;
    end else if (is_inf(a) || is_inf(b)) begin
      prod = {s, 8'hFF, 23'd0};
    end else if (is_zero(a) || is_zero(b)) begin
      prod = {s, 31'd0};
    end else begin
      p = {1'b1, a[22:0]} * {1'b1, b[22:0]};
      e = 11'(a[30:23]) + 11'(b[30:23]) - 11'sd127;
      if (p[47]) prod = round_pack(s, e + 11'sd1, p[47:24], p[23], |p[22:0]);
      else       prod = round_pack(s, e, p[46:23], p[22], |p[21:0]);
    end
  end

  logic  v_q [LAT];
  fp32_t y_q [LAT];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < int'(LAT); i++) begin
        v_q[i] <= 1'b0;
        y_q[i] <= FP_ZERO;
      end
    end else begin
      v_q[0] <= in_valid;
      y_q[0] <= prod;
      for (int i = 1; i < int'(LAT); i++) begin
        v_q[i] <= v_q[i-1];
        y_q[i] <= y_q[i-1];
      end
    end
  end

  assign out_valid = v_q[LAT-1];
  assign y         = y_q[LAT-1];

endmodule
