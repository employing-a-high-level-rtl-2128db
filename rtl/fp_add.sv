// fp_add: single-precision floating-point adder with a fixed latency.
//
// The sum is formed in one combinational step (align the smaller operand
// with guard, round and sticky bits, add or subtract the significands,
// normalise, round to nearest even) and then carried through LAT register
// stages, so a new pair can be accepted every cycle and every result
// appears exactly LAT cycles after its operands. The default of 5 cycles
// is the worst-case time per addition assumed for the accelerator's
// 100 MHz clock; the way the latency is spent (one logic step followed by
// a delay line) is this design's own simple choice.
//
// Interface: in_valid/a/b sampled on a rising edge; out_valid/y valid
// LAT edges later. sub=1 computes a-b. Subnormals are treated as zero.
module fp_add
  import fp32_pkg::*;
#(
  parameter int unsigned LAT = ADD_LAT
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  fp32_t a,
  input  fp32_t b,
  input  logic  sub,
  output logic  out_valid,
  output fp32_t y
);

  fp32_t sum;

  always_comb begin
    fp32_t bb, big, sml;
    logic [23:0] mbig, msmall;
    logic [7:0]  d;
    logic [49:0] sh;
    logic [26:0] al_big, al_small;
    logic [27:0] s;
    logic signed [10:0] e;
    logic [4:0] lz;

    bb = {b[31] ^ sub, b[30:0]};
    big = a;
    sml = bb;
    mbig = '0;
    msmall = '0;
    d = '0;
    sh = '0;
    al_big = '0;
    al_small = '0;
    e = '0;
    s = '0;
    lz = '0;
    sum = FP_ZERO;
    if (is_nan(a) || is_nan(bb) || (is_inf(a) && is_inf(bb) && (a[31] != bb[31]))) begin
      sum = FP_QNAN;
    end else if (is_inf(a)) begin
      sum = a;
    end else if (is_inf(bb)) begin
      sum = bb;
    end else if (is_zero(a) && is_zero(bb)) begin
      sum = {a[31] & bb[31], 31'd0};
    end else if (is_zero(a)) begin
      sum = bb;
    end else if (is_zero(bb)) begin
      sum = a;
    end else begin
      if (a[30:0] >= bb[30:0]) begin
        big = a;  sml = bb;
      end else begin
        big = bb; sml = a;
      end
      mbig   = {1'b1, big[22:0]};
      msmall = {1'b1, sml[22:0]};
      d = big[30:23] - sml[30:23];
      al_big = {mbig, 3'b000};
      if (d >= 8'd27) begin
        al_small = 27'd1;
      end else begin
        sh = {msmall, 26'd0} >> d;
        al_small = {sh[49:24], |sh[23:0]};
      end
      e = 11'(big[30:23]);
      if (big[31] == sml[31]) begin
        s = {1'b0, al_big} + {1'b0, al_small};
        if (s[27]) begin
          s = {1'b0, s[27:2], s[1] | s[0]};
          e = e + 11'sd1;
        end
      end else begin
        s = {1'b0, al_big} - {1'b0, al_small};
      end
      if (s == '0) begin
        sum = FP_ZERO;
      end else begin
        lz = '0;
        for (int i = 26; i >= 0; i--) begin
          if (s[i]) begin
            lz = 5'(26 - i);
            break;
          end
        end
        s = s << lz;
        e = e - 11'(lz);
        sum = round_pack(big[31], e, s[26:3], s[2], |s[1:0]);
      end
    end
  end

  // Delay line that gives the unit its fixed latency.
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
      y_q[0] <= sum;
      for (int i = 1; i < int'(LAT); i++) begin
        v_q[i] <= v_q[i-1];
        y_q[i] <= y_q[i-1];
      end
    end
  end

  assign out_valid = v_q[LAT-1];
  assign y         = y_q[LAT-1];

endmodule
