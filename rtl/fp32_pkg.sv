// fp32_pkg: types and constants shared by the single-precision arithmetic
// units, the benchmark processes and the Gauss-Seidel preconditioner.
//
// All arithmetic in this design is IEEE-754 binary32 (single precision),
// as the accelerator described here uses single precision throughout.
// Number handling shared by every unit (a choice of this design, not
// prescribed elsewhere): round to nearest, ties to even; subnormal inputs
// are read as zero and subnormal results are flushed to signed zero; any
// NaN result is the canonical quiet NaN 0x7FC00000.
package fp32_pkg;

  typedef logic [31:0] fp32_t;

  localparam fp32_t FP_ZERO = 32'h0000_0000;
  localparam fp32_t FP_ONE  = 32'h3F80_0000;
  localparam fp32_t FP_QNAN = 32'h7FC0_0000;
  localparam fp32_t FP_PINF = 32'h7F80_0000;

  // Latencies of the arithmetic units in clock cycles (100 MHz clock).
  localparam int unsigned ADD_LAT = 5;
  localparam int unsigned MUL_LAT = 5;
  localparam int unsigned DIV_LAT = 29;
  // Cycles per iteration of a loop doing one integer addition.
  localparam int unsigned IADD_LAT = 2;

  // Operation applied repeatedly by a benchmark process.
  // OP_IADD treats s and sol as 32-bit two's-complement integers.
  typedef enum logic [1:0] {OP_ADD = 2'd0, OP_MUL = 2'd1, OP_DIV = 2'd2,
                            OP_IADD = 2'd3} bench_op_e;

  // Unpacked view of a binary32 value.
  typedef struct packed {
    logic       sign;
    logic [7:0] exp;
    logic [22:0] frac;
  } fp32_s;

  function automatic logic is_nan(fp32_t x);
    return (x[30:23] == 8'hFF) && (x[22:0] != '0);
  endfunction

  function automatic logic is_inf(fp32_t x);
    return (x[30:23] == 8'hFF) && (x[22:0] == '0);
  endfunction

  // Zero or subnormal (subnormals are treated as zero).
  function automatic logic is_zero(fp32_t x);
    return x[30:23] == 8'h00;
  endfunction

  // Round a normalised significand with guard and sticky bits to nearest
  // even and pack it. mant holds the hidden bit in bit 23; exp is the
  // biased exponent before rounding (may be out of range).
  function automatic fp32_t round_pack(logic sign, logic signed [10:0] exp,
                                       logic [23:0] mant, logic guard,
                                       logic sticky);
    logic [24:0] m;
    logic signed [10:0] e;
    m = {1'b0, mant} + {24'd0, guard & (sticky | mant[0])};
    e = exp;
    if (m[24]) begin
      m = m >> 1;
      e = e + 11'sd1;
    end
    if (e >= 11'sd255) return {sign, 8'hFF, 23'd0};
    if (e <= 11'sd0)   return {sign, 31'd0};
    return {sign, e[7:0], m[22:0]};
  endfunction

endpackage
