// fp_ref_pkg: reference model of binary32 arithmetic for the testbenches.
//
// Operands are widened exactly to double precision, the operation is done
// in double precision by the simulator, and the result is rounded once to
// binary32 (nearest, ties to even). For +, -, * and / a double-precision
// intermediate followed by one rounding gives the correctly rounded
// single-precision result, so the model is independent of the RTL. It
// follows the same number conventions as the RTL: subnormals read and
// written as zero, canonical quiet NaN.
package fp_ref_pkg;

  function automatic real to_real(logic [31:0] x);
    logic [10:0] e;
    if (x[30:23] == 8'd0) return $bitstoreal({x[31], 63'd0});
    e = 11'(x[30:23]) - 11'd127 + 11'd1023;
    if (x[30:23] == 8'hFF) e = 11'h7FF;
    return $bitstoreal({x[31], e, x[22:0], 29'd0});
  endfunction

  function automatic logic [31:0] to_fp32(real r);
    logic [63:0] d;
    logic [52:0] m53;
    logic [24:0] m;
    int es;
    d = $realtobits(r);
    if (d[62:52] == 11'h7FF) return (d[51:0] != 0) ? 32'h7FC0_0000 : {d[63], 8'hFF, 23'd0};
    if (d[62:52] == 11'd0) return {d[63], 31'd0};
    es  = int'(d[62:52]) - 1023 + 127;
    m53 = {1'b1, d[51:0]};
    m   = {1'b0, m53[52:29]};
    if (m53[28] && ((m53[27:0] != 0) || m53[29])) m = m + 25'd1;
    if (m[24]) begin
      m  = m >> 1;
      es = es + 1;
    end
    if (es >= 255) return {d[63], 8'hFF, 23'd0};
    if (es <= 0) return {d[63], 31'd0};
    return {d[63], es[7:0], m[22:0]};
  endfunction

  // Random normal number with an exponent within +-span of 2^0.
  function automatic logic [31:0] rand_fp32(int span);
    int e;
    e = 127 - span + int'($urandom_range(2 * span, 0));
    return {1'($urandom), e[7:0], 23'($urandom)};
  endfunction

endpackage
