// tb_bench_proc: self-checking testbench of the benchmark process for all
// four operations (binary32 +, *, / and integer +). For each request (s, n) it computes the expected sol by
// repeating the reference operation n times, and checks both the value and
// the time: n*LAT + 1 cycles from the accepting edge to a valid reply,
// i.e. LAT cycles per dependent operation (5 for + and *, 29 for /, 2 for
// integer +).
module tb_bench_proc;
  import fp32_pkg::*;
  import fp_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  int checks = 0, failures = 0;

  logic        in_valid [4];
  logic        in_ready [4];
  fp32_t       in_s     [4];
  logic [31:0] in_n     [4];
  logic        out_valid[4];
  logic        out_ready[4];
  fp32_t       out_sol  [4];

  bench_proc #(.OP(OP_ADD)) dut_add (.clk, .rst_n, .in_valid(in_valid[0]), .in_ready(in_ready[0]),
    .in_s(in_s[0]), .in_n(in_n[0]), .out_valid(out_valid[0]), .out_ready(out_ready[0]), .out_sol(out_sol[0]));
  bench_proc #(.OP(OP_MUL)) dut_mul (.clk, .rst_n, .in_valid(in_valid[1]), .in_ready(in_ready[1]),
    .in_s(in_s[1]), .in_n(in_n[1]), .out_valid(out_valid[1]), .out_ready(out_ready[1]), .out_sol(out_sol[1]));
  bench_proc #(.OP(OP_DIV)) dut_div (.clk, .rst_n, .in_valid(in_valid[2]), .in_ready(in_ready[2]),
    .in_s(in_s[2]), .in_n(in_n[2]), .out_valid(out_valid[2]), .out_ready(out_ready[2]), .out_sol(out_sol[2]));
  bench_proc #(.OP(OP_IADD)) dut_iadd (.clk, .rst_n, .in_valid(in_valid[3]), .in_ready(in_ready[3]),
    .in_s(in_s[3]), .in_n(in_n[3]), .out_valid(out_valid[3]), .out_ready(out_ready[3]), .out_sol(out_sol[3]));

  always #5 clk = ~clk;

  function automatic fp32_t model(int k, fp32_t s, int n);
    fp32_t r;
    r = (k == 0 || k == 3) ? FP_ZERO : FP_ONE;
    for (int i = 0; i < n; i++) begin
      case (k)
        0: r = to_fp32(to_real(r) + to_real(s));
        1: r = to_fp32(to_real(r) * to_real(s));
        3: r = r + s;
        default: r = to_fp32(to_real(r) / to_real(s));
      endcase
    end
    return r;
  endfunction

  task automatic run(int k, fp32_t s, int n);
    int lat, cyc;
    fp32_t e;
    lat = (k == 0) ? int'(ADD_LAT) : (k == 1) ? int'(MUL_LAT) : (k == 2) ? int'(DIV_LAT) : int'(IADD_LAT);
    e = model(k, s, n);
    in_s[k] <= s; in_n[k] <= n; in_valid[k] <= 1'b1;
    do @(posedge clk); while (!in_ready[k]);   // accepted on this edge
    in_valid[k] <= 1'b0;
    cyc = 0;
    do begin
      @(posedge clk);
      #1;
      cyc++;
    end while (!out_valid[k] && cyc < 100000);
    checks++;
    if (out_sol[k] !== e) begin
      failures++;
      $display("op %0d s=%h n=%0d: got %h expected %h", k, s, n, out_sol[k], e);
    end
    checks++;
    if (cyc != n * lat + 1) begin
      failures++;
      $display("op %0d n=%0d: %0d cycles, expected %0d", k, n, cyc, n * lat + 1);
    end
    out_ready[k] <= 1'b1;
    @(posedge clk);
    out_ready[k] <= 1'b0;
  endtask

  initial begin
    for (int k = 0; k < 4; k++) begin
      in_valid[k] = 1'b0; out_ready[k] = 1'b0; in_s[k] = '0; in_n[k] = '0;
    end
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    run(0, 32'h3DCC_CCCD, 100);      // 100 x 0.1
    run(0, 32'h3F80_0000, 1);
    run(0, 32'h4049_0FDB, 0);
    run(1, 32'h3F80_0001, 100);      // (1+ulp)^100
    run(1, 32'hBF00_0000, 7);
    run(2, 32'h3F8C_CCCD, 30);       // 1.1^-30
    run(2, 32'h4040_0000, 3);
    run(3, 32'd123456, 1000);
    run(3, 32'hFFFF_FFF0, 17);
    run(3, 32'd5, 1);
    for (int i = 0; i < 20; i++) begin
      run(i % 4, rand_fp32(1), int'($urandom_range(40, 1)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
