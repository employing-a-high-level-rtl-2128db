// tb_bench_sweep: the repeated-operation benchmark through the top level
// at its default parameters.
//
// For n = 100, 10,000 and 1,000,000 operations: 1, 4 and 8 adder processes
// run the same request at the same time, and the multiplier, divider and
// integer-adder processes run their own. Every reply is compared with a binary32
// reference of n dependent operations, every process must answer after
// exactly n*LAT + 1 cycles (LAT = 5 for + and *, 29 for /, 2 for integer
// +), and the time
// per operation at 100 MHz is printed: per process for +, *, /, int +, and per
// addition over all k concurrent adders (ideal speed-up 1/k).
module tb_bench_sweep;
  import fp32_pkg::*;
  import fp_ref_pkg::*;

  localparam int NB = 11;

  logic clk = 1'b0, rst_n = 1'b0;
  int checks = 0, failures = 0;

  logic        coef_valid = 1'b0, coef_ready;
  fp32_t       coef_data = '0;
  logic        sgs_start = 1'b0, sgs_busy, sgs_done;
  logic [11:0] sgs_n = '0;
  logic [26:0] sgs_base = '0;
  logic        mem_req, mem_we;
  logic        mem_ready = 1'b1, mem_rvalid = 1'b0;
  logic [26:0] mem_addr;
  fp32_t       mem_wdata, mem_rdata = '0;
  logic        z_valid, z_ready = 1'b1, z_last;
  fp32_t       z_data;
  logic        bench_in_valid  [NB];
  logic        bench_in_ready  [NB];
  fp32_t       bench_in_s      [NB];
  logic [31:0] bench_in_n      [NB];
  logic        bench_out_valid [NB];
  logic        bench_out_ready [NB];
  fp32_t       bench_out_sol   [NB];

  rpu_top dut (.*);

  always #5 clk = ~clk;

  function automatic fp32_t model(int k, fp32_t s, int n);
    fp32_t r;
    real   x, y;
    r = (k < 8 || k == 10) ? FP_ZERO : FP_ONE;
    y = to_real(s);
    for (int i = 0; i < n; i++) begin
      x = to_real(r);
      r = (k < 8) ? to_fp32(x + y) : (k == 8) ? to_fp32(x * y) :
          (k == 9) ? to_fp32(x / y) : r + s;
    end
    return r;
  endfunction

  // One round: the first n_add adders plus the multiplier and divider.
  task automatic round(int n, int n_add);
    fp32_t s [NB];
    longint fin [NB];
    longint cyc;
    int active;
    fp32_t add_ref;
    s[0] = 32'h3C23_D70A;                     // 0.01
    for (int k = 1; k < 8; k++) s[k] = s[0];
    s[8] = 32'h3F80_0008;                     // 1 + 8 ulp
    s[9] = 32'h3F80_0004;                     // 1 + 4 ulp
    s[10] = 32'd1234;                         // integer
    add_ref = model(0, s[0], n);
    for (int k = 0; k < NB; k++) begin
      fin[k] = -1;
      bench_in_s[k] <= s[k];
      bench_in_n[k] <= n;
      bench_in_valid[k] <= (k < n_add) || (k >= 8);
    end
    @(posedge clk);
    for (int k = 0; k < NB; k++) bench_in_valid[k] <= 1'b0;
    cyc = 0;
    active = n_add + 3;
    while (active > 0 && cyc < 40_000_000) begin
      @(posedge clk);
      #1;
      cyc++;
      for (int k = 0; k < NB; k++)
        if (bench_out_valid[k] && fin[k] < 0) begin
          fin[k] = cyc;
          active--;
        end
    end
    for (int k = 0; k < NB; k++) begin
      int lat;
      if (k < 8 && k >= n_add) continue;
      lat = (k < 8) ? int'(ADD_LAT) : (k == 8) ? int'(MUL_LAT) :
            (k == 9) ? int'(DIV_LAT) : int'(IADD_LAT);
      checks++;
      if (bench_out_sol[k] !== ((k < 8) ? add_ref : model(k, s[k], n))) begin
        failures++;
        $display("n=%0d process %0d: sol %h wrong", n, k, bench_out_sol[k]);
      end
      checks++;
      if (fin[k] != longint'(n) * lat + 1) begin
        failures++;
        $display("n=%0d process %0d: %0d cycles, expected %0d", n, k, fin[k], longint'(n) * lat + 1);
      end
    end
    $display("n=%9d  %0d adder(s): us per add %f (all adders) | 1 process: add %f mul %f div %f int add %f",
             n, n_add, real'(fin[0]) * 0.01 / (real'(n) * n_add),
             real'(fin[0]) * 0.01 / n, real'(fin[8]) * 0.01 / n, real'(fin[9]) * 0.01 / n,
             real'(fin[10]) * 0.01 / n);
    for (int k = 0; k < NB; k++) bench_out_ready[k] <= 1'b1;
    @(posedge clk);
    for (int k = 0; k < NB; k++) bench_out_ready[k] <= 1'b0;
    @(posedge clk);
  endtask

  initial begin
    for (int k = 0; k < NB; k++) begin
      bench_in_valid[k] = 1'b0; bench_out_ready[k] = 1'b0;
      bench_in_s[k] = '0; bench_in_n[k] = '0;
    end
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    foreach (n_list[i]) begin
      round(n_list[i], 1);
      round(n_list[i], 4);
      round(n_list[i], 8);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int n_list [3] = '{100, 10_000, 1_000_000};

  initial begin
    repeat (100_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
