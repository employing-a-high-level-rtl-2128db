// tb_sgs_grid500: one full preconditioner application on a 500 x 500 grid
// (the smallest grid of the CPU/FPGA runtime comparison),
// through the top level at its default parameters.
//
// The residual is random with a zero halo; the memory model answers after
// RD_LAT cycles without stalls and the z stream is never held up, so the
// run time must equal 250000 points at 96+L (red) or 66+L (black) cycles
// plus 2n+2. Every z word, z_last and the final memory image are checked
// against a binary32 reference; the run time at 100 MHz is printed.
module tb_sgs_grid500;
  import fp32_pkg::*;
  import fp_ref_pkg::*;

  localparam int AW = 18;        // 262144 words >= 502 * 502
  localparam int NB = 11;
  localparam int GRID = 500;
  localparam int RD_LAT = 4;

  logic clk = 1'b0, rst_n = 1'b0;
  int checks = 0, failures = 0;

  logic        coef_valid = 1'b0, coef_ready;
  fp32_t       coef_data = '0;
  logic        sgs_start = 1'b0, sgs_busy, sgs_done;
  logic [11:0] sgs_n = '0;
  logic [26:0] sgs_base = '0;
  logic        mem_req, mem_ready, mem_we, mem_rvalid;
  logic [26:0] mem_addr;
  fp32_t       mem_wdata, mem_rdata;
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

  rldram_model #(.AW(AW), .RD_LAT(RD_LAT), .STALL_PCT(0)) mem (
    .clk, .req(mem_req), .ready(mem_ready), .we(mem_we), .addr(mem_addr[AW-1:0]),
    .wdata(mem_wdata), .rvalid(mem_rvalid), .rdata(mem_rdata));

  always #5 clk = ~clk;

  function automatic fp32_t fadd(fp32_t x, fp32_t y); return to_fp32(to_real(x) + to_real(y)); endfunction
  function automatic fp32_t fdiv(fp32_t x, fp32_t y); return to_fp32(to_real(x) / to_real(y)); endfunction

  fp32_t grid [2**AW];
  fp32_t exp_z [$];
  int    zcnt = 0, zbad = 0;

  always @(posedge clk) begin
    if (rst_n && z_valid && z_ready) begin
      if (zcnt >= exp_z.size() || z_data !== exp_z[zcnt] ||
          z_last != (zcnt == exp_z.size() - 1)) begin
        zbad++;
        if (zbad < 10) $display("z word %0d = %h, wrong", zcnt, z_data);
      end
      zcnt++;
    end
  end

  initial begin
    int w, a, n, reds, blacks;
    longint cyc, expect_cyc;
    fp32_t s, u;
    for (int k = 0; k < NB; k++) begin
      bench_in_valid[k] = 1'b0; bench_out_ready[k] = 1'b0;
      bench_in_s[k] = '0; bench_in_n[k] = '0;
    end
    n = GRID;
    w = n + 2;
    for (int i = 0; i < 2**AW; i++) grid[i] = FP_ZERO;
    for (int r = 1; r <= n; r++)
      for (int c = 1; c <= n; c++) grid[r * w + c] = rand_fp32(4);
    for (int i = 0; i < 2**AW; i++) mem.mem[i] = grid[i];
    reds = 0; blacks = 0;
    // Reference; the Poisson neighbour weights are exactly 1, so the
    // products are the neighbour values themselves.
    for (int colour = 0; colour < 2; colour++)
      for (int r = 1; r <= n; r++)
        for (int c = 1; c <= n; c++) begin
          if (((r + c) % 2) != (colour == 0 ? 1 : 0)) continue;
          a = r * w + c;
          s = fadd(fadd(grid[a + 1], grid[a - 1]), fadd(grid[a + w], grid[a - w]));
          u = fadd(grid[a], fdiv(s, 32'h4080_0000));
          if (colour == 0) begin
            u = fdiv(u, 32'h4080_0000);
            reds++;
          end else blacks++;
          grid[a] = u;
          exp_z.push_back(u);
        end

    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    for (int k = 0; k < 5; k++) begin
      coef_data  <= (k == 0) ? 32'h4080_0000 : 32'hBF80_0000;
      coef_valid <= 1'b1;
      do @(posedge clk); while (!coef_ready);
    end
    coef_valid <= 1'b0;
    @(posedge clk);
    sgs_n <= 12'(n); sgs_base <= '0; sgs_start <= 1'b1;
    @(posedge clk);
    sgs_start <= 1'b0;
    cyc = 0;
    do begin
      @(posedge clk);
      #1;
      cyc++;
    end while (!sgs_done);
    checks++;
    if (zbad != 0 || zcnt != exp_z.size()) begin
      failures++;
      $display("%0d z words, %0d wrong, expected %0d", zcnt, zbad, exp_z.size());
    end
    for (int i = 0; i < 2**AW; i++) begin
      checks++;
      if (mem.mem[i] !== grid[i]) begin
        failures++;
        if (failures < 20) $display("memory[%0d] = %h, expected %h", i, mem.mem[i], grid[i]);
      end
    end
    expect_cyc = longint'(reds) * (96 + RD_LAT) + longint'(blacks) * (66 + RD_LAT) + 2 * n + 2;
    checks++;
    if (cyc != expect_cyc) begin
      failures++;
      $display("%0d cycles, expected %0d", cyc, expect_cyc);
    end
    $display("%0d x %0d grid: %0d cycles = %.6f s at 100 MHz", n, n, cyc, real'(cyc) * 10.0e-9);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
