// tb_rpu_top: end-to-end testbench of the accelerator top level at its
// default parameters.
//
// Acts as host: loads the Poisson stencil (4, -1, -1, -1, -1), copies a
// random residual with zero halo into a behavioural memory model that
// stalls at random, starts one preconditioner application on an n x n
// grid and drains the z stream with random back-pressure, while at the
// same time all benchmark processes run: the eight adder processes get the
// same request together, the multiplier, divider and integer-adder
// processes their own.
// Checks every z value and the final memory image against a binary32
// reference of the red and black passes, every benchmark reply against a
// reference, and that the eight concurrent adders each finish in the
// n_ops*5+1 cycles of a single process (ideal parallel speed-up). Counts
// how often each mechanism happened (coefficient load, red and black
// updates, divider use, memory stall, stream back-pressure, parallel
// adders, multiply, divide and integer-add benchmarks) and fails if one
// never did.
module tb_rpu_top;
  import fp32_pkg::*;
  import fp_ref_pkg::*;

  localparam int AW = 12;        // memory model size used by this test
  localparam int NB = 11;        // default 8 adders, multiplier, divider, integer adder
  localparam int GRID = 6;

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
  logic        z_valid, z_ready = 1'b0, z_last;
  fp32_t       z_data;
  logic        bench_in_valid  [NB];
  logic        bench_in_ready  [NB];
  fp32_t       bench_in_s      [NB];
  logic [31:0] bench_in_n      [NB];
  logic        bench_out_valid [NB];
  logic        bench_out_ready [NB];
  fp32_t       bench_out_sol   [NB];

  rpu_top dut (.*);

  rldram_model #(.AW(AW), .RD_LAT(6), .STALL_PCT(20)) mem (
    .clk, .req(mem_req), .ready(mem_ready), .we(mem_we), .addr(mem_addr[AW-1:0]),
    .wdata(mem_wdata), .rvalid(mem_rvalid), .rdata(mem_rdata));

  always #5 clk = ~clk;

  function automatic fp32_t fadd(fp32_t x, fp32_t y); return to_fp32(to_real(x) + to_real(y)); endfunction
  function automatic fp32_t fmul(fp32_t x, fp32_t y); return to_fp32(to_real(x) * to_real(y)); endfunction
  function automatic fp32_t fdiv(fp32_t x, fp32_t y); return to_fp32(to_real(x) / to_real(y)); endfunction

  // ---------------------------------------------------- mechanism counters
  int n_coef = 0, n_red = 0, n_black = 0, n_div = 0, n_mstall = 0, n_zstall = 0;
  int n_par = 0, n_mul = 0, n_dvb = 0, n_iadd = 0;

  always @(posedge clk) if (rst_n) begin
    if (coef_valid && coef_ready) n_coef++;
    if (mem_req && !mem_ready) n_mstall++;
    if (z_valid && !z_ready) n_zstall++;
    if (dut.u_sgs.div_iv) n_div++;
    if (dut.u_sgs.state == dut.u_sgs.S_EMIT && z_ready) begin
      if (dut.u_sgs.colour == dut.u_sgs.RED) n_red++; else n_black++;
    end
  end

  // --------------------------------------------------------- preconditioner
  fp32_t grid [2**AW];
  fp32_t exp_z [$];
  int    zcnt = 0;

  always @(posedge clk) begin
    if (rst_n && z_valid && z_ready) begin
      checks++;
      if (zcnt >= exp_z.size() || z_data !== exp_z[zcnt]) begin
        failures++;
        $display("z word %0d = %h, wrong", zcnt, z_data);
      end
      checks++;
      if (z_last != (zcnt == exp_z.size() - 1)) begin
        failures++;
        $display("z_last wrong on word %0d", zcnt);
      end
      zcnt++;
    end
  end

  task automatic precondition(int n, int base);
    int w, a;
    fp32_t s, u;
    w = n + 2;
    for (int i = 0; i < 2**AW; i++) grid[i] = 32'h4000_0000;
    for (int r = 0; r < w; r++)
      for (int c = 0; c < w; c++)
        grid[base + r * w + c] = (r == 0 || c == 0 || r == w - 1 || c == w - 1)
                                 ? FP_ZERO : rand_fp32(4);
    for (int i = 0; i < 2**AW; i++) mem.mem[i] = grid[i];
    for (int colour = 0; colour < 2; colour++)
      for (int r = 1; r <= n; r++)
        for (int c = 1; c <= n; c++) begin
          if (((r + c) % 2) != (colour == 0 ? 1 : 0)) continue;
          a = base + r * w + c;
          s = fadd(fadd(fmul(grid[a + 1], FP_ONE), fmul(grid[a - 1], FP_ONE)),
                   fadd(fmul(grid[a + w], FP_ONE), fmul(grid[a - w], FP_ONE)));
          u = fadd(grid[a], fdiv(s, 32'h4080_0000));
          if (colour == 0) u = fdiv(u, 32'h4080_0000);
          grid[a] = u;
          exp_z.push_back(u);
        end
    sgs_n <= 12'(n); sgs_base <= 27'(base); sgs_start <= 1'b1;
    @(posedge clk);
    sgs_start <= 1'b0;
    do begin
      z_ready <= 1'($urandom_range(3, 0) != 0);
      @(posedge clk);
    end while (!sgs_done);
    z_ready <= 1'b0;
    checks++;
    if (zcnt != exp_z.size()) begin
      failures++;
      $display("%0d z words, expected %0d", zcnt, exp_z.size());
    end
    for (int i = 0; i < 2**AW; i++) begin
      checks++;
      if (mem.mem[i] !== grid[i]) begin
        failures++;
        if (failures < 20) $display("memory[%0d] = %h, expected %h", i, mem.mem[i], grid[i]);
      end
    end
  endtask

  // ------------------------------------------------------------- benchmarks
  function automatic fp32_t bench_model(int k, fp32_t s, int n);
    fp32_t r;
    r = (k < 8 || k == 10) ? FP_ZERO : FP_ONE;
    for (int i = 0; i < n; i++)
      r = (k < 8) ? fadd(r, s) : (k == 8) ? fmul(r, s) : (k == 9) ? fdiv(r, s) : r + s;
    return r;
  endfunction

  task automatic benchmarks();
    int ops [NB];
    fp32_t s [NB];
    int fin [NB];
    int cyc;
    for (int k = 0; k < NB; k++) begin
      ops[k] = (k < 8) ? 200 : (k == 8) ? 50 : (k == 9) ? 20 : 300;
      s[k]   = (k < 8) ? 32'h3DCC_CCCD : (k == 8) ? 32'h3F80_4000 : (k == 9) ? 32'h3F90_0000 : 32'd777;
      fin[k] = -1;
      bench_in_s[k] <= s[k]; bench_in_n[k] <= ops[k]; bench_in_valid[k] <= 1'b1;
    end
    @(posedge clk);                      // all idle, so all accept here
    for (int k = 0; k < NB; k++) bench_in_valid[k] <= 1'b0;
    cyc = 0;
    while (cyc < 5000) begin
      @(posedge clk);
      #1;
      cyc++;
      for (int k = 0; k < NB; k++)
        if (bench_out_valid[k] && fin[k] < 0) fin[k] = cyc;
    end
    for (int k = 0; k < NB; k++) begin
      int lat;
      lat = (k < 8) ? int'(ADD_LAT) : (k == 8) ? int'(MUL_LAT) : (k == 9) ? int'(DIV_LAT) : int'(IADD_LAT);
      checks++;
      if (bench_out_sol[k] !== bench_model(k, s[k], ops[k])) begin
        failures++;
        $display("bench %0d: sol %h wrong", k, bench_out_sol[k]);
      end
      checks++;
      if (fin[k] != ops[k] * lat + 1) begin
        failures++;
        $display("bench %0d: %0d cycles, expected %0d", k, fin[k], ops[k] * lat + 1);
      end
    end
    if (fin[0] > 0 && fin[0] == fin[1] && fin[0] == fin[2] && fin[0] == fin[3] &&
        fin[0] == fin[4] && fin[0] == fin[5] && fin[0] == fin[6] && fin[0] == fin[7]) n_par++;
    if (fin[8] > 0) n_mul++;
    if (fin[9] > 0) n_dvb++;
    if (fin[10] > 0) n_iadd++;
    for (int k = 0; k < NB; k++) bench_out_ready[k] <= 1'b1;
    @(posedge clk);
    for (int k = 0; k < NB; k++) bench_out_ready[k] <= 1'b0;
  endtask

  task automatic need(string what, int n);
    checks++;
    if (n == 0) begin
      failures++;
      $display("mechanism never exercised: %s", what);
    end else $display("%s: %0d", what, n);
  endtask

  initial begin
    for (int k = 0; k < NB; k++) begin
      bench_in_valid[k] = 1'b0; bench_out_ready[k] = 1'b0;
      bench_in_s[k] = '0; bench_in_n[k] = '0;
    end
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    // stencil coefficients, once before the first application
    for (int k = 0; k < 5; k++) begin
      coef_data  <= (k == 0) ? 32'h4080_0000 : 32'hBF80_0000;
      coef_valid <= 1'b1;
      do @(posedge clk); while (!coef_ready);
    end
    coef_valid <= 1'b0;
    fork
      precondition(GRID, 3);
      benchmarks();
    join
    need("coefficient words loaded", n_coef);
    need("red points updated", n_red);
    need("black points updated", n_black);
    need("divisions issued", n_div);
    need("memory stall cycles", n_mstall);
    need("z stream back-pressure cycles", n_zstall);
    need("parallel adder runs at full speed-up", n_par);
    need("multiply benchmark runs", n_mul);
    need("divide benchmark runs", n_dvb);
    need("integer add benchmark runs", n_iadd);
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
