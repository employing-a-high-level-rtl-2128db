// tb_sgs_precond: self-checking testbench of the red-black symmetric
// Gauss-Seidel preconditioner.
//
// The testbench plays the host: it streams the stencil coefficients, writes
// a random residual with a zero halo into the memory model, pulses start
// and collects the z stream. A reference model computes the red pass and
// then the black pass in the same operation order as the hardware
// (products, ((+x)+(-x))+((+y)+(-y)), division by the centre, addition of
// r, second division for red points), each operation rounded to binary32.
// Checked: every streamed value and its order (red points row-major, then
// black points row-major), z_last on the final word only, the in-place
// memory contents afterwards (halo untouched), the done pulse, and the
// cycle count against 96+L per red point, 66+L per black point plus
// 2n+2 cycles of row, pass-change and end overhead (L = memory read latency). Runs cover the
// Poisson stencil and a general stencil, odd and even n, with memory and
// stream back-pressure in the last run.
module tb_sgs_precond;
  import fp32_pkg::*;
  import fp_ref_pkg::*;

  localparam int AW = 12;
  localparam int RD_LAT = 4;

  logic clk = 1'b0, rst_n = 1'b0;
  int checks = 0, failures = 0;

  logic        coef_valid = 1'b0, coef_ready;
  fp32_t       coef_data = '0;
  logic        start = 1'b0, busy, done;
  logic [11:0] grid_n = '0;
  logic [26:0] base_addr = '0;
  logic        mem_req, mem_ready, mem_we, mem_rvalid;
  logic [26:0] mem_addr;
  fp32_t       mem_wdata, mem_rdata;
  logic        z_valid, z_ready = 1'b1, z_last;
  fp32_t       z_data;

  sgs_precond dut (.*);

  rldram_model #(.AW(AW), .RD_LAT(RD_LAT), .STALL_PCT(0)) mem_fast (
    .clk, .req(mem_req && !slow), .ready(rdy_fast), .we(mem_we),
    .addr(mem_addr[AW-1:0]), .wdata(mem_wdata), .rvalid(rv_fast), .rdata(rd_fast));
  rldram_model #(.AW(AW), .RD_LAT(RD_LAT + 3), .STALL_PCT(30)) mem_slow (
    .clk, .req(mem_req && slow), .ready(rdy_slow), .we(mem_we),
    .addr(mem_addr[AW-1:0]), .wdata(mem_wdata), .rvalid(rv_slow), .rdata(rd_slow));

  logic slow = 1'b0;
  logic rdy_fast, rdy_slow, rv_fast, rv_slow;
  fp32_t rd_fast, rd_slow;
  assign mem_ready  = slow ? rdy_slow : rdy_fast;
  assign mem_rvalid = slow ? rv_slow  : rv_fast;
  assign mem_rdata  = slow ? rd_slow  : rd_fast;

  always #5 clk = ~clk;

  fp32_t coefs [5];
  fp32_t grid  [2**AW];      // reference image of memory
  fp32_t exp_z [$];

  function automatic void set_mem(int a, fp32_t x);
    if (slow) mem_slow.mem[a] = x;
    else      mem_fast.mem[a] = x;
  endfunction

  function automatic fp32_t get_mem(int a);
    return slow ? mem_slow.mem[a] : mem_fast.mem[a];
  endfunction

  function automatic fp32_t fadd(fp32_t x, fp32_t y); return to_fp32(to_real(x) + to_real(y)); endfunction
  function automatic fp32_t fmul(fp32_t x, fp32_t y); return to_fp32(to_real(x) * to_real(y)); endfunction
  function automatic fp32_t fdiv(fp32_t x, fp32_t y); return to_fp32(to_real(x) / to_real(y)); endfunction

  // Reference: one red pass and one black pass, in place on grid[].
  function automatic void model(int n, int base);
    int w, a;
    fp32_t p [4];
    fp32_t s, d, u;
    w = n + 2;
    for (int colour = 0; colour < 2; colour++) begin
      for (int r = 1; r <= n; r++) begin
        for (int c = 1; c <= n; c++) begin
          if (((r + c) % 2) != (colour == 0 ? 1 : 0)) continue;
          a = base + r * w + c;
          p[0] = fmul(grid[a + 1], {~coefs[1][31], coefs[1][30:0]});
          p[1] = fmul(grid[a - 1], {~coefs[2][31], coefs[2][30:0]});
          p[2] = fmul(grid[a + w], {~coefs[3][31], coefs[3][30:0]});
          p[3] = fmul(grid[a - w], {~coefs[4][31], coefs[4][30:0]});
          s = fadd(fadd(p[0], p[1]), fadd(p[2], p[3]));
          d = fdiv(s, coefs[0]);
          u = fadd(grid[a], d);
          if (colour == 0) u = fdiv(u, coefs[0]);
          grid[a] = u;
          exp_z.push_back(u);
        end
      end
    end
  endfunction

  task automatic load_coefs(fp32_t c0, fp32_t c1, fp32_t c2, fp32_t c3, fp32_t c4);
    coefs[0] = c0; coefs[1] = c1; coefs[2] = c2; coefs[3] = c3; coefs[4] = c4;
    for (int k = 0; k < 5; k++) begin
      coef_data  <= coefs[k];
      coef_valid <= 1'b1;
      do @(posedge clk); while (!coef_ready);
    end
    coef_valid <= 1'b0;
    @(posedge clk);
  endtask

  task automatic run(int n, int base, logic bp);
    int w, got, cyc, reds, blacks, expect_cyc;
    logic seen_done;
    w = n + 2;
    for (int i = 0; i < 2**AW; i++) grid[i] = 32'h7F80_0001 ^ i;   // marks untouched cells
    for (int r = 0; r < w; r++)
      for (int c = 0; c < w; c++)
        grid[base + r * w + c] = (r == 0 || c == 0 || r == w - 1 || c == w - 1)
                                 ? FP_ZERO : rand_fp32(3);
    for (int i = 0; i < 2**AW; i++) set_mem(i, grid[i]);
    model(n, base);
    reds = 0; blacks = 0;
    for (int r = 1; r <= n; r++)
      for (int c = 1; c <= n; c++)
        if ((r + c) % 2 == 1) reds++; else blacks++;

    grid_n <= 12'(n); base_addr <= 27'(base); start <= 1'b1;
    @(posedge clk);
    start <= 1'b0;
    got = 0; cyc = 0; seen_done = 1'b0;
    while (!seen_done && cyc < 200000) begin
      z_ready <= bp ? 1'($urandom_range(1, 0)) : 1'b1;
      @(posedge clk);
      #1;
      cyc++;
      if (done) seen_done = 1'b1;
      // a word is transferred on the edge just passed if it was offered and taken
    end
    // stream values are collected by the monitor below
    checks++;
    if (stream_cnt != exp_z.size()) begin
      failures++;
      $display("n=%0d: %0d words streamed, expected %0d", n, stream_cnt, exp_z.size());
    end
    checks++;
    if (last_cnt != 1 || !last_on_final) begin
      failures++;
      $display("n=%0d: z_last seen %0d times, on final word %0d", n, last_cnt, last_on_final);
    end
    for (int i = 0; i < 2**AW; i++) begin
      checks++;
      if (get_mem(i) !== grid[i]) begin
        failures++;
        if (failures < 20) $display("n=%0d: memory[%0d] = %h, expected %h", n, i, get_mem(i), grid[i]);
      end
    end
    if (!bp) begin
      expect_cyc = reds * (96 + RD_LAT) + blacks * (66 + RD_LAT) + 2 * n + 2;
      checks++;
      if (cyc != expect_cyc) begin
        failures++;
        $display("n=%0d: %0d cycles from start to done, expected %0d", n, cyc, expect_cyc);
      end
    end
    $display("n=%0d: %0d points, %0d cycles", n, n * n, cyc);
    stream_cnt = 0; last_cnt = 0; last_on_final = 1'b0;
    exp_z.delete();
    @(posedge clk);
  endtask

  // Stream monitor: compares each transferred word with the reference queue.
  int    stream_cnt = 0, last_cnt = 0;
  logic  last_on_final = 1'b0;
  always @(posedge clk) begin
    if (rst_n && z_valid && z_ready) begin
      checks++;
      if (stream_cnt >= exp_z.size() || z_data !== exp_z[stream_cnt]) begin
        failures++;
        if (failures < 20) $display("z word %0d = %h, expected %h", stream_cnt, z_data,
                                    stream_cnt < exp_z.size() ? exp_z[stream_cnt] : 32'h0);
      end
      if (z_last) begin
        last_cnt++;
        last_on_final = (stream_cnt == exp_z.size() - 1);
      end
      stream_cnt++;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    load_coefs(32'h4080_0000, 32'hBF80_0000, 32'hBF80_0000, 32'hBF80_0000, 32'hBF80_0000);
    run(6, 0, 1'b0);
    run(5, 100, 1'b0);
    run(1, 7, 1'b0);
    load_coefs(32'h40A0_0000, 32'hBF00_0000, 32'hBF80_0000, 32'hC000_0000, 32'hBE80_0000);
    run(7, 33, 1'b0);
    slow = 1'b1;
    run(8, 5, 1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
