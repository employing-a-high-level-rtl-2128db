// tb_fp_div: self-checking testbench of the iterative binary32 divider.
// Issues one division at a time (as soon as in_ready allows), compares each
// quotient against the double-precision reference rounded to binary32,
// checks that each result shows in the 29th (DIV_LAT) cycle after its
// operands were taken and that the unit refuses operands while busy.
module tb_fp_div;
  import fp32_pkg::*;
  import fp_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0, in_ready;
  fp32_t a = '0, b = '0;
  logic out_valid;
  fp32_t y;
  int checks = 0, failures = 0;

  fp_div dut (.*);

  always #5 clk = ~clk;

  task automatic divide(fp32_t x, fp32_t z);
    fp32_t e;
    int n;
    e = to_fp32(to_real(x) / to_real(z));
    while (!in_ready) @(posedge clk);
    a <= x; b <= z; in_valid <= 1'b1;
    @(posedge clk);                     // operands taken on this edge
    in_valid <= 1'b0;
    n = 0;
    do begin
      @(posedge clk);
      #1;                               // look after the edge's updates
      n++;
      checks++;
      if (n < int'(DIV_LAT) - 1 && in_ready) begin
        failures++;
        $display("divider ready while busy, cycle %0d", n);
      end
    end while (!out_valid && n < 100);
    checks++;
    if (y !== e) begin
      failures++;
      if (failures < 10) $display("div %h / %h: got %h expected %h", x, z, y, e);
    end
    checks++;
    // n counts edges after the taking edge; the result shows in cycle n+1.
    if (n + 1 != int'(DIV_LAT)) begin
      failures++;
      $display("div result in cycle %0d, expected %0d", n + 1, DIV_LAT);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    divide(32'h4080_0000, 32'h4080_0000);   // 4 / 4
    divide(32'h3F80_0000, 32'h4080_0000);   // 1 / 4
    divide(32'h3F80_0000, 32'h4040_0000);   // 1 / 3
    divide(32'hC120_0000, 32'h4080_0000);   // -10 / 4
    divide(32'h3F80_0000, 32'h0000_0000);   // 1 / 0
    divide(32'h0000_0000, 32'h0000_0000);   // 0 / 0
    divide(32'h7F00_0000, 32'h0100_0000);   // overflow
    divide(32'h0100_0000, 32'h7F00_0000);   // underflow
    for (int i = 0; i < 1500; i++) divide(rand_fp32(i % 2 ? 50 : 2), rand_fp32(i % 3 ? 50 : 2));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
