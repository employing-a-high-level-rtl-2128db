// tb_fp_add: self-checking testbench of the pipelined binary32 adder.
// Feeds one operand pair per cycle (random values, near-cancelling
// differences, exact and special cases), compares every sum against the
// double-precision reference rounded to binary32, and checks that each
// result arrives exactly ADD_LAT cycles after its operands.
module tb_fp_add;
  import fp32_pkg::*;
  import fp_ref_pkg::*;

  logic clk = 1'b0, rst_n = 1'b0;
  logic in_valid = 1'b0, sub = 1'b0;
  fp32_t a = '0, b = '0;
  logic out_valid;
  fp32_t y;
  int checks = 0, failures = 0;
  longint cycle = 0;
  fp32_t exp_q[$];
  longint t_q[$];

  fp_add dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      fp32_t e;
      longint t;
      e = exp_q.pop_front();
      t = t_q.pop_front();
      checks++;
      if (y !== e) begin
        failures++;
        if (failures < 10) $display("add mismatch: got %h expected %h", y, e);
      end
      checks++;
      if (cycle - t != longint'(ADD_LAT)) begin
        failures++;
        $display("add latency %0d, expected %0d", cycle - t, ADD_LAT);
      end
    end
  end

  task automatic drive(fp32_t x, fp32_t z, logic s);
    a <= x; b <= z; sub <= s; in_valid <= 1'b1;
    exp_q.push_back(to_fp32(s ? to_real(x) - to_real(z) : to_real(x) + to_real(z)));
    t_q.push_back(cycle + 1);  // the edge that samples the operands
    @(posedge clk);
  endtask

  task automatic idle();
    in_valid <= 1'b0;
    @(posedge clk);
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n <= 1'b1;
    @(posedge clk);
    drive(32'h3F80_0000, 32'h3F80_0000, 1'b0);   // 1 + 1
    drive(32'h4080_0000, 32'hBF80_0000, 1'b0);   // 4 + -1
    drive(32'h3F80_0000, 32'h3F80_0000, 1'b1);   // 1 - 1
    drive(32'h3F80_0000, 32'h3380_0000, 1'b0);   // 1 + 2^-24 (tie, even)
    drive(32'h3F80_0001, 32'h3380_0000, 1'b0);   // tie, rounds up
    drive(32'h7F7F_FFFF, 32'h7F7F_FFFF, 1'b0);   // overflow
    drive(FP_PINF, 32'h3F80_0000, 1'b0);
    drive(32'h0000_0000, 32'hC0A0_0000, 1'b0);
    for (int i = 0; i < 3000; i++) begin
      fp32_t x, z;
      x = rand_fp32(20);
      z = (i % 3 == 0) ? {~x[31], x[30:4], 4'($urandom)} : rand_fp32(i % 2 ? 30 : 3);
      drive(x, z, 1'($urandom));
      if (i % 7 == 0) idle();
    end
    idle();
    repeat (ADD_LAT + 3) @(posedge clk);
    checks++;
    if (exp_q.size() != 0) begin
      failures++;
      $display("%0d results missing", exp_q.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
