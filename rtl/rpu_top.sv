// rpu_top: FPGA side of a CPU + FPGA accelerator for a preconditioned
// conjugate-gradient (CG) solver, plus the processes used to benchmark the
// FPGA's floating-point throughput.
//
// The host runs CG and, once per iteration, needs z = M^-1 r from a
// red-black symmetric Gauss-Seidel preconditioner. It loads the stencil
// coefficients once, copies r into the board memory, pulses start and reads
// z back from a stream: that work is done by sgs_precond, whose memory port
// is brought out to the external memory device (not part of this RTL) and
// whose coefficient and z streams are brought out to the host link.
//
// Beside it stand the benchmark processes, each with its own request and
// reply stream to the host: N_ADD processes that repeat an addition (the
// parallel benchmark with 1, 4 or 8 processes), one that repeats a
// multiplication, one that repeats a division and one that repeats an
// integer addition. Streams are grouped in arrays indexed 0..N_ADD-1 for
// the adders, N_ADD for the multiplier, N_ADD+1 for the divider and
// N_ADD+2 for the integer adder. The host link itself (and the host software)
// are outside this RTL: all streams are plain valid/ready ports.
module rpu_top
  import fp32_pkg::*;
#(
  parameter int unsigned ADDR_W = 27,
  parameter int unsigned DIM_W  = 12,
  parameter int unsigned N_ADD  = 8,
  localparam int unsigned N_BENCH = N_ADD + 3
) (
  input  logic              clk,
  input  logic              rst_n,
  // preconditioner: coefficients, control, memory, z stream
  input  logic              coef_valid,
  output logic              coef_ready,
  input  fp32_t             coef_data,
  input  logic              sgs_start,
  input  logic [DIM_W-1:0]  sgs_n,
  input  logic [ADDR_W-1:0] sgs_base,
  output logic              sgs_busy,
  output logic              sgs_done,
  output logic              mem_req,
  input  logic              mem_ready,
  output logic              mem_we,
  output logic [ADDR_W-1:0] mem_addr,
  output fp32_t             mem_wdata,
  input  logic              mem_rvalid,
  input  fp32_t             mem_rdata,
  output logic              z_valid,
  input  logic              z_ready,
  output fp32_t             z_data,
  output logic              z_last,
  // benchmark processes
  input  logic              bench_in_valid  [N_BENCH],
  output logic              bench_in_ready  [N_BENCH],
  input  fp32_t             bench_in_s      [N_BENCH],
  input  logic [31:0]       bench_in_n      [N_BENCH],
  output logic              bench_out_valid [N_BENCH],
  input  logic              bench_out_ready [N_BENCH],
  output fp32_t             bench_out_sol   [N_BENCH]
);

  sgs_precond #(.ADDR_W(ADDR_W), .DIM_W(DIM_W)) u_sgs (
    .clk, .rst_n,
    .coef_valid, .coef_ready, .coef_data,
    .start(sgs_start), .grid_n(sgs_n), .base_addr(sgs_base),
    .busy(sgs_busy), .done(sgs_done),
    .mem_req, .mem_ready, .mem_we, .mem_addr, .mem_wdata, .mem_rvalid, .mem_rdata,
    .z_valid, .z_ready, .z_data, .z_last
  );

  for (genvar i = 0; i < int'(N_BENCH); i++) begin : g_bench
    localparam bench_op_e OP = (i < int'(N_ADD)) ? OP_ADD :
                               (i == int'(N_ADD)) ? OP_MUL :
                               (i == int'(N_ADD) + 1) ? OP_DIV : OP_IADD;
    bench_proc #(.OP(OP)) u_proc (
      .clk, .rst_n,
      .in_valid(bench_in_valid[i]), .in_ready(bench_in_ready[i]),
      .in_s(bench_in_s[i]), .in_n(bench_in_n[i]),
      .out_valid(bench_out_valid[i]), .out_ready(bench_out_ready[i]),
      .out_sol(bench_out_sol[i])
    );
  end

endmodule
