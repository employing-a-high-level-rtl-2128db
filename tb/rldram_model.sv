// rldram_model: behavioural model of the accelerator board's external
// memory (an RLDRAM part), for simulation only. It is not synthesizable
// logic of the design: the real part is a commercial DRAM device.
//
// One request port: a request (req with we/addr/wdata) is accepted in a
// cycle where ready is high; ready is dropped at random when STALL_PCT is
// above zero. Read data return on rvalid/rdata exactly RD_LAT cycles after
// acceptance, in request order. The array is directly visible to the
// testbench (mem) so it can act as the host that copies the residual in.
module rldram_model #(
  parameter int unsigned AW        = 12,
  parameter int unsigned RD_LAT    = 4,
  parameter int unsigned STALL_PCT = 0
) (
  input  logic          clk,
  input  logic          req,
  output logic          ready,
  input  logic          we,
  input  logic [AW-1:0] addr,
  input  logic [31:0]   wdata,
  output logic          rvalid,
  output logic [31:0]   rdata
);
  logic [31:0] mem [2**AW];
  logic        pv [RD_LAT];
  logic [31:0] pd [RD_LAT];

  initial begin
    for (int i = 0; i < 2**AW; i++) mem[i] = '0;
    for (int i = 0; i < int'(RD_LAT); i++) begin
      pv[i] = 1'b0;
      pd[i] = '0;
    end
    ready = 1'b1;
  end

  always @(posedge clk) begin
    pv[0] <= req && ready && !we;
    pd[0] <= mem[addr];
    if (req && ready && we) mem[addr] <= wdata;
    for (int i = 1; i < int'(RD_LAT); i++) begin
      pv[i] <= pv[i-1];
      pd[i] <= pd[i-1];
    end
    ready <= ($urandom_range(99, 0) >= STALL_PCT);
  end

  assign rvalid = pv[RD_LAT-1];
  assign rdata  = pd[RD_LAT-1];
endmodule
