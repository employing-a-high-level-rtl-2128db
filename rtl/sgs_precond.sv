// sgs_precond: red-black symmetric Gauss-Seidel preconditioner z = M^-1 r
// for a five-point stencil, working on a residual held in RPU memory.
//
// The host first streams the five stencil coefficients (centre, +x, -x,
// +y, -y neighbour; 4, -1, -1, -1, -1 for the Poisson problem) into
// registers. For each application it copies the residual r into memory as
// an (n+2) x (n+2) row-major grid whose outer ring (the halo) is zero,
// then pulses start with n and the base address. The unit makes two
// passes over the n x n interior, as in one symmetric Gauss-Seidel step
// (SSOR with omega = 1) under red-black ordering:
//   red points   ((row+col) odd):  z = (r + S(r) / c) / c
//   black points ((row+col) even): z = r + S(z) / c
// where c is the centre coefficient, S(v) = sum over the four neighbours of
// -w_k * v_k, and w_k the neighbour coefficients; with the Poisson stencil
// this is z = (r + (sum of neighbour r)/4)/4 and z = r + (sum of
// neighbour z)/4. Each finished z replaces r in memory, so the black pass
// reads the new red values, and each z is also sent on the output stream:
// red points first, then black points, each in row-major order, with
// z_last on the final one. Because of the halo no border test is needed.
//
// The datapath is one pipelined multiplier and adder (5 cycles) and one
// non-pipelined divider (29 cycles), driven by a sequential state machine:
// per point, 5 memory reads, 4 products, 3 additions for the neighbour
// sum, a division by c, an addition of r and, for red points, a second
// division, then one memory write and one stream word. A point therefore
// takes 96 + L cycles (red) or 66 + L cycles (black) with memory read
// latency L and no back-pressure; each row of each pass adds one cycle and
// the pass change and the end add one each (2n + 2 in all). The memory
// layout, the coefficient order, the generalisation to arbitrary
// coefficients through the products, the in-place update and the
// valid/ready handshakes are this design's own choices.
//
// Memory port: mem_req with mem_we/mem_addr/mem_wdata is accepted when
// mem_ready is high; read data return on mem_rvalid/mem_rdata in request
// order, any number of cycles later.
module sgs_precond
  import fp32_pkg::*;
#(
  parameter int unsigned ADDR_W = 27,   // word address: 512 MB of 32-bit words
  parameter int unsigned DIM_W  = 12    // interior size n up to 4093
) (
  input  logic              clk,
  input  logic              rst_n,
  // stencil coefficients, five words: centre, +x, -x, +y, -y
  input  logic              coef_valid,
  output logic              coef_ready,
  input  fp32_t             coef_data,
  // control
  input  logic              start,
  input  logic [DIM_W-1:0]  grid_n,
  input  logic [ADDR_W-1:0] base_addr,
  output logic              busy,
  output logic              done,
  // RPU memory
  output logic              mem_req,
  input  logic              mem_ready,
  output logic              mem_we,
  output logic [ADDR_W-1:0] mem_addr,
  output fp32_t             mem_wdata,
  input  logic              mem_rvalid,
  input  fp32_t             mem_rdata,
  // result stream z
  output logic              z_valid,
  input  logic              z_ready,
  output fp32_t             z_data,
  output logic              z_last
);

  typedef enum logic [3:0] {
    S_IDLE, S_SCAN, S_READ, S_RWAIT, S_MUL, S_ADD1, S_ADD2, S_DIV1,
    S_ADD3, S_DIV2, S_WRITE, S_EMIT
  } state_e;

  typedef enum logic {RED, BLACK} colour_e;

  state_e            state;
  colour_e           colour;
  fp32_t             coef_c;
  fp32_t             coef_nw [4];        // negated neighbour coefficients
  logic [2:0]        coef_idx;
  logic [DIM_W-1:0]  n_q;
  logic [ADDR_W-1:0] base_q, stride, row_base, centre;
  logic [DIM_W:0]    row, col;
  fp32_t             v [5];              // centre, +x, -x, +y, -y
  fp32_t             t [4];              // products, then partial sums
  fp32_t             acc;                // running result of the point
  logic [2:0]        iss, rcv;           // issued / received in a phase

  // ---------------------------------------------------------------- units
  logic  mul_iv, mul_ov, add_iv, add_ov, div_iv, div_ov, div_rdy;
  fp32_t mul_a, mul_b, mul_y, add_a, add_b, add_y, div_a, div_y;

  fp_mul u_mul (.clk, .rst_n, .in_valid(mul_iv), .a(mul_a), .b(mul_b),
                .out_valid(mul_ov), .y(mul_y));
  fp_add u_add (.clk, .rst_n, .in_valid(add_iv), .a(add_a), .b(add_b),
                .sub(1'b0), .out_valid(add_ov), .y(add_y));
  fp_div u_div (.clk, .rst_n, .in_valid(div_iv), .in_ready(div_rdy),
                .a(div_a), .b(coef_c), .out_valid(div_ov), .y(div_y));

  // First column of the given colour in a row: red points have
  // (row+col) odd, black points (row+col) even.
  function automatic logic [DIM_W:0] first_col(logic [DIM_W:0] r, colour_e c);
    return (r[0] ^ (c == BLACK)) ? (DIM_W+1)'(2) : (DIM_W+1)'(1);
  endfunction

  always_comb begin
    mul_iv = (state == S_MUL) && (iss < 3'd4);
    mul_a  = v[3'(iss[1:0]) + 3'd1];
    mul_b  = coef_nw[iss[1:0]];
    add_iv = ((state == S_ADD1) && (iss < 3'd2)) ||
             ((state == S_ADD2 || state == S_ADD3) && (iss == 3'd0));
    add_a  = (state == S_ADD3) ? v[0] : t[{iss[0], 1'b0}];
    add_b  = (state == S_ADD3) ? acc  : t[{iss[0], 1'b1}];
    div_iv = (state == S_DIV1 || state == S_DIV2) && (iss == 3'd0);
    div_a  = acc;
  end

  // ------------------------------------------------------------- outputs
  assign coef_ready = (state == S_IDLE);
  assign busy       = (state != S_IDLE);
  assign mem_req    = (state == S_READ) || (state == S_WRITE);
  assign mem_we     = (state == S_WRITE);
  assign mem_wdata  = acc;
  assign z_valid    = (state == S_EMIT);
  assign z_data     = acc;
  assign z_last     = (colour == BLACK) && (row == (DIM_W+1)'(n_q)) &&
                      (col + (DIM_W+1)'(2) > (DIM_W+1)'(n_q));

  always_comb begin
    unique case (iss)
      3'd0:    mem_addr = centre;
      3'd1:    mem_addr = centre + ADDR_W'(1);
      3'd2:    mem_addr = centre - ADDR_W'(1);
      3'd3:    mem_addr = centre + stride;
      default: mem_addr = centre - stride;
    endcase
    if (state == S_WRITE) mem_addr = centre;
  end

  // ------------------------------------------------------------ sequencer
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      colour   <= RED;
      coef_c   <= 32'h4080_0000;
      for (int k = 0; k < 4; k++) coef_nw[k] <= FP_ONE;
      coef_idx <= '0;
      n_q      <= '0;
      base_q   <= '0;
      stride   <= '0;
      row_base <= '0;
      centre   <= '0;
      row      <= '0;
      col      <= '0;
      for (int k = 0; k < 5; k++) v[k] <= FP_ZERO;
      for (int k = 0; k < 4; k++) t[k] <= FP_ZERO;
      acc      <= FP_ZERO;
      iss      <= '0;
      rcv      <= '0;
      done     <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: begin
          if (coef_valid) begin
            if (coef_idx == 3'd0) coef_c <= coef_data;
            else coef_nw[coef_idx[1:0] - 2'd1] <= {~coef_data[31], coef_data[30:0]};
            coef_idx <= (coef_idx == 3'd4) ? 3'd0 : coef_idx + 3'd1;
          end
          if (start) begin
            n_q      <= grid_n;
            base_q   <= base_addr;
            stride   <= ADDR_W'(grid_n) + ADDR_W'(2);
            row_base <= base_addr + ADDR_W'(grid_n) + ADDR_W'(2);
            row      <= (DIM_W+1)'(1);
            col      <= first_col((DIM_W+1)'(1), RED);
            colour   <= RED;
            state    <= S_SCAN;
          end
        end
        S_SCAN: begin
          if (row > (DIM_W+1)'(n_q)) begin
            if (colour == RED) begin
              colour   <= BLACK;
              row      <= (DIM_W+1)'(1);
              col      <= first_col((DIM_W+1)'(1), BLACK);
              row_base <= base_q + stride;
            end else begin
              done  <= 1'b1;
              state <= S_IDLE;
            end
          end else if (col > (DIM_W+1)'(n_q)) begin
            row      <= row + 1'b1;
            col      <= first_col(row + 1'b1, colour);
            row_base <= row_base + stride;
          end else begin
            centre <= row_base + ADDR_W'(col);
            iss    <= '0;
            rcv    <= '0;
            state  <= S_READ;
          end
        end
        S_READ, S_RWAIT: begin
          if (state == S_READ && mem_ready) begin
            iss <= iss + 3'd1;
            if (iss == 3'd4) state <= S_RWAIT;
          end
          if (mem_rvalid) begin
            v[rcv] <= mem_rdata;
            rcv    <= rcv + 3'd1;
            if (rcv == 3'd4) begin
              iss   <= '0;
              rcv   <= '0;
              state <= S_MUL;
            end
          end
        end
        S_MUL: begin
          if (iss < 3'd4) iss <= iss + 3'd1;
          if (mul_ov) begin
            t[rcv[1:0]] <= mul_y;
            rcv <= rcv + 3'd1;
            if (rcv == 3'd3) begin
              iss   <= '0;
              rcv   <= '0;
              state <= S_ADD1;
            end
          end
        end
        S_ADD1: begin
          if (iss < 3'd2) iss <= iss + 3'd1;
          if (add_ov) begin
            t[rcv[1:0]] <= add_y;
            rcv <= rcv + 3'd1;
            if (rcv == 3'd1) begin
              iss   <= '0;
              rcv   <= '0;
              state <= S_ADD2;
            end
          end
        end
        S_ADD2, S_ADD3: begin
          if (iss == 3'd0) iss <= 3'd1;
          if (add_ov) begin
            acc <= add_y;
            iss <= '0;
            if (state == S_ADD2) state <= S_DIV1;
            else state <= (colour == RED) ? S_DIV2 : S_WRITE;
          end
        end
        S_DIV1, S_DIV2: begin
          if (iss == 3'd0 && div_rdy) iss <= 3'd1;
          if (div_ov) begin
            acc   <= div_y;
            iss   <= '0;
            state <= (state == S_DIV1) ? S_ADD3 : S_WRITE;
          end
        end
        S_WRITE: if (mem_ready) state <= S_EMIT;
        S_EMIT: if (z_ready) begin
          col   <= col + (DIM_W+1)'(2);
          state <= S_SCAN;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  a_div_free: assert property (@(posedge clk) disable iff (!rst_n)
                               div_iv |-> div_rdy)
    else $error("sgs_precond: divider busy at issue");
  a_start_idle: assert property (@(posedge clk) disable iff (!rst_n)
                                 start |-> state == S_IDLE)
    else $error("sgs_precond: start while busy");

endmodule
