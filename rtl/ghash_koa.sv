// ghash_koa: feedback-free GHASH built on the 4-stage pipelined KOA
// multiplier and a memory of the powers of H.
//
// GHASH X_i = (C_i ^ X_{i-1}) * H unrolls, for an n-block message, into
//   X_n = C_1 H^n ^ C_2 H^(n-1) ^ ... ^ C_n H,
// a sum of independent products. With H..H^NMAX stored, every block is
// multiplied by its own power as it arrives, the products stream through
// the pipelined multiplier, and an accumulator XORs them: no result is ever
// fed back into the multiplier, so one block enters per clock.
//
// Initialization (`h_load` with `h`): H is kept in a register and
// H^2..H^NMAX are computed one after the other as H * H^(k-1) and written
// to the memory (NMAX-1 entries, one product per multiplier latency of 4
// clocks: 252 clocks for NMAX = 64). A 6-bit up/down counter addresses the
// memory: it counts up while filling it and down while hashing. `h_ready`
// rises when the memory is full.
//
// Hashing (`start` with `n`, 1..NMAX blocks): the counter starts at n; each
// in_valid block is paired with H^cnt (H itself when cnt = 1) and cnt
// counts down. The sum appears on `z` / `z_valid` 5 clocks after the last
// block (4 multiplier stages and the accumulator register). For NMAX = 64
// a full packet takes 64 + 5 clocks.
module ghash_koa
  import aes_pkg::*;
#(
  parameter int NMAX = 64
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   h_load,
  input  block_t h,
  output logic   h_ready,
  input  logic   start,
  input  logic [$clog2(NMAX):0] n,
  input  logic   in_valid,
  input  block_t in_block,
  output logic   z_valid,
  output block_t z
);
  localparam int AW = $clog2(NMAX);   // 6 for NMAX = 64

  block_t           h_q;
  block_t           hmem [1:NMAX-1];  // hmem[k] = H^(k+1)
  logic [AW-1:0]    cnt;              // up/down address counter
  logic             filling, issued;
  logic [AW:0]      left;             // products still to accumulate
  block_t           acc;

  // Multiplier port muxes (Mux1 / Mux2 of the architecture).
  logic   m_valid, m_out_valid;
  block_t m_x, m_y, m_p, pow;

  assign pow = (cnt == '0) ? h_q : hmem[cnt];

  always_comb begin
    m_valid = 1'b0;
    m_x     = h_q;
    m_y     = in_block;
    if (filling) begin
      // No new product after the one that fills the last entry.
      m_valid = !issued || (m_out_valid && cnt != AW'(NMAX - 2));
      m_y     = issued ? m_p : h_q;
    end else if (in_valid) begin
      m_valid = 1'b1;
      m_x     = pow;
    end
  end

  koa_mul_pipe u_mul (.clk, .rst_n, .in_valid(m_valid), .x(m_x), .y(m_y),
                      .out_valid(m_out_valid), .p(m_p));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      h_q <= '0; cnt <= '0; filling <= 1'b0; issued <= 1'b0; h_ready <= 1'b0;
      left <= '0; acc <= '0; z_valid <= 1'b0; z <= '0;
      for (int k = 1; k < NMAX; k++) hmem[k] <= '0;
    end else begin
      z_valid <= 1'b0;
      if (h_load) begin
        h_q     <= h;
        cnt     <= '0;
        filling <= 1'b1;
        issued  <= 1'b0;
        h_ready <= 1'b0;
      end else if (filling) begin
        if (!issued) issued <= 1'b1;
        if (m_out_valid) begin
          hmem[cnt + AW'(1)] <= m_p;
          cnt <= cnt + AW'(1);
          if (cnt == AW'(NMAX - 2)) begin
            filling <= 1'b0;
            h_ready <= 1'b1;
          end
        end
      end else begin
        if (start) begin
          cnt  <= AW'(n - 1'b1);
          left <= n;
          acc  <= '0;
        end else if (in_valid) begin
          cnt <= cnt - AW'(1);
        end
        if (m_out_valid && left != '0) begin
          acc  <= acc ^ m_p;
          left <= left - 1'b1;
          if (left == 1) begin
            z       <= acc ^ m_p;
            z_valid <= 1'b1;
          end
        end
      end
    end
  end
endmodule
