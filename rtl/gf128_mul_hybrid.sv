// gf128_mul_hybrid: digit-serial GF(2^128) multiplier (GCM bit order,
// modulus x^128 + x^7 + x^2 + x + 1) that processes four bits of one
// operand per clock.
//
// One "round" of the bit-serial algorithm is: if bit i of H is set, C ^= A;
// then A <- A * x (a right shift in GCM order, reduced by 0xE1||0^120 when
// the last bit falls off). Four such rounds are chained combinationally
// between the registers, so the 128 rounds take 32 clocks, which fits the
// 50-clock block time of the compact AES.
//
// Interface: pulse `start` with `a` and `h` while `busy` is low; `done`
// pulses with the product `p` after the loading clock plus 32 digit clocks
// (33 rising edges after the one that takes `start`); `p` holds afterwards.
module gf128_mul_hybrid
  import aes_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   start,
  input  block_t a,
  input  block_t h,
  output logic   busy,
  output logic   done,
  output block_t p
);
  block_t     a_q, h_q, c_q;
  logic [4:0] cnt;
  block_t     a_n, c_n;

  always_comb begin
    a_n = a_q;
    c_n = c_q;
    for (int r = 0; r < 4; r++) begin
      if (h_q[127-r]) c_n = c_n ^ a_n;
      a_n = a_n[0] ? ((a_n >> 1) ^ GCM_R) : (a_n >> 1);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      a_q <= '0; h_q <= '0; c_q <= '0; cnt <= '0; busy <= 1'b0; done <= 1'b0; p <= '0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        a_q  <= a;
        h_q  <= h;
        c_q  <= '0;
        cnt  <= '0;
        busy <= 1'b1;
      end else if (busy) begin
        a_q <= a_n;
        c_q <= c_n;
        h_q <= h_q << 4;
        cnt <= cnt + 5'd1;
        if (cnt == 5'd31) begin
          busy <= 1'b0;
          done <= 1'b1;
          p    <= c_n;
        end
      end
    end
  end
endmodule
