// aes_gcm_lc: low-cost AES-GCM for bitstream decryption and authentication
// in the static (non-programmable) part of an FPGA.
//
// One compact AES (aes128_quarter, 50 clocks per block) and one
// digit-serial GF(2^128) multiplier (gf128_mul_hybrid, 32 clocks) replace
// the pipelined datapath of the high-speed cores. The key is an input that
// the surrounding logic holds constant (an embedded device key).
//
// Per message (`start` with `iv`, `n_aad`, `n_data`, `decrypt`, `tag_in`):
//   1. H = E(K, 0^128), 50 clocks;
//   2. E(CTR0), CTR0 = IV||0^31||1, kept for the tag, 50 clocks;
//   3. each AAD block (in_valid/in_ready) is hashed: X <- (X ^ A) * H;
//   4. each text block j is XORed with E(IV||(j+2)) and leaves on
//      out_valid; the ciphertext (the input when decrypting) is then
//      hashed while the AES already works on the next block. The next
//      counter is handed to the AES in the clock its `done` is seen, so a
//      block costs 51 clocks (the nominal figure counts the 50 AES clocks only):
//      throughput about f * 128 / 50;
//   5. the length block len(A)||len(C) is hashed and tag = X ^ E(CTR0)
//      appears on `tag_valid`, with `tag_ok` = (tag == tag_in), the check a
//      configuration controller needs before accepting a bitstream.
// Only whole blocks are handled. The stream is online: nothing is stored.
module aes_gcm_lc
  import aes_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  block_t      key,
  input  logic        start,
  input  logic [95:0] iv,
  input  logic [15:0] n_aad,
  input  logic [15:0] n_data,
  input  logic        decrypt,
  input  block_t      tag_in,
  output logic        busy,
  input  logic        in_valid,
  output logic        in_ready,
  input  block_t      in_block,
  output logic        out_valid,
  output block_t      out_block,
  output logic        tag_valid,
  output block_t      tag,
  output logic        tag_ok
);
  typedef enum logic [3:0] {S_IDLE, S_H, S_E0, S_AAD, S_DATA, S_DWAIT, S_LEN, S_LWAIT,
                            S_TAG} state_t;

  state_t      state;
  logic [95:0] iv_q;
  logic [15:0] n_aad_q, n_data_q, cnt;
  logic        dec_q;
  block_t      h_q, ek0, x, blk, tag_in_q;

  logic   aes_start, aes_busy, aes_done;
  block_t aes_in, aes_out;
  logic   mul_start, mul_busy, mul_done;
  block_t mul_a, mul_p;

  aes128_quarter u_aes (.clk, .rst_n, .key, .start(aes_start), .in_block(aes_in),
                        .busy(aes_busy), .done(aes_done), .out_block(aes_out));

  gf128_mul_hybrid u_mul (.clk, .rst_n, .start(mul_start), .a(mul_a), .h(h_q),
                          .busy(mul_busy), .done(mul_done), .p(mul_p));

  // The running hash: the product is used in the clock it is done.
  block_t x_cur;
  assign x_cur = mul_done ? mul_p : x;

  assign busy = (state != S_IDLE);
  assign in_ready = (state == S_AAD && cnt != n_aad_q && !mul_busy) ||
                    (state == S_DATA && cnt != n_data_q && !aes_busy) ||
                    (state == S_DWAIT && aes_done && cnt + 16'd1 != n_data_q);

  always_comb begin
    aes_start = 1'b0;
    aes_in    = '0;
    mul_start = 1'b0;
    mul_a     = '0;
    unique case (state)
      S_IDLE: if (start) aes_start = 1'b1;                      // H = E(0)
      S_H:    if (aes_done) begin
                aes_start = 1'b1;                                 // E(CTR0)
                aes_in    = gcm_ctr(iv_q, 32'd1);
              end
      S_AAD:  if (in_valid && in_ready) begin
                mul_start = 1'b1;
                mul_a     = x_cur ^ in_block;
              end
      S_DATA: if (in_valid && in_ready) begin
                aes_start = 1'b1;
                aes_in    = gcm_ctr(iv_q, 32'(cnt) + 32'd2);
              end
      S_DWAIT: if (aes_done) begin
                mul_start = 1'b1;
                mul_a     = x_cur ^ (dec_q ? blk : (blk ^ aes_out));
                if (in_valid && in_ready) begin                   // next block at once
                  aes_start = 1'b1;
                  aes_in    = gcm_ctr(iv_q, 32'(cnt) + 32'd3);
                end
              end
      S_LEN:  if (!mul_busy) begin
                mul_start = 1'b1;
                mul_a     = x_cur ^ {41'h0, n_aad_q, 7'h0, 41'h0, n_data_q, 7'h0};
              end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; iv_q <= '0; n_aad_q <= '0; n_data_q <= '0; cnt <= '0; dec_q <= 1'b0;
      h_q <= '0; ek0 <= '0; x <= '0; blk <= '0; tag_in_q <= '0;
      out_valid <= 1'b0; out_block <= '0; tag_valid <= 1'b0; tag <= '0; tag_ok <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      tag_valid <= 1'b0;
      if (mul_done) x <= mul_p;
      unique case (state)
        S_IDLE: if (start) begin
          iv_q <= iv; n_aad_q <= n_aad; n_data_q <= n_data; dec_q <= decrypt;
          tag_in_q <= tag_in; cnt <= '0; x <= '0;
          state <= S_H;
        end
        S_H: if (aes_done) begin
          h_q   <= aes_out;
          state <= S_E0;
        end
        S_E0: if (aes_done) begin
          ek0   <= aes_out;
          state <= S_AAD;
        end
        S_AAD: begin
          if (in_valid && in_ready) cnt <= cnt + 16'd1;
          else if (cnt == n_aad_q && !mul_busy) begin
            cnt   <= '0;
            state <= S_DATA;
          end
        end
        S_DATA: begin
          if (in_valid && in_ready) begin
            blk   <= in_block;
            state <= S_DWAIT;
          end else if (cnt == n_data_q && !mul_busy) begin
            state <= S_LEN;
          end
        end
        S_DWAIT: if (aes_done) begin
          out_valid <= 1'b1;
          out_block <= blk ^ aes_out;
          cnt       <= cnt + 16'd1;
          if (in_valid && in_ready) blk <= in_block;
          else state <= S_DATA;
        end
        S_LEN:   if (!mul_busy) state <= S_LWAIT;
        S_LWAIT: if (mul_done) state <= S_TAG;
        S_TAG: begin
          tag       <= x ^ ek0;
          tag_ok    <= ((x ^ ek0) == tag_in_q);
          tag_valid <= 1'b1;
          state     <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
