// aes_gcm_ks: key-synthesized AES-GCM (128-bit key, 96-bit IV) for
// applications whose key changes rarely, such as VPN links.
//
// The key is a parameter: the pipelined AES (aes128_pipe_ks) holds constant
// round keys, and H = E(K, 0^128), being a function of the key only, is also
// computed at elaboration, so the GHASH multiplier is the fixed-operand
// gf128_mul_fixed. A key change is a rebuild.
//
// Operation (one message):
//   1. `start` with `iv`, `n_aad`, `n_data` (block counts) and `decrypt`.
//   2. The core sends CTR0 = IV||0^31||1 into the AES pipeline; E(CTR0) is
//      kept for the tag.
//   3. It accepts n_aad AAD blocks and then n_data text blocks, one per
//      clock while `in_ready`. Each text block takes counter IV||(j+2) and
//      leaves 11 clocks later as out_block = in ^ E(CTR), on `out_valid`.
//      AAD blocks travel the same pipeline unencrypted so that GHASH sees
//      all blocks in order.
//   4. GHASH: X <- (X ^ B) * H, one block per clock, over the AAD blocks and
//      the ciphertext blocks (the input when decrypting), then over the
//      length block len(A)||len(C) in bits.
//   5. tag = X ^ E(CTR0), on `tag_valid` for one clock.
// Only whole 128-bit blocks are handled. Throughput: one block per clock.
module aes_gcm_ks
  import aes_pkg::*;
#(
  parameter block_t KEY = 128'h000102030405060708090a0b0c0d0e0f
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  logic [95:0] iv,
  input  logic [15:0] n_aad,
  input  logic [15:0] n_data,
  input  logic        decrypt,
  output logic        busy,
  input  logic        in_valid,
  output logic        in_ready,
  input  block_t      in_block,
  output logic        out_valid,
  output block_t      out_block,
  output logic        tag_valid,
  output block_t      tag
);
  localparam block_t H = aes128_encrypt(KEY, '0);

  typedef enum logic [2:0] {S_IDLE, S_CTR0, S_FEED, S_DRAIN, S_LEN, S_TAG} state_t;
  typedef struct packed {
    logic   ctr0;
    logic   aad;
    block_t data;
  } sb_t;

  state_t      state;
  logic [95:0] iv_q;
  logic [15:0] n_aad_q, n_data_q;
  logic [16:0] fed, hashed;
  logic        dec_q;
  block_t      ek0, x;
  logic        ek0_ok;   // E(CTR0) has left the pipeline (matters for empty messages)

  logic   p_in_valid, p_out_valid;
  block_t p_in_block, p_out_block;
  sb_t    p_in_sb, p_out_sb;
  logic   take;
  logic [16:0] total;

  assign total    = {1'b0, n_aad_q} + {1'b0, n_data_q};
  assign in_ready = (state == S_FEED) && (fed < total);
  assign take     = in_valid && in_ready;
  assign busy     = (state != S_IDLE);

  always_comb begin
    p_in_valid = 1'b0;
    p_in_block = '0;
    p_in_sb    = '0;
    if (state == S_CTR0) begin
      p_in_valid   = 1'b1;
      p_in_block   = gcm_ctr(iv_q, 32'd1);
      p_in_sb.ctr0 = 1'b1;
    end else if (take) begin
      p_in_valid   = 1'b1;
      p_in_block   = gcm_ctr(iv_q, 32'(fed) - 32'(n_aad_q) + 32'd2);
      p_in_sb.aad  = (fed < {1'b0, n_aad_q});
      p_in_sb.data = in_block;
    end
  end

  aes128_pipe_ks #(.KEY(KEY), .SB_W($bits(sb_t))) u_aes (
    .clk, .rst_n,
    .in_valid(p_in_valid), .in_block(p_in_block), .in_sb(p_in_sb),
    .out_valid(p_out_valid), .out_block(p_out_block), .out_sb(p_out_sb)
  );

  // Block offered to GHASH this clock.
  logic   h_valid;
  block_t h_block, ct;

  assign ct = p_out_sb.data ^ p_out_block;

  always_comb begin
    h_valid = 1'b0;
    h_block = '0;
    if (p_out_valid && !p_out_sb.ctr0) begin
      h_valid = 1'b1;
      h_block = p_out_sb.aad ? p_out_sb.data : (dec_q ? p_out_sb.data : ct);
    end else if (state == S_LEN) begin
      h_valid = 1'b1;
      h_block = {41'h0, n_aad_q, 7'h0, 41'h0, n_data_q, 7'h0};
    end
  end

  block_t x_next;
  gf128_mul_fixed #(.H(H)) u_mul (.a(x ^ h_block), .p(x_next));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; iv_q <= '0; n_aad_q <= '0; n_data_q <= '0; dec_q <= 1'b0;
      fed <= '0; hashed <= '0; ek0 <= '0; ek0_ok <= 1'b0; x <= '0;
      out_valid <= 1'b0; out_block <= '0; tag_valid <= 1'b0; tag <= '0;
    end else begin
      out_valid <= 1'b0;
      tag_valid <= 1'b0;
      if (p_out_valid && p_out_sb.ctr0) begin
        ek0    <= p_out_block;
        ek0_ok <= 1'b1;
      end
      if (p_out_valid && !p_out_sb.ctr0) begin
        hashed <= hashed + 17'd1;
        if (!p_out_sb.aad) begin
          out_valid <= 1'b1;
          out_block <= ct;
        end
      end
      if (h_valid) x <= x_next;
      if (take) fed <= fed + 17'd1;
      unique case (state)
        S_IDLE: if (start) begin
          iv_q <= iv; n_aad_q <= n_aad; n_data_q <= n_data; dec_q <= decrypt;
          fed <= '0; hashed <= '0; x <= '0; ek0_ok <= 1'b0;
          state <= S_CTR0;
        end
        S_CTR0:  state <= S_FEED;
        S_FEED:  if (fed == total || (take && fed + 17'd1 == total)) state <= S_DRAIN;
        S_DRAIN: if (hashed == total && ek0_ok) state <= S_LEN;
        S_LEN:   state <= S_TAG;
        S_TAG: begin
          tag       <= x ^ ek0;
          tag_valid <= 1'b1;
          state     <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
