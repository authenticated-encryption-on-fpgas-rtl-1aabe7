// aes_ccm_lc: low-cost AES-CCM for bitstream decryption and authentication
// in the static part of an FPGA, using a single compact AES for both the
// CTR (privacy) and the CBC-MAC (authentication) passes.
//
// CCM is not online: the MAC covers the plaintext, which must be run
// through CBC with the same AES that decrypts it, so the plaintext blocks
// are kept in a block memory (MEM_DEPTH x 128 bits) between the passes.
// Each AES operation takes 50 clocks, and each text block needs two (one
// CTR, one CBC): throughput f * 128 / (50 * 2).
//
// The caller formats the CBC header blocks (B0 carrying flags, nonce and
// length, then the formatted associated data) and the counter block A0 =
// `ctr0`; counter block j is ctr0 with its low 32 bits increased by j.
// Per message (`start` with `ctr0`, `n_hdr`, `n_data`, `decrypt`, `tag_in`),
// the input stream carries the n_hdr header blocks and then the n_data text
// blocks (in_valid / in_ready):
//   decrypt: S0 = E(A0); header CBC Y <- E(Y ^ B); each ciphertext block
//            gives P = C ^ E(A_j), sent on out_valid and stored; then CBC
//            over the stored plaintext;
//   encrypt: header CBC; each plaintext block is stored and CBC-chained;
//            then S0 = E(A0) and the stored blocks are encrypted in CTR mode
//            and sent on out_valid.
// The tag Y ^ S0 (full 128 bits) appears on `tag_valid`, with `tag_ok` =
// (tag == tag_in).
module aes_ccm_lc
  import aes_pkg::*;
#(
  parameter int MEM_DEPTH = 64
) (
  input  logic        clk,
  input  logic        rst_n,
  input  block_t      key,
  input  logic        start,
  input  block_t      ctr0,
  input  logic [15:0] n_hdr,
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
  localparam int AW = $clog2(MEM_DEPTH);

  typedef enum logic [3:0] {S_IDLE, S_S0, S_HDR, S_TEXT, S_MAC, S_CTR, S_TAG} state_t;

  state_t      state;
  block_t      ctr0_q, tag_in_q, s0, y, blk;
  logic [15:0] n_hdr_q, n_data_q, cnt;
  logic        dec_q, wait_aes;
  block_t      mem [MEM_DEPTH];

  logic   aes_start, aes_busy, aes_done;
  block_t aes_in, aes_out, mem_rd;

  aes128_quarter u_aes (.clk, .rst_n, .key, .start(aes_start), .in_block(aes_in),
                        .busy(aes_busy), .done(aes_done), .out_block(aes_out));

  assign mem_rd   = mem[AW'(cnt)];
  assign busy     = (state != S_IDLE);
  assign in_ready = !wait_aes && !aes_busy &&
                    ((state == S_HDR && cnt != n_hdr_q) || (state == S_TEXT && cnt != n_data_q));

  function automatic block_t ctr_add(input block_t c, input logic [15:0] j);
    return {c[127:32], c[31:0] + 32'(j)};
  endfunction

  // Start of each AES operation.
  always_comb begin
    aes_start = 1'b0;
    aes_in    = '0;
    unique case (state)
      S_S0:   if (!wait_aes) begin aes_start = 1'b1; aes_in = ctr0_q; end
      S_HDR:  if (in_valid && in_ready) begin aes_start = 1'b1; aes_in = y ^ in_block; end
      S_TEXT: if (in_valid && in_ready) begin
                aes_start = 1'b1;
                aes_in    = dec_q ? ctr_add(ctr0_q, cnt + 16'd1) : (y ^ in_block);
              end
      S_MAC:  if (!wait_aes && cnt != n_data_q) begin aes_start = 1'b1; aes_in = y ^ mem_rd; end
      S_CTR:  if (!wait_aes && cnt != n_data_q) begin
                aes_start = 1'b1;
                aes_in    = ctr_add(ctr0_q, cnt + 16'd1);
              end
      default: ;
    endcase
  end

  always_ff @(posedge clk) begin
    if (state == S_TEXT && in_valid && in_ready && !dec_q) mem[AW'(cnt)] <= in_block;
    if (state == S_TEXT && dec_q && wait_aes && aes_done) mem[AW'(cnt)] <= blk ^ aes_out;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; ctr0_q <= '0; tag_in_q <= '0; s0 <= '0; y <= '0; blk <= '0;
      n_hdr_q <= '0; n_data_q <= '0; cnt <= '0; dec_q <= 1'b0; wait_aes <= 1'b0;
      out_valid <= 1'b0; out_block <= '0; tag_valid <= 1'b0; tag <= '0; tag_ok <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      tag_valid <= 1'b0;
      if (aes_start) wait_aes <= 1'b1;
      if (aes_done)  wait_aes <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          ctr0_q <= ctr0; tag_in_q <= tag_in; n_hdr_q <= n_hdr; n_data_q <= n_data;
          dec_q <= decrypt; cnt <= '0; y <= '0; wait_aes <= 1'b0;
          state <= decrypt ? S_S0 : S_HDR;
        end
        S_S0: if (wait_aes && aes_done) begin
          s0    <= aes_out;
          cnt   <= '0;
          state <= dec_q ? S_HDR : S_CTR;
        end
        S_HDR: begin
          if (wait_aes && aes_done) begin
            y   <= aes_out;
            cnt <= cnt + 16'd1;
          end else if (!wait_aes && cnt == n_hdr_q) begin
            cnt   <= '0;
            state <= S_TEXT;
          end
        end
        S_TEXT: begin
          if (in_valid && in_ready) blk <= in_block;
          if (wait_aes && aes_done) begin
            cnt <= cnt + 16'd1;
            if (dec_q) begin
              out_valid <= 1'b1;
              out_block <= blk ^ aes_out;
            end else begin
              y <= aes_out;
            end
          end else if (!wait_aes && cnt == n_data_q) begin
            cnt   <= '0;
            state <= dec_q ? S_MAC : S_S0;
          end
        end
        S_MAC: begin
          if (wait_aes && aes_done) begin
            y   <= aes_out;
            cnt <= cnt + 16'd1;
          end else if (!wait_aes && cnt == n_data_q) begin
            state <= S_TAG;
          end
        end
        S_CTR: begin
          if (wait_aes && aes_done) begin
            out_valid <= 1'b1;
            out_block <= mem_rd ^ aes_out;
            cnt       <= cnt + 16'd1;
          end else if (!wait_aes && cnt == n_data_q) begin
            state <= S_TAG;
          end
        end
        S_TAG: begin
          tag       <= y ^ s0;
          tag_ok    <= ((y ^ s0) == tag_in_q);
          tag_valid <= 1'b1;
          state     <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
