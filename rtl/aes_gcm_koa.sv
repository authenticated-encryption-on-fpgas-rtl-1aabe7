// aes_gcm_koa: key-independent high-speed AES-GCM (128-bit key, 96-bit IV)
// with a pipelined AES and the feedback-free KOA GHASH.
//
// Key set-up (`key_load` with `key`): the run-time key schedule builds
// k0..k10 (11 clocks), the pipeline encrypts 0^128 to give H (11 clocks),
// and the GHASH fills its memory with H^2..H^NMAX (252 clocks for NMAX =
// 64). `ready` then rises. No rebuild is needed for a new key.
//
// Per message (`start` with `iv`, `n_aad`, `n_data`, `decrypt`): the
// message holds at most NMAX - 1 blocks, since GHASH also absorbs the
// length block. CTR0 = IV||1 is encrypted and kept; n_aad AAD blocks and
// n_data text blocks are then accepted one per clock while `in_ready`,
// text block j using counter IV||(j+2). out_block = in ^ E(CTR) leaves 11
// clocks after its input. Every AAD and ciphertext block goes to GHASH as
// it leaves the pipeline, followed by len(A)||len(C); tag = GHASH ^ E(CTR0)
// on `tag_valid`. Only whole blocks are handled.
module aes_gcm_koa
  import aes_pkg::*;
#(
  parameter int NMAX = 64
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        key_load,
  input  block_t      key,
  output logic        ready,
  input  logic        start,
  input  logic [95:0] iv,
  input  logic [15:0] n_aad,
  input  logic [15:0] n_data,
  input  logic        decrypt,
  input  logic        in_valid,
  output logic        in_ready,
  input  block_t      in_block,
  output logic        out_valid,
  output block_t      out_block,
  output logic        tag_valid,
  output block_t      tag
);
  localparam int NW = $clog2(NMAX) + 1;

  typedef enum logic [3:0] {S_KEY, S_HGEN, S_HWAIT, S_HINIT, S_IDLE, S_CTR0, S_FEED,
                            S_DRAIN, S_LEN, S_TAGW} state_t;
  typedef struct packed {
    logic   ctr0;
    logic   hgen;
    logic   aad;
    block_t data;
  } sb_t;

  state_t      state;
  logic [95:0] iv_q;
  logic [15:0] n_aad_q, n_data_q;
  logic [16:0] fed, total;
  logic        dec_q;
  block_t      ek0;
  logic        take, key_ready, h_ready;

  assign total    = {1'b0, n_aad_q} + {1'b0, n_data_q};
  assign in_ready = (state == S_FEED) && (fed < total);
  assign take     = in_valid && in_ready;
  assign ready    = (state == S_IDLE);

  logic   p_in_valid, p_out_valid;
  block_t p_in_block, p_out_block, ct;
  sb_t    p_in_sb, p_out_sb;

  always_comb begin
    p_in_valid = 1'b0;
    p_in_block = '0;
    p_in_sb    = '0;
    if (state == S_HGEN) begin
      p_in_valid   = 1'b1;
      p_in_sb.hgen = 1'b1;
    end else if (state == S_CTR0) begin
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

  aes128_pipe #(.SB_W($bits(sb_t))) u_aes (
    .clk, .rst_n, .key_load, .key, .key_ready,
    .in_valid(p_in_valid), .in_block(p_in_block), .in_sb(p_in_sb),
    .out_valid(p_out_valid), .out_block(p_out_block), .out_sb(p_out_sb)
  );

  assign ct = p_out_sb.data ^ p_out_block;

  logic   g_valid, z_valid;
  block_t g_block, z;

  always_comb begin
    g_valid = 1'b0;
    g_block = '0;
    if (p_out_valid && !p_out_sb.ctr0 && !p_out_sb.hgen) begin
      g_valid = 1'b1;
      g_block = (p_out_sb.aad || dec_q) ? p_out_sb.data : ct;
    end else if (state == S_LEN) begin
      g_valid = 1'b1;
      g_block = {41'h0, n_aad_q, 7'h0, 41'h0, n_data_q, 7'h0};
    end
  end

  logic [16:0] hashed;
  logic        ek0_ok;   // E(CTR0) has left the pipeline (matters for empty messages)

  ghash_koa #(.NMAX(NMAX)) u_ghash (
    .clk, .rst_n,
    .h_load(p_out_valid && p_out_sb.hgen), .h(p_out_block), .h_ready,
    .start(state == S_CTR0), .n(NW'(total + 17'd1)),
    .in_valid(g_valid), .in_block(g_block), .z_valid, .z
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_KEY; iv_q <= '0; n_aad_q <= '0; n_data_q <= '0; dec_q <= 1'b0;
      fed <= '0; hashed <= '0; ek0 <= '0; ek0_ok <= 1'b0;
      out_valid <= 1'b0; out_block <= '0; tag_valid <= 1'b0; tag <= '0;
    end else begin
      out_valid <= 1'b0;
      tag_valid <= 1'b0;
      if (p_out_valid && p_out_sb.ctr0) begin
        ek0    <= p_out_block;
        ek0_ok <= 1'b1;
      end
      if (p_out_valid && !p_out_sb.ctr0 && !p_out_sb.hgen) begin
        hashed <= hashed + 17'd1;
        if (!p_out_sb.aad) begin
          out_valid <= 1'b1;
          out_block <= ct;
        end
      end
      if (take) fed <= fed + 17'd1;
      if (key_load) begin
        state <= S_KEY;
      end else begin
        unique case (state)
          S_KEY:   if (key_ready) state <= S_HGEN;
          S_HGEN:  state <= S_HWAIT;
          S_HWAIT: if (p_out_valid && p_out_sb.hgen) state <= S_HINIT;
          S_HINIT: if (h_ready) state <= S_IDLE;
          S_IDLE: if (start) begin
            iv_q <= iv; n_aad_q <= n_aad; n_data_q <= n_data; dec_q <= decrypt;
            fed <= '0; hashed <= '0; ek0_ok <= 1'b0;
            state <= S_CTR0;
          end
          S_CTR0:  state <= S_FEED;
          S_FEED:  if (fed == total || (take && fed + 17'd1 == total)) state <= S_DRAIN;
          S_DRAIN: if (hashed == total && ek0_ok) state <= S_LEN;
          S_LEN:   state <= S_TAGW;
          S_TAGW: if (z_valid) begin
            tag       <= z ^ ek0;
            tag_valid <= 1'b1;
            state     <= S_IDLE;
          end
          default: state <= S_IDLE;
        endcase
      end
    end
  end
endmodule
