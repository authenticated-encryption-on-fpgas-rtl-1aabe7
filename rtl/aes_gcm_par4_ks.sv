// aes_gcm_par4_ks: 4-parallel key-synthesized AES-GCM, 512 bits per clock.
//
// Four key-synthesized pipelined AES cores share the same constant round
// keys and encrypt four consecutive counters each clock; a four-lane GHASH
// (ghash_par4_fixed) with constant operands H^4, H^3, H^2, H absorbs the four
// resulting ciphertext blocks in the same clock, so there is no throughput
// loss from a multiplier pipeline: throughput = f * 128 * 4.
//
// Operation (one message), block groups of 4 x 128 bits:
//   `start` with `iv`, `n_aad` and `n_data` counted in 512-bit groups and
//   `decrypt`. CTR0 = IV||1 is encrypted first (lane 0) and kept. Then
//   n_aad AAD groups and n_data text groups are accepted, one per clock
//   while `in_ready`. Text group g uses counters IV||(4g+2) .. IV||(4g+5) on
//   lanes 0..3; in_block[511:384] is the first (oldest) block. 11 clocks
//   later out_block = in ^ keystream. GHASH absorbs AAD and ciphertext
//   groups, then the length block on lane 3 alone, and the tag
//   X ^ E(CTR0) appears on `tag_valid`. Messages are whole groups.
module aes_gcm_par4_ks
  import aes_pkg::*;
#(
  parameter block_t KEY = 128'h000102030405060708090a0b0c0d0e0f
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         start,
  input  logic [95:0]  iv,
  input  logic [15:0]  n_aad,
  input  logic [15:0]  n_data,
  input  logic         decrypt,
  output logic         busy,
  input  logic         in_valid,
  output logic         in_ready,
  input  logic [511:0] in_block,
  output logic         out_valid,
  output logic [511:0] out_block,
  output logic         tag_valid,
  output block_t       tag
);
  localparam block_t H = aes128_encrypt(KEY, '0);

  typedef enum logic [2:0] {S_IDLE, S_CTR0, S_FEED, S_DRAIN, S_LEN, S_TAG} state_t;
  typedef struct packed {
    logic   ctr0;
    logic   aad;
  } tag_sb_t;

  state_t      state;
  logic [95:0] iv_q;
  logic [15:0] n_aad_q, n_data_q;
  logic [16:0] fed, hashed, total;
  logic        dec_q;
  block_t      ek0;
  logic        ek0_ok;   // E(CTR0) has left the pipeline (matters for empty messages)
  logic        take;

  assign total    = {1'b0, n_aad_q} + {1'b0, n_data_q};
  assign in_ready = (state == S_FEED) && (fed < total);
  assign take     = in_valid && in_ready;
  assign busy     = (state != S_IDLE);

  logic         p_in_valid;
  tag_sb_t      p_in_tag;
  logic [3:0]   p_out_valid;
  tag_sb_t      p_out_tag [4];
  block_t [3:0] p_in_block, p_out_block, p_in_data, p_out_data;
  logic [31:0]  grp_ctr;

  assign grp_ctr = ((32'(fed) - 32'(n_aad_q)) << 2) + 32'd2;

  always_comb begin
    p_in_valid = 1'b0;
    p_in_tag   = '0;
    p_in_block = '0;
    p_in_data  = '0;
    if (state == S_CTR0) begin
      p_in_valid    = 1'b1;
      p_in_tag.ctr0 = 1'b1;
      p_in_block[3] = gcm_ctr(iv_q, 32'd1);
    end else if (take) begin
      p_in_valid   = 1'b1;
      p_in_tag.aad = (fed < {1'b0, n_aad_q});
      p_in_data    = in_block;
      for (int j = 0; j < 4; j++) p_in_block[3-j] = gcm_ctr(iv_q, grp_ctr + 32'(j));
    end
  end

  for (genvar j = 0; j < 4; j++) begin : g_core
    aes128_pipe_ks #(.KEY(KEY), .SB_W(128 + $bits(tag_sb_t))) u_aes (
      .clk, .rst_n,
      .in_valid(p_in_valid), .in_block(p_in_block[3-j]),
      .in_sb({p_in_tag, p_in_data[3-j]}),
      .out_valid(p_out_valid[j]), .out_block(p_out_block[3-j]),
      .out_sb({p_out_tag[j], p_out_data[3-j]})
    );
  end

  logic         g_valid;
  logic [3:0]   g_mask;
  block_t [3:0] g_in, ct;
  block_t       x;

  assign ct = p_out_data ^ p_out_block;

  always_comb begin
    g_valid = 1'b0;
    g_mask  = 4'b0000;
    g_in    = '0;
    if (p_out_valid[0] && !p_out_tag[0].ctr0) begin
      g_valid = 1'b1;
      g_mask  = 4'b1111;
      g_in    = (p_out_tag[0].aad || dec_q) ? p_out_data : ct;
    end else if (state == S_LEN) begin
      g_valid = 1'b1;
      g_mask  = 4'b0001;
      g_in[0] = {39'h0, n_aad_q, 9'h0, 39'h0, n_data_q, 9'h0};
    end
  end

  ghash_par4_fixed #(.H(H)) u_ghash (
    .clk, .rst_n, .clear(state == S_IDLE && start), .in_valid(g_valid),
    .mask(g_mask), .c(g_in), .x
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; iv_q <= '0; n_aad_q <= '0; n_data_q <= '0; dec_q <= 1'b0;
      fed <= '0; hashed <= '0; ek0 <= '0; ek0_ok <= 1'b0;
      out_valid <= 1'b0; out_block <= '0; tag_valid <= 1'b0; tag <= '0;
    end else begin
      out_valid <= 1'b0;
      tag_valid <= 1'b0;
      if (p_out_valid[0] && p_out_tag[0].ctr0) begin
        ek0    <= p_out_block[3];
        ek0_ok <= 1'b1;
      end
      if (p_out_valid[0] && !p_out_tag[0].ctr0) begin
        hashed <= hashed + 17'd1;
        if (!p_out_tag[0].aad) begin
          out_valid <= 1'b1;
          out_block <= ct;
        end
      end
      if (take) fed <= fed + 17'd1;
      unique case (state)
        S_IDLE: if (start) begin
          iv_q <= iv; n_aad_q <= n_aad; n_data_q <= n_data; dec_q <= decrypt;
          fed <= '0; hashed <= '0; ek0_ok <= 1'b0;
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
