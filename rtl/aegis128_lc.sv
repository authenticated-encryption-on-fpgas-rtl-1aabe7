// aegis128_lc: low-cost AEGIS-128 built on one quarter AES round (four
// S-boxes, one MixColumns), for bitstream decryption and authentication in
// the static part of an FPGA.
//
// The state update S0' = R(S4, S0 ^ m), Sj' = R(S(j-1), Sj) (R = AES round
// keyed by its second argument) is computed one 32-bit column at a time:
// the full ShiftRows of the source word is wiring, a 4:1 multiplexer picks
// column c, and S-boxes, MixColumns and the XOR with column c of the key
// word give column c of the new word. The five words are updated in the
// order S4, S3, S2, S1, S0, each in place: the source S(j-1) of word j is
// still old when word j is written. S0' needs the old S4, so a 128-bit FIFO
// register takes a copy of S4 at the start of each update. One update is
// 5 words x 4 columns = 20 clocks.
//
// Sequence: `start` with `key`, `iv`, `n_data` (whole blocks), `decrypt`,
// `tag_in`. Initialization: 10 updates (200 clocks) with m = K, K^IV, ...
// Each text block (in_valid / in_ready): out = in ^ S1 ^ S4 ^ (S2 & S3)
// leaves at once on out_valid, the plaintext is latched as m and the state
// updated (20 clocks: throughput f * 128 / 20). Finalization: m = S3 ^ tmp,
// tmp = len(AD) || len(M) as 64-bit little-endian bit counts (no associated
// data: len(AD) = 0), for 7 updates; tag = S0^S1^S2^S3^S4 on `tag_valid`
// with `tag_ok` = (tag == tag_in).
module aegis128_lc
  import aes_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  block_t      key,
  input  block_t      iv,
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
  typedef enum logic [2:0] {S_IDLE, S_INIT, S_DATA, S_FINAL, S_TAG} state_t;

  state_t      state;
  block_t      s [5];
  block_t      fifo, m_q, k_q, iv_q, tag_in_q, ks;
  logic [15:0] n_q, cnt;
  logic        dec_q, upd;        // upd: a state update is in progress
  logic [2:0]  wsel;              // word being updated, 4 down to 0
  logic [1:0]  col;

  function automatic logic [63:0] le64(input logic [63:0] v);
    logic [63:0] r;
    for (int b = 0; b < 8; b++) r[63-8*b -: 8] = v[8*b +: 8];
    return r;
  endfunction

  assign ks       = s[1] ^ s[4] ^ (s[2] & s[3]);
  assign busy     = (state != S_IDLE);
  // A new update may begin in the clock that writes the last column of the
  // previous one, so updates follow each other without a gap.
  logic last_col;
  assign last_col = upd && (wsel == 3'd0) && (col == 2'd3);
  assign in_ready = (state == S_DATA) && (!upd || last_col) && (cnt != n_q);

  // Quarter round datapath.
  block_t src, kw;
  word_t  sb_in, sb_out, new_col;

  always_comb begin
    src = fifo;
    kw  = s[0] ^ m_q;
    for (int j = 1; j < 5; j++)
      if (int'(wsel) == j) begin
        src = s[j-1];
        kw  = s[j];
      end
    sb_in = shifted_column(src, col);
  end

  for (genvar b = 0; b < 4; b++) begin : g_sbox
    aes_sbox u_sbox (.in(sb_in[31-8*b -: 8]), .out(sb_out[31-8*b -: 8]));
  end

  assign new_col = mix_column(sb_out) ^ kw[127-32*col -: 32];

  logic begin_upd;
  block_t begin_m;

  always_comb begin
    begin_upd = 1'b0;
    begin_m   = '0;
    unique case (state)
      S_INIT:  if (!upd || (last_col && cnt != 16'd9)) begin
                 begin_upd = 1'b1;
                 begin_m   = (upd ? !cnt[0] : cnt[0]) ? (k_q ^ iv_q) : k_q;
               end
      S_DATA:  if (in_valid && in_ready) begin
                 begin_upd = 1'b1;
                 begin_m   = dec_q ? (in_block ^ ks) : in_block;
               end
      S_FINAL: if (!upd || (last_col && cnt != 16'd6)) begin
                 begin_upd = 1'b1;
                 begin_m   = m_q;
               end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; fifo <= '0; m_q <= '0; k_q <= '0; iv_q <= '0; tag_in_q <= '0;
      n_q <= '0; cnt <= '0; dec_q <= 1'b0; upd <= 1'b0; wsel <= '0; col <= '0;
      out_valid <= 1'b0; out_block <= '0; tag_valid <= 1'b0; tag <= '0; tag_ok <= 1'b0;
      for (int j = 0; j < 5; j++) s[j] <= '0;
    end else begin
      out_valid <= 1'b0;
      tag_valid <= 1'b0;
      if (upd) begin
        for (int j = 0; j < 5; j++)
          if (int'(wsel) == j) s[j][127-32*col -: 32] <= new_col;
        col <= col + 2'd1;
        if (col == 2'd3) begin
          if (wsel == 3'd0) upd <= 1'b0;
          else              wsel <= wsel - 3'd1;
        end
      end
      // S4 is already final when the last column of S0 is written.
      if (begin_upd) begin
        upd  <= 1'b1;
        fifo <= s[4];
        m_q  <= begin_m;
        wsel <= 3'd4;
        col  <= 2'd0;
      end
      unique case (state)
        S_IDLE: if (start) begin
          k_q <= key; iv_q <= iv; n_q <= n_data; dec_q <= decrypt; tag_in_q <= tag_in;
          cnt <= '0;
          s[0] <= iv;
          s[1] <= AEGIS_CONST1;
          s[2] <= AEGIS_CONST0;
          s[3] <= key ^ AEGIS_CONST0;
          s[4] <= key ^ AEGIS_CONST1;
          state <= S_INIT;
        end
        S_INIT: if (last_col) begin
          cnt <= cnt + 16'd1;
          if (cnt == 16'd9) begin
            cnt   <= '0;
            state <= S_DATA;
          end
        end
        S_DATA: begin
          if (begin_upd) begin
            out_valid <= 1'b1;
            out_block <= in_block ^ ks;
            cnt       <= cnt + 16'd1;       // blocks taken
          end
          if (!upd && !begin_upd && cnt == n_q) begin
            m_q   <= s[3] ^ {64'h0, le64({41'h0, n_q, 7'h0})};
            cnt   <= '0;
            state <= S_FINAL;
          end
        end
        S_FINAL: if (last_col) begin
          cnt <= cnt + 16'd1;
          if (cnt == 16'd6) state <= S_TAG;
        end
        S_TAG: begin
          tag       <= s[0] ^ s[1] ^ s[2] ^ s[3] ^ s[4];
          tag_ok    <= ((s[0] ^ s[1] ^ s[2] ^ s[3] ^ s[4]) == tag_in_q);
          tag_valid <= 1'b1;
          state     <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
