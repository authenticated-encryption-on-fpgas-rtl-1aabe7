// aegis128_fast: high-speed AEGIS-128 with five AES rounds working in
// parallel, so the whole 80-byte state is updated in one clock.
//
// State update: S0' = R(S4, S0 ^ m), Sj' = R(S(j-1), Sj) for j = 1..4,
// with R(A, B) = MixColumns(ShiftRows(SubBytes(A))) ^ B (aes_round, not
// final). The message word m is chosen by one multiplexer among the key,
// key ^ IV (initialization), the plaintext (encryption) and S3 ^ tmp
// (finalization); the state registers load either the initial state or the
// updated one.
//
// Sequence: `start` with `key`, `iv`, `n_data` (whole 128-bit blocks) and
// `decrypt`. Initialization: S = {IV, const1, const0, K^const0, K^const1},
// then 10 updates with m = K, K^IV, K, ... (10 clocks). Then one block per
// clock while `in_ready`: out = in ^ S1 ^ S4 ^ (S2 & S3), registered to
// `out_valid` one clock later, and the state absorbs the plaintext.
// Finalization: tmp = len(AD) || len(M) as 64-bit little-endian bit counts
// (no associated data here, so len(AD) = 0), m = S3 ^ tmp for 7 updates;
// tag = S0 ^ S1 ^ S2 ^ S3 ^ S4 on `tag_valid`. Throughput f * 128.
module aegis128_fast
  import aes_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  block_t      key,
  input  block_t      iv,
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
  typedef enum logic [1:0] {S_IDLE, S_INIT, S_DATA, S_FINAL} state_t;

  state_t      state;
  block_t      s [5];
  block_t      s_next [5];
  block_t      k_q, iv_q, m, fin_m, ks;
  logic [15:0] n_q, cnt;
  logic        dec_q, step;

  function automatic logic [63:0] le64(input logic [63:0] v);
    logic [63:0] r;
    for (int b = 0; b < 8; b++) r[63-8*b -: 8] = v[8*b +: 8];
    return r;
  endfunction

  assign ks       = s[1] ^ s[4] ^ (s[2] & s[3]);
  assign in_ready = (state == S_DATA) && (cnt != n_q);
  assign busy     = (state != S_IDLE);

  // Message multiplexer.
  always_comb begin
    m    = '0;
    step = 1'b0;
    unique case (state)
      S_INIT: begin
        m    = cnt[0] ? (k_q ^ iv_q) : k_q;
        step = 1'b1;
      end
      S_DATA: begin
        m    = dec_q ? (in_block ^ ks) : in_block;
        step = in_valid && in_ready;
      end
      S_FINAL: begin
        m    = fin_m;
        step = 1'b1;
      end
      default: ;
    endcase
  end

  aes_round u_r0 (.in(s[4]), .rk(s[0] ^ m), .out(s_next[0]));
  for (genvar j = 1; j < 5; j++) begin : g_round
    aes_round u_r (.in(s[j-1]), .rk(s[j]), .out(s_next[j]));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE; k_q <= '0; iv_q <= '0; n_q <= '0; cnt <= '0; dec_q <= 1'b0;
      fin_m <= '0; out_valid <= 1'b0; out_block <= '0; tag_valid <= 1'b0; tag <= '0;
      for (int j = 0; j < 5; j++) s[j] <= '0;
    end else begin
      out_valid <= 1'b0;
      tag_valid <= 1'b0;
      if (step) for (int j = 0; j < 5; j++) s[j] <= s_next[j];
      unique case (state)
        S_IDLE: if (start) begin
          k_q <= key; iv_q <= iv; n_q <= n_data; dec_q <= decrypt; cnt <= '0;
          s[0] <= iv;
          s[1] <= AEGIS_CONST1;
          s[2] <= AEGIS_CONST0;
          s[3] <= key ^ AEGIS_CONST0;
          s[4] <= key ^ AEGIS_CONST1;
          state <= S_INIT;
        end
        S_INIT: begin
          cnt <= cnt + 16'd1;
          if (cnt == 16'd9) begin
            cnt   <= '0;
            state <= S_DATA;
          end
        end
        S_DATA: begin
          if (step) begin
            out_valid <= 1'b1;
            out_block <= in_block ^ ks;
            cnt       <= cnt + 16'd1;
          end
          if (cnt == n_q) begin
            fin_m <= s[3] ^ {64'h0, le64({41'h0, n_q, 7'h0})};
            cnt   <= '0;
            state <= S_FINAL;
          end
        end
        S_FINAL: begin
          cnt <= cnt + 16'd1;
          if (cnt == 16'd6) begin
            tag       <= s_next[0] ^ s_next[1] ^ s_next[2] ^ s_next[3] ^ s_next[4];
            tag_valid <= 1'b1;
            state     <= S_IDLE;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule
