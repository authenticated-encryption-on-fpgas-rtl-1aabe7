// aes128_quarter: compact AES-128 encryption on a 32-bit datapath
// ("1/4 round-based"): four S-boxes and one MixColumns.
//
// The 128-bit state is kept whole so that ShiftRows is free wiring; a 4:1
// multiplexer picks one ShiftRows column per clock, which goes through the
// four S-boxes, MixColumns (bypassed in round 10) and the XOR with one
// 32-bit round-key word, into a 4 x 32-bit result register. The same four
// S-boxes also compute SubWord(RotWord(w3)) for the key schedule, which
// therefore costs one extra clock per round. Each round takes 5 clocks
// (1 key-schedule clock + 4 column clocks) and a block 10 x 5 = 50 clocks:
// throughput f * 128 / 50.
//
// Interface: hold `key`; pulse `start` with `in_block` while `busy` is low.
// The initial AddRoundKey is done on loading; `done` pulses with
// `out_block` valid after the loading clock plus 50 round clocks (seen 51
// rising edges after the one that takes `start`), and `out_block` holds until the
// next start. The round keys are re-derived from `key` for every block.
module aes128_quarter
  import aes_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  block_t key,
  input  logic   start,
  input  block_t in_block,
  output logic   busy,
  output logic   done,
  output block_t out_block
);
  block_t     st, rk;
  logic [3:0] rnd;        // 1..10
  logic [2:0] phase;      // 0: key schedule, 1..4: column phase-1
  word_t      sb_in, sb_out, col_out;
  block_t     res;        // result register, columns filled one by one
  logic [1:0] colsel;

  assign colsel = 2'(phase - 3'd1);

  always_comb begin
    if (phase == 3'd0) sb_in = rot_word(rk[31:0]);
    else               sb_in = shifted_column(st, colsel);
  end

  for (genvar b = 0; b < 4; b++) begin : g_sbox
    aes_sbox u_sbox (.in(sb_in[31-8*b -: 8]), .out(sb_out[31-8*b -: 8]));
  end

  always_comb begin
    word_t mc;
    mc      = (rnd == 4'd10) ? sb_out : mix_column(sb_out);
    col_out = mc ^ rk[127-32*colsel -: 32];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= '0; rk <= '0; rnd <= 4'd1; phase <= '0; busy <= 1'b0; done <= 1'b0;
      res <= '0; out_block <= '0;
    end else begin
      done <= 1'b0;
      if (start && !busy) begin
        st    <= in_block ^ key;
        rk    <= key;
        rnd   <= 4'd1;
        phase <= 3'd0;
        busy  <= 1'b1;
      end else if (busy) begin
        if (phase == 3'd0) begin
          rk    <= next_round_key(rk, sb_out, rcon(int'(rnd)));
          phase <= 3'd1;
        end else begin
          res[127-32*colsel -: 32] <= col_out;
          if (phase == 3'd4) begin
            st    <= {res[127:32], col_out};
            phase <= 3'd0;
            if (rnd == 4'd10) begin
              busy      <= 1'b0;
              done      <= 1'b1;
              out_block <= {res[127:32], col_out};
            end else begin
              rnd <= rnd + 4'd1;
            end
          end else begin
            phase <= phase + 3'd1;
          end
        end
      end
    end
  end
endmodule
