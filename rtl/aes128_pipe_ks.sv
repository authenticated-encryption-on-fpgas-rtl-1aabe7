// aes128_pipe_ks: key-synthesized, fully unrolled and pipelined AES-128
// encryption.
//
// The key is a parameter. Its eleven round keys k0..k10 are computed at
// elaboration (aes_pkg::expand_key), so no key schedule exists in hardware:
// each round XORs a constant, which synthesis folds into the round logic.
// Changing the key means rebuilding the design (loading a new bitstream).
// Default KEY is 000102...0f, whose round keys are the ones this design is
// usually checked against (k1 = d6aa74fd..., k10 = 13111d7f...).
//
// Structure: an AddRoundKey stage followed by ten rounds, each ending in a
// register, so the latency is 11 clocks and one block is accepted every
// clock. A sideband word of SB_W bits (e.g. the plaintext to be XORed with
// the key stream, or a block tag) travels alongside in lockstep.
module aes128_pipe_ks
  import aes_pkg::*;
#(
  parameter block_t KEY  = 128'h000102030405060708090a0b0c0d0e0f,
  parameter int     SB_W = 1
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            in_valid,
  input  block_t          in_block,
  input  logic [SB_W-1:0] in_sb,
  output logic            out_valid,
  output block_t          out_block,
  output logic [SB_W-1:0] out_sb
);
  localparam round_keys_t RK = expand_key(KEY);
  localparam int LAT = 11;

  block_t            st  [LAT];
  logic              vld [LAT];
  logic [SB_W-1:0]   sb  [LAT];
  block_t            rnd [1:10];

  for (genvar r = 1; r <= 10; r++) begin : g_round
    aes_round #(.FINAL(r == 10)) u_round (.in(st[r-1]), .rk(RK[r]), .out(rnd[r]));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < LAT; i++) begin
        vld[i] <= 1'b0;
        st[i]  <= '0;
        sb[i]  <= '0;
      end
    end else begin
      vld[0] <= in_valid;
      st[0]  <= in_block ^ RK[0];
      sb[0]  <= in_sb;
      for (int i = 1; i < LAT; i++) begin
        vld[i] <= vld[i-1];
        st[i]  <= rnd[i];
        sb[i]  <= sb[i-1];
      end
    end
  end

  assign out_valid = vld[LAT-1];
  assign out_block = st[LAT-1];
  assign out_sb    = sb[LAT-1];
endmodule
