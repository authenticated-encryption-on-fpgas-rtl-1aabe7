// aes128_pipe: key-independent, fully unrolled and pipelined AES-128
// encryption.
//
// Same pipeline as the key-synthesized core (AddRoundKey stage plus ten
// registered rounds: latency 11 clocks, one block per clock), but the round
// keys come from the run-time key schedule (aes_key_sched) and are held in
// registers, so a new key is loaded without rebuilding the design. Pulse
// `key_load` with `key`; `key_ready` rises 11 clocks later and blocks may
// then enter. A sideband word of SB_W bits travels alongside each block.
module aes128_pipe
  import aes_pkg::*;
#(
  parameter int SB_W = 1
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            key_load,
  input  block_t          key,
  output logic            key_ready,
  input  logic            in_valid,
  input  block_t          in_block,
  input  logic [SB_W-1:0] in_sb,
  output logic            out_valid,
  output block_t          out_block,
  output logic [SB_W-1:0] out_sb
);
  localparam int LAT = 11;

  round_keys_t     rk;
  block_t          st  [LAT];
  logic            vld [LAT];
  logic [SB_W-1:0] sb  [LAT];
  block_t          rnd [1:10];

  aes_key_sched u_ks (.clk, .rst_n, .load(key_load), .key, .rk, .ready(key_ready));

  for (genvar r = 1; r <= 10; r++) begin : g_round
    aes_round #(.FINAL(r == 10)) u_round (.in(st[r-1]), .rk(rk[r]), .out(rnd[r]));
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
      st[0]  <= in_block ^ rk[0];
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
