// aes_round: one full 128-bit AES encryption round, combinational.
//
// out = MixColumns(ShiftRows(SubBytes(in))) ^ rk, with MixColumns left out
// when FINAL = 1 (the tenth round of AES-128). Sixteen S-boxes work in
// parallel and ShiftRows is wiring only. With rk used as a data input the
// same round also serves as AEGIS' AESRound(A, B). No clock: the caller puts
// the register after it.
module aes_round
  import aes_pkg::*;
#(
  parameter bit FINAL = 1'b0
) (
  input  block_t in,
  input  block_t rk,
  output block_t out
);
  block_t sb;

  for (genvar k = 0; k < 16; k++) begin : g_sbox
    aes_sbox u_sbox (.in(in[127-8*k -: 8]), .out(sb[127-8*k -: 8]));
  end

  always_comb begin
    if (FINAL) out = shift_rows(sb) ^ rk;
    else       out = mix_columns(shift_rows(sb)) ^ rk;
  end
endmodule
