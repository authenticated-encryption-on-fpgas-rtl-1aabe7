// gf128_mul_fixed: GF(2^128) multiplier with one operand fixed at
// elaboration (GCM bit order, modulus x^128 + x^7 + x^2 + x + 1).
//
// With the constant operand H known, the table T[i] = H * x^i (i = 0..127)
// is precomputed: T[0] = H and each next row is the previous one shifted
// right by one bit, reduced by 0xE1||0^120 when a bit falls off. The product
// is then the XOR of the rows T[i] for which bit i of the variable operand
// (bit [127-i]) is set. Because T is constant, every 0 bit of T costs no
// logic and every 1 bit is one XOR input, so synthesis builds a sparse XOR
// network specialised for H. Combinational.
module gf128_mul_fixed
  import aes_pkg::*;
#(
  parameter block_t H = 128'hc6a13b37878f5b826f4f8162a1c8d879
) (
  input  block_t a,
  output block_t p
);
  typedef logic [127:0][127:0] table_t;

  function automatic table_t gen_table(input block_t h);
    table_t t;
    t[0] = h;
    for (int i = 1; i < 128; i++)
      t[i] = t[i-1][0] ? ((t[i-1] >> 1) ^ GCM_R) : (t[i-1] >> 1);
    return t;
  endfunction

  localparam table_t T = gen_table(H);

  always_comb begin
    p = '0;
    for (int i = 0; i < 128; i++)
      if (a[127-i]) p = p ^ T[i];
  end
endmodule
