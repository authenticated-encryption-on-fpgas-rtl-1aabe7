// koa_mul_pipe: 4-stage pipelined GF(2^128) multiplier using a two-step
// Karatsuba-Ofman decomposition (GCM bit order, modulus
// x^128 + x^7 + x^2 + x + 1).
//
// One KOA step splits m-bit operands into halves and forms three half-size
// products, Dl = Al*Bl, Dhl = (Ah^Al)*(Bh^Bl), Dh = Ah*Bh, recombined as
// D = Dh x^m ^ x^(m/2)(Dh ^ Dhl ^ Dl) ^ Dl. Applied twice, the 128-bit
// product becomes nine 32-bit carry-less products (three per 64-bit
// sub-multiplier).
//   stage 1: operand pre-additions (the nine 32-bit operand pairs)
//   stage 2: nine 32 x 32 carry-less products
//   stage 3: KOA recombination into the 255-bit product
//   stage 4: reduction modulo the field polynomial
// A pair presented with in_valid gives its product on p / out_valid 4
// clocks later; a new pair can enter every clock.
module koa_mul_pipe
  import aes_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   in_valid,
  input  block_t x,
  input  block_t y,
  output logic   out_valid,
  output block_t p
);
  typedef logic [31:0]  op32_t;
  typedef logic [62:0]  pr63_t;

  function automatic block_t bitrev(input block_t v);
    block_t r;
    for (int i = 0; i < 128; i++) r[i] = v[127-i];
    return r;
  endfunction

  function automatic pr63_t clmul32(input op32_t a, input op32_t b);
    pr63_t r;
    r = '0;
    for (int i = 0; i < 32; i++) if (b[i]) r = r ^ (pr63_t'(a) << i);
    return r;
  endfunction

  // Karatsuba recombination of three m-bit products into a (2m+1)-bit one.
  function automatic logic [126:0] koa64(input pr63_t l, input pr63_t hl, input pr63_t h);
    logic [126:0] d;
    d = (127'(h) << 64) ^ (127'(h ^ hl ^ l) << 32) ^ 127'(l);
    return d;
  endfunction

  function automatic logic [254:0] koa128(input logic [126:0] l, input logic [126:0] hl,
                                          input logic [126:0] h);
    return (255'(h) << 128) ^ (255'(h ^ hl ^ l) << 64) ^ 255'(l);
  endfunction

  function automatic block_t reduce(input logic [254:0] d);
    logic [254:0] t;
    t = d;
    for (int i = 254; i >= 128; i--)
      if (t[i]) begin
        t[i]       = 1'b0;
        t[i-121]   = t[i-121] ^ 1'b1;
        t[i-126]   = t[i-126] ^ 1'b1;
        t[i-127]   = t[i-127] ^ 1'b1;
        t[i-128]   = t[i-128] ^ 1'b1;
      end
    return t[127:0];
  endfunction

  // Stage 1: operands in polynomial order, then the nine 32-bit pairs.
  // Index: 3*g + s, g = 64-bit product (0: low, 1: mid, 2: high),
  // s = 32-bit product inside it (same order).
  op32_t a9 [9], b9 [9];
  logic [3:0] vld;

  block_t xr, yr;
  assign xr = bitrev(x);
  assign yr = bitrev(y);

  function automatic logic [63:0] half64(input block_t v, input int g);
    case (g)
      0:       return v[63:0];
      1:       return v[127:64] ^ v[63:0];
      default: return v[127:64];
    endcase
  endfunction

  function automatic op32_t half32(input logic [63:0] v, input int s);
    case (s)
      0:       return v[31:0];
      1:       return v[63:32] ^ v[31:0];
      default: return v[63:32];
    endcase
  endfunction

  pr63_t        m9 [9];
  logic [254:0] d255;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      vld  <= '0;
      for (int k = 0; k < 9; k++) begin
        a9[k] <= '0;
        b9[k] <= '0;
        m9[k] <= '0;
      end
      d255 <= '0;
      p    <= '0;
    end else begin
      vld <= {vld[2:0], in_valid};
      for (int g = 0; g < 3; g++)
        for (int s = 0; s < 3; s++) begin
          a9[3*g+s] <= half32(half64(xr, g), s);
          b9[3*g+s] <= half32(half64(yr, g), s);
        end
      for (int k = 0; k < 9; k++) m9[k] <= clmul32(a9[k], b9[k]);
      d255 <= koa128(koa64(m9[0], m9[1], m9[2]), koa64(m9[3], m9[4], m9[5]),
                     koa64(m9[6], m9[7], m9[8]));
      p    <= bitrev(reduce(d255));
    end
  end

  assign out_valid = vld[3];
endmodule
