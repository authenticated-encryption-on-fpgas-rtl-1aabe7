// ghash_par4_fixed: four-lane GHASH whose multipliers all have fixed
// operands, absorbing four 128-bit blocks per clock with no pipeline.
//
// Unrolling X_i = (C_i ^ X_{i-1}) * H four times gives
//   X_new = (X ^ C1) * H^4 ^ C2 * H^3 ^ C3 * H^2 ^ C4 * H,
// so lane j (0..3) multiplies by the constant H^(4-j); the running value X
// enters only lane 0. The constants H..H^4 are computed at elaboration from
// the parameter H. Groups with fewer than four blocks are placed in the last
// lanes (`mask` right-aligned, e.g. 4'b0001 for one block in lane 3) and X
// enters the first occupied lane, which then has exactly the power of H the
// unrolled equation needs. `clear` zeroes X; `x` is registered, updated one
// clock after `in_valid`.
module ghash_par4_fixed
  import aes_pkg::*;
#(
  parameter block_t H = 128'hc6a13b37878f5b826f4f8162a1c8d879
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clear,
  input  logic             in_valid,
  input  logic [3:0]       mask,      // mask[3-j] set: lane j holds a block
  input  block_t [3:0]     c,         // c[3] = lane 0 (oldest block) ... c[0] = lane 3
  output block_t           x
);
  block_t [3:0] lane_in, lane_out;
  block_t       sum;

  always_comb begin
    logic first;
    first = 1'b1;
    for (int j = 0; j < 4; j++) begin
      lane_in[3-j] = '0;
      if (mask[3-j]) begin
        lane_in[3-j] = first ? (c[3-j] ^ x) : c[3-j];
        first = 1'b0;
      end
    end
  end

  for (genvar j = 0; j < 4; j++) begin : g_lane
    gf128_mul_fixed #(.H(gf128_pow(H, 4 - j))) u_mul (.a(lane_in[3-j]), .p(lane_out[3-j]));
  end

  assign sum = lane_out[3] ^ lane_out[2] ^ lane_out[1] ^ lane_out[0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        x <= '0;
    else if (clear)    x <= '0;
    else if (in_valid) x <= sum;
  end
endmodule
