// aes_key_sched: run-time AES-128 key expansion.
//
// A pulse on `load` captures `key` as k0; the following ten clocks each
// derive the next round key (SubWord(RotWord(w3)) through four dedicated
// S-boxes, XOR with the round constant and the word chain of Fig. "key
// expansion"), storing k0..k10 in registers. `ready` rises once k10 is
// stored, 11 clocks after `load`, and stays high until the next load. The
// round keys are held for the pipelined AES, so encryption runs without
// recomputing them. Loading a new key needs no reconfiguration, only these
// 11 clocks.
module aes_key_sched
  import aes_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        load,
  input  block_t      key,
  output round_keys_t rk,
  output logic        ready
);
  logic [3:0] r;          // index of the key being generated
  logic       busy;
  word_t      rot, sub;
  block_t     prev;

  assign prev = rk[r-4'd1];
  assign rot  = rot_word(prev[31:0]);

  for (genvar b = 0; b < 4; b++) begin : g_sbox
    aes_sbox u_sbox (.in(rot[31-8*b -: 8]), .out(sub[31-8*b -: 8]));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rk    <= '0;
      r     <= 4'd1;
      busy  <= 1'b0;
      ready <= 1'b0;
    end else if (load) begin
      rk[0] <= key;
      r     <= 4'd1;
      busy  <= 1'b1;
      ready <= 1'b0;
    end else if (busy) begin
      rk[r] <= next_round_key(prev, sub, rcon(int'(r)));
      if (r == 4'd10) begin
        busy  <= 1'b0;
        ready <= 1'b1;
      end else begin
        r <= r + 4'd1;
      end
    end
  end
endmodule
