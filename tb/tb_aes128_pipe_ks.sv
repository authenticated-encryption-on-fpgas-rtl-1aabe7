// tb_aes128_pipe_ks: key-synthesized pipelined AES-128 with its default key
// 000102...0f. Checks the elaborated round keys against the published
// schedule of that key, the FIPS-197 example block, H = E(K, 0), and a
// stream of random blocks entered one per clock with the sideband, each
// expected exactly 11 clocks after it entered.
module tb_aes128_pipe_ks;
  import ae_ref_pkg::*;
  import aes_pkg::round_keys_t;
  import aes_pkg::expand_key;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic in_valid = 0, out_valid;
  logic [127:0] in_block = '0, out_block;
  logic [7:0] in_sb = '0, out_sb;
  localparam logic [127:0] KEY = 128'h000102030405060708090a0b0c0d0e0f;

  aes128_pipe_ks #(.KEY(KEY), .SB_W(8)) dut (.clk, .rst_n, .in_valid, .in_block, .in_sb,
                                            .out_valid, .out_block, .out_sb);

  always #5 clk = ~clk;

  task automatic check(logic [127:0] got, logic [127:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h exp %h", what, got, exp);
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [127:0] exp_q[$];
  logic [7:0]   sb_q[$];

  // Latency model: out_valid must equal in_valid delayed by 11 clocks.
  logic [10:0] vhist = '0;
  always @(posedge clk) begin
    vhist <= {vhist[9:0], in_valid};
    if (rst_n) begin
      checks++;
      if (out_valid !== vhist[10]) begin
        failures++;
        $display("FAIL latency: out_valid %b, input 11 clocks ago %b", out_valid, vhist[10]);
      end
    end
    if (out_valid) begin
      check(out_block, exp_q.pop_front(), "ciphertext");
      check(128'(out_sb), 128'(sb_q.pop_front()), "sideband");
    end
  end

  initial begin
    round_keys_t rk;
    rk = expand_key(KEY);
    check(rk[1],  128'hd6aa74fdd2af72fadaa678f1d6ab76fe, "k1");
    check(rk[2],  128'hb692cf0b643dbdf1be9bc5006830b3fe, "k2");
    check(rk[5],  128'h3caaa3e8a99f9deb50f3af57adf622aa, "k5");
    check(rk[9],  128'h549932d1f08557681093ed9cbe2c974e, "k9");
    check(rk[10], 128'h13111d7fe3944a17f307a78b4d2b30c5, "k10");
    check(aes_enc(KEY, '0), 128'hc6a13b37878f5b826f4f8162a1c8d879, "H reference");
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    for (int i = 0; i < 40; i++) begin
      logic [127:0] p;
      p = (i == 0) ? 128'h00112233445566778899aabbccddeeff : (i == 1 ? 128'h0 : rnd_blk());
      in_valid <= 1'b1;
      in_block <= p;
      in_sb    <= 8'(i);
      exp_q.push_back(i == 0 ? 128'h69c4e0d86a7b0430d8cdb78070b4c55a :
                      (i == 1 ? 128'hc6a13b37878f5b826f4f8162a1c8d879 : aes_enc(KEY, p)));
      sb_q.push_back(8'(i));
      @(posedge clk);
    end
    in_valid <= 1'b0;
    repeat (20) @(posedge clk);
    check(128'(exp_q.size()), 0, "all blocks out");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
