// tb_aes128_pipe: key-independent pipelined AES-128. Loads the FIPS-197
// key, checks its example block, streams random blocks one per clock and
// checks the 11-clock latency; then loads a new key without reset and
// checks that the stream follows it.
module tb_aes128_pipe;
  import ae_ref_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, key_load = 0, key_ready;
  logic [127:0] key = '0;
  logic in_valid = 0, out_valid;
  logic [127:0] in_block = '0, out_block;
  logic [3:0] in_sb = '0, out_sb;

  aes128_pipe #(.SB_W(4)) dut (.clk, .rst_n, .key_load, .key, .key_ready, .in_valid, .in_block,
                               .in_sb, .out_valid, .out_block, .out_sb);

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
  logic [10:0]  vhist = '0;
  always @(posedge clk) begin
    vhist <= {vhist[9:0], in_valid};
    if (rst_n) begin
      checks++;
      if (out_valid !== vhist[10]) begin failures++; $display("FAIL latency"); end
    end
    if (out_valid) check(out_block, exp_q.pop_front(), "ciphertext");
  end

  task automatic load_key(logic [127:0] k);
    key      <= k;
    key_load <= 1'b1;
    @(posedge clk);
    key_load <= 1'b0;
    @(posedge clk);
    while (!key_ready) @(posedge clk);
  endtask

  task automatic stream(logic [127:0] k, int n, logic [127:0] first, logic [127:0] first_exp);
    for (int i = 0; i < n; i++) begin
      logic [127:0] p;
      p = (i == 0) ? first : rnd_blk();
      in_valid <= 1'b1;
      in_block <= p;
      exp_q.push_back(i == 0 ? first_exp : aes_enc(k, p));
      @(posedge clk);
    end
    in_valid <= 1'b0;
    repeat (14) @(posedge clk);
  endtask

  initial begin
    logic [127:0] k2;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    load_key(128'h000102030405060708090a0b0c0d0e0f);
    stream(128'h000102030405060708090a0b0c0d0e0f, 30, 128'h00112233445566778899aabbccddeeff,
           128'h69c4e0d86a7b0430d8cdb78070b4c55a);
    k2 = rnd_blk();
    load_key(k2);
    stream(k2, 30, 128'h0, aes_enc(k2, 128'h0));
    check(128'(exp_q.size()), 0, "all blocks out");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
