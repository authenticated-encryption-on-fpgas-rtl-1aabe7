// tb_aes128_quarter: 32-bit AES-128 (four shared S-boxes, 5 clocks per
// round). Checks the FIPS-197 example block, random keys and blocks against
// the reference model, that `done` is seen on the 51st rising edge after
// the one that takes `start` (one loading clock and 50 round clocks),
// and that `busy` covers the whole operation.
module tb_aes128_quarter;
  import ae_ref_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, start = 0, busy, done;
  logic [127:0] key = '0, in_block = '0, out_block;

  aes128_quarter dut (.clk, .rst_n, .key, .start, .in_block, .busy, .done, .out_block);

  always #5 clk = ~clk;

  task automatic check(logic [127:0] got, logic [127:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h exp %h", what, got, exp);
    end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic tick();
    @(posedge clk);
    #1;
  endtask

  task automatic enc(logic [127:0] k, logic [127:0] p, logic [127:0] exp);
    int n = 0;
    key = k;
    in_block = p;
    start = 1'b1;
    tick();
    start = 1'b0;
    in_block = '0;
    n = 1;
    while (!done && n < 100) begin
      checks++;
      if (!busy) begin failures++; $display("FAIL busy low during operation"); end
      tick();
      n++;
    end
    check(128'(n), 51, "clocks from start to done");
    check(out_block, exp, "ciphertext");
  endtask

  initial begin
    repeat (2) tick();
    rst_n = 1;
    tick();
    enc(128'h000102030405060708090a0b0c0d0e0f, 128'h00112233445566778899aabbccddeeff,
        128'h69c4e0d86a7b0430d8cdb78070b4c55a);
    for (int i = 0; i < 40; i++) begin
      logic [127:0] k, p;
      k = rnd_blk();
      p = rnd_blk();
      enc(k, p, aes_enc(k, p));
      if (i % 3 == 0) repeat ($urandom_range(3)) tick();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
