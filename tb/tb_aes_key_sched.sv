// tb_aes_key_sched: loads the key 000102...0f and checks all eleven round
// keys against the published schedule of that key, the 11-clock ready
// time, and then a random key against the reference expansion.
module tb_aes_key_sched;
  import ae_ref_pkg::*;
  import aes_pkg::round_keys_t;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, load = 0, ready;
  logic [127:0] key = '0;
  round_keys_t rk;

  aes_key_sched dut (.clk, .rst_n, .load, .key, .rk, .ready);

  always #5 clk = ~clk;

  task automatic check(logic [127:0] got, logic [127:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h exp %h", what, got, exp);
    end
  endtask

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(logic [127:0] k, output int clocks);
    key  <= k;
    load <= 1'b1;
    @(posedge clk);
    load <= 1'b0;
    clocks = 0;
    do begin
      @(posedge clk);
      clocks++;
    end while (!ready);
  endtask

  initial begin
    logic [127:0] table31 [11];
    logic [127:0] exp_rk [11];
    int n;
    table31 = '{128'h000102030405060708090a0b0c0d0e0f, 128'hd6aa74fdd2af72fadaa678f1d6ab76fe,
                128'hb692cf0b643dbdf1be9bc5006830b3fe, 128'hb6ff744ed2c2c9bf6c590cbf0469bf41,
                128'h47f7f7bc95353e03f96c32bcfd058dfd, 128'h3caaa3e8a99f9deb50f3af57adf622aa,
                128'h5e390f7df7a69296a7553dc10aa31f6b, 128'h14f9701ae35fe28c440adf4d4ea9c026,
                128'h47438735a41c65b9e016baf4aebf7ad2, 128'h549932d1f08557681093ed9cbe2c974e,
                128'h13111d7fe3944a17f307a78b4d2b30c5};
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    run(128'h000102030405060708090a0b0c0d0e0f, n);
    checks++;
    if (n != 11) begin failures++; $display("FAIL ready after %0d clocks", n); end
    for (int r = 0; r < 11; r++) check(rk[r], table31[r], $sformatf("k%0d", r));
    for (int t = 0; t < 5; t++) begin
      logic [127:0] k;
      k = rnd_blk();
      key_exp(k, exp_rk);
      run(k, n);
      for (int r = 0; r < 11; r++) check(rk[r], exp_rk[r], $sformatf("random k%0d", r));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
