// tb_aes_gcm_ks: key-synthesized AES-GCM.
// Two instances share the message inputs: dut[0] keeps the default key
// 000102...0f, dut[1] is rebuilt with the key of the GCM specification's
// test case 3. Checks:
//   * test case 3 (4 blocks, no AAD) ciphertext and tag, and its decryption;
//   * random messages (0..6 AAD blocks, 0..10 text blocks, one empty) with gaps on
//     in_valid, encrypt and decrypt, against the reference model;
//   * with in_valid held high, one block is accepted every clock.
module tb_aes_gcm_ks;
  import ae_ref_pkg::*;

  localparam logic [127:0] K3 = 128'hfeffe9928665731c6d6a8f9467308308;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;
  logic [1:0] start = '0;
  logic [95:0] iv = '0;
  logic [15:0] n_aad = '0, n_data = '0;
  logic decrypt = 0, in_valid = 0;
  logic [127:0] in_block = '0;
  logic [1:0] busy, in_ready, out_valid, tag_valid;
  logic [127:0] out_block [2], tag [2];

  aes_gcm_ks dut0 (.clk, .rst_n, .start(start[0]), .iv, .n_aad, .n_data, .decrypt,
                   .busy(busy[0]), .in_valid, .in_ready(in_ready[0]), .in_block,
                   .out_valid(out_valid[0]), .out_block(out_block[0]),
                   .tag_valid(tag_valid[0]), .tag(tag[0]));
  aes_gcm_ks #(.KEY(K3)) dut1 (.clk, .rst_n, .start(start[1]), .iv, .n_aad, .n_data, .decrypt,
                   .busy(busy[1]), .in_valid, .in_ready(in_ready[1]), .in_block,
                   .out_valid(out_valid[1]), .out_block(out_block[1]),
                   .tag_valid(tag_valid[1]), .tag(tag[1]));

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

  // Runs one message on instance d; returns the output blocks and tag.
  // gaps: random idle clocks on in_valid. Returns accept clocks in `span`.
  task automatic run(int d, bit [95:0] v, blk_q_t aad, blk_q_t txt, bit dec, bit gaps,
                     output blk_q_t outs, output blk_t t, output int span);
    blk_q_t inq;
    int first = -1, last = 0, cyc = 0;
    bit got_tag = 0;
    inq = {aad, txt};
    outs = {};
    iv <= v; n_aad <= 16'(aad.size()); n_data <= 16'(txt.size()); decrypt <= dec;
    start[d] <= 1'b1;
    @(posedge clk);
    start[d] <= 1'b0;
    while (!got_tag) begin
      if (in_valid && in_ready[d]) begin
        void'(inq.pop_front());
        if (first < 0) first = cyc;
        last = cyc;
      end
      if (out_valid[d]) outs.push_back(out_block[d]);
      if (tag_valid[d]) begin t = tag[d]; got_tag = 1; end
      in_valid <= (inq.size() > 0) && (!gaps || $urandom_range(3) != 0);
      in_block <= (inq.size() > 0) ? inq[0] : '0;
      @(posedge clk);
      cyc++;
    end
    in_valid <= 1'b0;
    span = last - first + 1;
    @(posedge clk);
    checks++;
    if (busy[d]) begin failures++; $display("FAIL busy after tag"); end
  endtask

  initial begin
    blk_q_t p3, c3, outs, aad, txt, ect, none;
    blk_t t, et;
    int span;
    p3 = '{128'hd9313225f88406e5a55909c5aff5269a, 128'h86a7a9531534f7da2e4c303d8a318a72,
           128'h1c3c0c95956809532fcf0e2449a6b525, 128'hb16aedf5aa0de657ba637b391aafd255};
    c3 = '{128'h42831ec2217774244b7221b784d0d49c, 128'he3aa212f2c02a4e035c17e2329aca12e,
           128'h21d514b25466931c7d8f6a5aac84aa05, 128'h1ba30b396a0aac973d58e091473f5985};
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk);

    // Test case 3, encrypt then decrypt, in_valid held high.
    run(1, 96'hcafebabefacedbaddecaf888, none, p3, 0, 0, outs, t, span);
    check(128'(outs.size()), 4, "TC3 block count");
    foreach (c3[i]) check(outs[i], c3[i], $sformatf("TC3 C%0d", i + 1));
    check(t, 128'h4d5c2af327cd64a62cf35abd2ba6fab4, "TC3 tag");
    check(128'(span), 4, "TC3 one block per clock");
    run(1, 96'hcafebabefacedbaddecaf888, none, c3, 1, 0, outs, t, span);
    foreach (p3[i]) check(outs[i], p3[i], $sformatf("TC3 decrypt P%0d", i + 1));
    check(t, 128'h4d5c2af327cd64a62cf35abd2ba6fab4, "TC3 decrypt tag");

    // Random messages on the default-key instance.
    for (int m = 0; m < 30; m++) begin
      bit [95:0] v;
      bit dec;
      int na, nd;
      v = {$urandom, $urandom, $urandom};
      na = $urandom_range(6);
      nd = $urandom_range(10);
      if (m == 0) begin na = 3; nd = 9; end
      if (m == 1) begin na = 0; nd = 0; end
      aad = {}; txt = {};
      repeat (na) aad.push_back(rnd_blk());
      repeat (nd) txt.push_back(rnd_blk());
      gcm(128'h000102030405060708090a0b0c0d0e0f, v, aad, txt, ect, et);
      dec = m % 3 == 2;
      run(0, v, aad, dec ? ect : txt, dec, m != 0, outs, t, span);
      check(128'(outs.size()), 128'(nd), "block count");
      foreach (outs[i]) check(outs[i], dec ? txt[i] : ect[i], $sformatf("msg %0d block %0d", m, i));
      check(t, et, $sformatf("msg %0d tag", m));
      if (m == 0) check(128'(span), 12, "one block per clock");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
