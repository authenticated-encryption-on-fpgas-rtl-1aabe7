// tb_aes_gcm_lc: low-cost AES-GCM (one 50-clock 32-bit AES, one 32-clock
// hybrid multiplier).
// Checks the GCM specification's test case 3 (encrypt, then decrypt with
// the right tag and with a tag that has one bit flipped, which must clear
// tag_ok), random messages with AAD against the reference model in both
// directions with gaps on in_valid, and the clock count of a text block
// (one 50-clock AES operation plus one hand-over clock, 51, with the
// multiplication overlapped).
module tb_aes_gcm_lc;
  import ae_ref_pkg::*;

  localparam int WATCHDOG = 200000;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0;

  always #5 clk = ~clk;

  task automatic check(logic [127:0] got, logic [127:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h exp %h", what, got, exp);
    end
  endtask

  // Watchdog.
  initial begin
    repeat (WATCHDOG) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Inputs are driven and outputs sampled 1 time unit after each rising
  // edge, clear of the register updates.
  task automatic tick();
    @(posedge clk);
    #1;
  endtask

  logic start = 0, decrypt = 0, in_valid = 0;
  logic busy, in_ready, out_valid, tag_valid, tag_ok;
  logic [127:0] key = '0, in_block = '0, out_block, tag, tag_in = '0;
  logic [15:0] n_data = '0;

  logic [95:0] iv = '0;
  logic [15:0] n_aad = '0;

  aes_gcm_lc dut (.clk, .rst_n, .key, .start, .iv, .n_aad, .n_data, .decrypt, .tag_in, .busy,
                  .in_valid, .in_ready, .in_block, .out_valid, .out_block, .tag_valid, .tag,
                  .tag_ok);

  // One message through the stream interface. The message parameters must
  // already be on the inputs. Returns the output blocks, the tag, tag_ok
  // and the number of clocks from `start` to `tag_valid`.
  task automatic stream(blk_q_t inq, bit gaps, output blk_q_t outs, output blk_t t,
                        output bit ok, output int cyc);
    bit fin = 0;
    outs = {};
    start = 1'b1;
    tick();
    start = 1'b0;
    cyc = 1;
    while (!fin && cyc < WATCHDOG) begin
      in_valid = (inq.size() > 0) && (!gaps || $urandom_range(3) != 0);
      in_block = in_valid ? inq[0] : '0;
      if (in_valid && in_ready) void'(inq.pop_front());
      tick();
      cyc++;
      if (out_valid) outs.push_back(out_block);
      if (tag_valid) begin t = tag; ok = tag_ok; fin = 1; end
    end
    in_valid = 1'b0;
    check(128'(busy), 0, "idle after tag");
  endtask

  initial begin
    blk_q_t p3, c3, outs, aad, txt, ect, none;
    blk_t t, et;
    bit ok;
    int cyc, cyc4, cyc8;
    p3 = '{128'hd9313225f88406e5a55909c5aff5269a, 128'h86a7a9531534f7da2e4c303d8a318a72,
           128'h1c3c0c95956809532fcf0e2449a6b525, 128'hb16aedf5aa0de657ba637b391aafd255};
    c3 = '{128'h42831ec2217774244b7221b784d0d49c, 128'he3aa212f2c02a4e035c17e2329aca12e,
           128'h21d514b25466931c7d8f6a5aac84aa05, 128'h1ba30b396a0aac973d58e091473f5985};
    repeat (2) tick();
    rst_n = 1;
    tick();
    key = 128'hfeffe9928665731c6d6a8f9467308308;
    iv = 96'hcafebabefacedbaddecaf888;
    n_aad = 0; n_data = 4; decrypt = 0; tag_in = '0;
    stream(p3, 0, outs, t, ok, cyc4);
    foreach (c3[i]) check(outs[i], c3[i], $sformatf("TC3 C%0d", i + 1));
    check(t, 128'h4d5c2af327cd64a62cf35abd2ba6fab4, "TC3 tag");
    decrypt = 1; tag_in = 128'h4d5c2af327cd64a62cf35abd2ba6fab4;
    stream(c3, 0, outs, t, ok, cyc);
    foreach (p3[i]) check(outs[i], p3[i], $sformatf("TC3 P%0d", i + 1));
    check(128'(ok), 1, "TC3 tag_ok");
    tag_in[0] = ~tag_in[0];
    stream(c3, 0, outs, t, ok, cyc);
    check(128'(ok), 0, "TC3 forged tag rejected");
    // Clocks per text block: 8 blocks vs 4 blocks.
    decrypt = 0; n_data = 8;
    txt = {p3, p3};
    stream(txt, 0, outs, t, ok, cyc8);
    $display("GCM-LC: %0d clocks for 4 blocks, %0d for 8", cyc4, cyc8);
    checks++;
    if ((cyc8 - cyc4) != 4 * 51) begin failures++; $display("FAIL %0d clocks per block", (cyc8 - cyc4) / 4); end
    for (int m = 0; m < 12; m++) begin
      bit [95:0] v;
      bit dec;
      v = {$urandom, $urandom, $urandom};
      key = rnd_blk();
      aad = {}; txt = {};
      repeat ($urandom_range(3)) aad.push_back(rnd_blk());
      repeat ($urandom_range(5)) txt.push_back(rnd_blk());
      gcm(key, v, aad, txt, ect, et);
      dec = m % 2;
      iv = v; n_aad = 16'(aad.size()); n_data = 16'(txt.size()); decrypt = dec; tag_in = et;
      stream({aad, dec ? ect : txt}, m > 1, outs, t, ok, cyc);
      check(128'(outs.size()), 128'(txt.size()), "block count");
      foreach (outs[i]) check(outs[i], dec ? txt[i] : ect[i], $sformatf("msg %0d block %0d", m, i));
      check(t, et, $sformatf("msg %0d tag", m));
      if (dec) check(128'(ok), 1, "tag_ok");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
