// tb_aes_gcm_koa: key-independent AES-GCM with the pipelined AES and the
// KOA GHASH. Loads the key of the GCM specification's test case 3 and
// checks the set-up time (key schedule, H, 63 H-power products), then test
// case 3 encrypt and decrypt, a message of NMAX - 1 = 63 blocks, random
// messages with AAD and gaps on in_valid, and a key change to a random key
// without reset.
module tb_aes_gcm_koa;
  import ae_ref_pkg::*;

  localparam int WATCHDOG = 50000;

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

  logic start = 0, decrypt = 0, in_valid = 0, key_load = 0, ready;
  logic busy, in_ready, out_valid, tag_valid;
  logic [127:0] key = '0, in_block = '0, out_block, tag;
  logic [95:0] iv = '0;
  logic [15:0] n_aad = '0, n_data = '0;
  assign busy = !ready;

  aes_gcm_koa dut (.clk, .rst_n, .key_load, .key, .ready, .start, .iv, .n_aad, .n_data,
                   .decrypt, .in_valid, .in_ready, .in_block, .out_valid, .out_block,
                   .tag_valid, .tag);

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
      if (tag_valid) begin t = tag; ok = 1'b1; fin = 1; end
    end
    in_valid = 1'b0;
    check(128'(busy), 0, "idle after tag");
  endtask

  task automatic load_key(logic [127:0] k, output int n);
    key = k;
    key_load = 1'b1;
    tick();
    key_load = 1'b0;
    n = 1;
    while (!ready && n < 2000) begin
      tick();
      n++;
    end
  endtask

  task automatic msg(logic [127:0] k, int na, int nd, bit dec, bit gaps);
    blk_q_t aad, txt, ect, outs;
    blk_t et, t;
    bit ok;
    int cyc;
    bit [95:0] v;
    v = {$urandom, $urandom, $urandom};
    aad = {}; txt = {};
    repeat (na) aad.push_back(rnd_blk());
    repeat (nd) txt.push_back(rnd_blk());
    gcm(k, v, aad, txt, ect, et);
    iv = v; n_aad = 16'(na); n_data = 16'(nd); decrypt = dec;
    stream({aad, dec ? ect : txt}, gaps, outs, t, ok, cyc);
    check(128'(outs.size()), 128'(nd), "block count");
    foreach (outs[i]) check(outs[i], dec ? txt[i] : ect[i], $sformatf("block %0d", i));
    check(t, et, $sformatf("tag (%0d AAD, %0d text)", na, nd));
    if (!gaps) $display("GCM-KOA: %0d blocks, start to tag %0d clocks", na + nd, cyc);
  endtask

  initial begin
    blk_q_t p3, c3, outs;
    blk_t t, k;
    bit ok;
    int n, cyc;
    p3 = '{128'hd9313225f88406e5a55909c5aff5269a, 128'h86a7a9531534f7da2e4c303d8a318a72,
           128'h1c3c0c95956809532fcf0e2449a6b525, 128'hb16aedf5aa0de657ba637b391aafd255};
    c3 = '{128'h42831ec2217774244b7221b784d0d49c, 128'he3aa212f2c02a4e035c17e2329aca12e,
           128'h21d514b25466931c7d8f6a5aac84aa05, 128'h1ba30b396a0aac973d58e091473f5985};
    repeat (2) tick();
    rst_n = 1;
    tick();
    check(128'(ready), 0, "not ready before a key");
    k = 128'hfeffe9928665731c6d6a8f9467308308;
    load_key(k, n);
    $display("GCM-KOA: key set-up %0d clocks", n);
    checks++;
    if (n < 252 + 22 || n > 252 + 40) begin failures++; $display("FAIL set-up took %0d", n); end
    iv = 96'hcafebabefacedbaddecaf888; n_aad = 0; n_data = 4; decrypt = 0;
    stream(p3, 0, outs, t, ok, cyc);
    foreach (c3[i]) check(outs[i], c3[i], $sformatf("TC3 C%0d", i + 1));
    check(t, 128'h4d5c2af327cd64a62cf35abd2ba6fab4, "TC3 tag");
    decrypt = 1;
    stream(c3, 0, outs, t, ok, cyc);
    foreach (p3[i]) check(outs[i], p3[i], $sformatf("TC3 P%0d", i + 1));
    check(t, 128'h4d5c2af327cd64a62cf35abd2ba6fab4, "TC3 decrypt tag");
    msg(k, 0, 63, 0, 0);
    msg(k, 20, 43, 1, 0);
    for (int m = 0; m < 8; m++) msg(k, $urandom_range(5), $urandom_range(20), m % 2, 1);
    k = rnd_blk();
    load_key(k, n);
    for (int m = 0; m < 6; m++) msg(k, $urandom_range(5), $urandom_range(30), m % 2, m > 2);
    msg(k, 1, 0, 0, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
