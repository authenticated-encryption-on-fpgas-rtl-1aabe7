// tb_ae_top: end-to-end test of the whole library at its default sizes.
// The top holds seven authenticated-encryption cores side by side; this
// testbench runs each of them through complete messages, encrypting and
// decrypting, and compares every output block and tag with the reference
// models (GCM, CCM, AEGIS-128). It counts how often each mechanism of the
// design happened and counts a failure for any that never did:
//   * key-synthesized GCM streaming one block per clock (no stall);
//   * 4-parallel GCM taking a 512-bit group per clock;
//   * KOA GCM key set-up (key schedule, H, H-power memory fill) and a key
//     change without reset;
//   * the fast AEGIS-128 core;
//   * decrypt mode on every core;
//   * back-pressure: in_valid held while in_ready is low (the compact
//     cores take one block per 50 / 100 / 20 clocks);
//   * gaps on in_valid;
//   * tag accepted and tag rejected (tag_ok) on the three compact cores;
//   * the CCM plaintext memory holding a whole message between passes.
// Inputs are driven and outputs sampled 1 time unit after a rising edge.
module tb_ae_top;
  import ae_ref_pkg::*;

  localparam logic [127:0] KS_KEY = 128'h000102030405060708090a0b0c0d0e0f;

  int checks = 0, failures = 0;
  int n_stream = 0, n_group = 0, n_keyset = 0, n_aegis = 0, n_decrypt = 0, n_backpressure = 0,
      n_gap = 0, n_tag_pass = 0, n_tag_fail = 0, n_ccm_mem = 0;
  logic clk = 0, rst_n = 0;

  // Top-level ports, connected by name.
  logic ks_start = 0, ks_decrypt = 0, ks_in_valid = 0, ks_busy, ks_in_ready, ks_out_valid, ks_tag_valid;
  logic [95:0] ks_iv = '0;
  logic [15:0] ks_n_aad = '0, ks_n_data = '0;
  logic [127:0] ks_in_block = '0, ks_out_block, ks_tag;
  logic p4_start = 0, p4_decrypt = 0, p4_in_valid = 0, p4_busy, p4_in_ready, p4_out_valid, p4_tag_valid;
  logic [95:0] p4_iv = '0;
  logic [15:0] p4_n_aad = '0, p4_n_data = '0;
  logic [511:0] p4_in_block = '0, p4_out_block;
  logic [127:0] p4_tag;
  logic koa_key_load = 0, koa_ready, koa_start = 0, koa_decrypt = 0, koa_in_valid = 0, koa_in_ready,
        koa_out_valid, koa_tag_valid;
  logic [127:0] koa_key = '0, koa_in_block = '0, koa_out_block, koa_tag;
  logic [95:0] koa_iv = '0;
  logic [15:0] koa_n_aad = '0, koa_n_data = '0;
  logic ag_start = 0, ag_decrypt = 0, ag_in_valid = 0, ag_busy, ag_in_ready, ag_out_valid, ag_tag_valid;
  logic [127:0] ag_key = '0, ag_iv = '0, ag_in_block = '0, ag_out_block, ag_tag;
  logic [15:0] ag_n_data = '0;
  logic ccm_start = 0, ccm_decrypt = 0, ccm_in_valid = 0, ccm_busy, ccm_in_ready, ccm_out_valid,
        ccm_tag_valid, ccm_tag_ok;
  logic [127:0] ccm_key = '0, ccm_ctr0 = '0, ccm_tag_in = '0, ccm_in_block = '0, ccm_out_block, ccm_tag;
  logic [15:0] ccm_n_hdr = '0, ccm_n_data = '0;
  logic gcm_start = 0, gcm_decrypt = 0, gcm_in_valid = 0, gcm_busy, gcm_in_ready, gcm_out_valid,
        gcm_tag_valid, gcm_tag_ok;
  logic [127:0] gcm_key = '0, gcm_tag_in = '0, gcm_in_block = '0, gcm_out_block, gcm_tag;
  logic [95:0] gcm_iv = '0;
  logic [15:0] gcm_n_aad = '0, gcm_n_data = '0;
  logic agl_start = 0, agl_decrypt = 0, agl_in_valid = 0, agl_busy, agl_in_ready, agl_out_valid,
        agl_tag_valid, agl_tag_ok;
  logic [127:0] agl_key = '0, agl_iv = '0, agl_tag_in = '0, agl_in_block = '0, agl_out_block, agl_tag;
  logic [15:0] agl_n_data = '0;
  logic koa_busy, koa_tag_ok = 1'b1, ks_tag_ok = 1'b1, ag_tag_ok = 1'b1;
  assign koa_busy = !koa_ready;

  ae_top dut (.*);

  always #5 clk = ~clk;

  task automatic check(logic [127:0] got, logic [127:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h exp %h", what, got, exp);
    end
  endtask

  task automatic report();
    $display("mechanisms: stream=%0d group=%0d keyset=%0d aegis=%0d decrypt=%0d backpressure=%0d gap=%0d tag_pass=%0d tag_fail=%0d ccm_mem=%0d",
             n_stream, n_group, n_keyset, n_aegis, n_decrypt, n_backpressure, n_gap, n_tag_pass,
             n_tag_fail, n_ccm_mem);
    if (n_stream == 0) begin failures++; $display("FAIL streaming never happened"); end
    if (n_group == 0) begin failures++; $display("FAIL 512-bit groups never happened"); end
    if (n_keyset < 2) begin failures++; $display("FAIL key set-up / key change missing"); end
    if (n_aegis == 0) begin failures++; $display("FAIL fast AEGIS never ran"); end
    if (n_decrypt == 0) begin failures++; $display("FAIL decrypt never happened"); end
    if (n_backpressure == 0) begin failures++; $display("FAIL back-pressure never happened"); end
    if (n_gap == 0) begin failures++; $display("FAIL input gaps never happened"); end
    if (n_tag_pass == 0) begin failures++; $display("FAIL tag never accepted"); end
    if (n_tag_fail == 0) begin failures++; $display("FAIL tag never rejected"); end
    if (n_ccm_mem == 0) begin failures++; $display("FAIL CCM memory never used"); end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    report();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic tick();
    @(posedge clk);
    #1;
  endtask

  // One message through a 128-bit stream port set with prefix P. The
  // message parameters must already be on the inputs.
  `define AE_STREAM_TASK(P) \
  task automatic P``_run(blk_q_t inq, bit gaps, output blk_q_t outs, output blk_t t, \
                         output bit ok); \
    bit fin = 0; \
    int cyc = 0; \
    outs = {}; \
    P``_start = 1'b1; \
    tick(); \
    P``_start = 1'b0; \
    while (!fin && cyc < 100000) begin \
      P``_in_valid = (inq.size() > 0) && (!gaps || $urandom_range(3) != 0); \
      if (gaps && inq.size() > 0 && !P``_in_valid) n_gap++; \
      P``_in_block = P``_in_valid ? inq[0] : '0; \
      if (P``_in_valid && P``_in_ready) void'(inq.pop_front()); \
      else if (P``_in_valid) n_backpressure++; \
      tick(); \
      cyc++; \
      if (P``_out_valid) outs.push_back(P``_out_block); \
      if (P``_tag_valid) begin t = P``_tag; ok = P``_tag_ok; fin = 1; end \
    end \
    P``_in_valid = 1'b0; \
    check(128'(P``_busy), 0, `"P idle after tag`"); \
  endtask

  `AE_STREAM_TASK(ks)
  `AE_STREAM_TASK(koa)
  `AE_STREAM_TASK(ag)
  `AE_STREAM_TASK(ccm)
  `AE_STREAM_TASK(gcm)
  `AE_STREAM_TASK(agl)

  task automatic check_msg(string what, blk_q_t outs, blk_q_t exp, blk_t t, blk_t et);
    check(128'(outs.size()), 128'(exp.size()), {what, " block count"});
    foreach (outs[i]) if (i < exp.size()) check(outs[i], exp[i], $sformatf("%s block %0d", what, i));
    check(t, et, {what, " tag"});
  endtask

  task automatic count_tag(string what, bit ok, bit exp_ok);
    check(128'(ok), 128'(exp_ok), {what, " tag_ok"});
    if (ok) n_tag_pass++; else n_tag_fail++;
  endtask

  initial begin
    blk_q_t aad, txt, ect, outs, none;
    blk_t et, t, k;
    bit ok;
    bit [95:0] v;
    int n;
    repeat (2) tick();
    rst_n = 1;
    tick();

    // Key-independent GCM: key set-up runs in the background.
    k = rnd_blk();
    koa_key = k;
    koa_key_load = 1'b1;
    tick();
    koa_key_load = 1'b0;

    // Key-synthesized GCM, 2 AAD + 20 text blocks, streamed, both directions.
    for (int d = 0; d < 2; d++) begin
      v = {$urandom, $urandom, $urandom};
      aad = {rnd_blk(), rnd_blk()};
      txt = {};
      repeat (20) txt.push_back(rnd_blk());
      gcm(KS_KEY, v, aad, txt, ect, et);
      ks_iv = v; ks_n_aad = 2; ks_n_data = 20; ks_decrypt = d;
      ks_run({aad, d ? ect : txt}, 0, outs, t, ok);
      check_msg("ks", outs, d ? txt : ect, t, et);
      n_stream++;
      n_decrypt += d;
    end

    // 4-parallel GCM: 1 AAD group + 4 text groups.
    for (int d = 0; d < 2; d++) begin
      blk_q_t inq;
      bit fin;
      int fed;
      fin = 0;
      fed = 0;
      v = {$urandom, $urandom, $urandom};
      aad = {};
      txt = {};
      repeat (4) aad.push_back(rnd_blk());
      repeat (16) txt.push_back(rnd_blk());
      gcm(KS_KEY, v, aad, txt, ect, et);
      inq = {aad, d ? ect : txt};
      p4_iv = v; p4_n_aad = 1; p4_n_data = 4; p4_decrypt = d;
      p4_start = 1'b1;
      tick();
      p4_start = 1'b0;
      outs = {};
      while (!fin) begin
        p4_in_valid = fed < 5;
        for (int l = 0; l < 4; l++) p4_in_block[511-128*l -: 128] = (fed < 5) ? inq[4*fed+l] : '0;
        if (p4_in_valid && p4_in_ready) begin fed++; n_group++; end
        tick();
        if (p4_out_valid) for (int l = 0; l < 4; l++) outs.push_back(p4_out_block[511-128*l -: 128]);
        if (p4_tag_valid) begin t = p4_tag; fin = 1; end
      end
      p4_in_valid = 1'b0;
      check_msg("p4", outs, d ? txt : ect, t, et);
      n_decrypt += d;
    end

    // KOA GCM: wait for the set-up, run messages, change the key, run again.
    n = 0;
    while (!koa_ready && n < 2000) begin tick(); n++; end
    check(128'(koa_ready), 1, "koa ready after key set-up");
    n_keyset++;
    for (int r = 0; r < 2; r++) begin
      for (int d = 0; d < 2; d++) begin
        v = {$urandom, $urandom, $urandom};
        aad = {rnd_blk()};
        txt = {};
        repeat (62) txt.push_back(rnd_blk());   // 63 blocks: a full packet with the length block
        gcm(k, v, aad, txt, ect, et);
        koa_iv = v; koa_n_aad = 1; koa_n_data = 62; koa_decrypt = d;
        koa_run({aad, d ? ect : txt}, d, outs, t, ok);
        check_msg("koa", outs, d ? txt : ect, t, et);
        n_decrypt += d;
      end
      if (r == 0) begin
        k = rnd_blk();
        koa_key = k;
        koa_key_load = 1'b1;
        tick();
        koa_key_load = 1'b0;
        n = 0;
        while (!koa_ready && n < 2000) begin tick(); n++; end
        check(128'(koa_ready), 1, "koa ready after key change");
        n_keyset++;
      end
    end

    // Fast AEGIS-128.
    for (int d = 0; d < 2; d++) begin
      ag_key = rnd_blk();
      ag_iv = rnd_blk();
      txt = {};
      repeat (16) txt.push_back(rnd_blk());
      aegis(ag_key, ag_iv, txt, ect, et);
      ag_n_data = 16; ag_decrypt = d;
      ag_run(d ? ect : txt, d, outs, t, ok);
      check_msg("aegis", outs, d ? txt : ect, t, et);
      n_aegis++;
      n_decrypt += d;
    end

    // Compact CCM: encrypt (plaintext stored, then CTR pass), decrypt with
    // the right tag and with a forged one.
    begin
      blk_q_t hdr;
      hdr = {rnd_blk()};
      txt = {};
      repeat (6) txt.push_back(rnd_blk());
      ccm_key = rnd_blk();
      ccm_ctr0 = rnd_blk();
      ccm(ccm_key, ccm_ctr0, hdr, txt, ect, et);
      ccm_n_hdr = 1; ccm_n_data = 6; ccm_decrypt = 0; ccm_tag_in = et;
      ccm_run({hdr, txt}, 1, outs, t, ok);
      check_msg("ccm", outs, ect, t, et);
      n_ccm_mem++;
      ccm_decrypt = 1;
      ccm_run({hdr, ect}, 0, outs, t, ok);
      check_msg("ccm decrypt", outs, txt, t, et);
      count_tag("ccm", ok, 1);
      n_decrypt++;
      ccm_tag_in = ~et;
      ccm_run({hdr, ect}, 0, outs, t, ok);
      count_tag("ccm forged", ok, 0);
    end

    // Compact GCM: GCM specification test case 3, then a forged tag.
    begin
      blk_q_t p3, c3;
      p3 = '{128'hd9313225f88406e5a55909c5aff5269a, 128'h86a7a9531534f7da2e4c303d8a318a72,
             128'h1c3c0c95956809532fcf0e2449a6b525, 128'hb16aedf5aa0de657ba637b391aafd255};
      c3 = '{128'h42831ec2217774244b7221b784d0d49c, 128'he3aa212f2c02a4e035c17e2329aca12e,
             128'h21d514b25466931c7d8f6a5aac84aa05, 128'h1ba30b396a0aac973d58e091473f5985};
      gcm_key = 128'hfeffe9928665731c6d6a8f9467308308;
      gcm_iv = 96'hcafebabefacedbaddecaf888;
      gcm_n_aad = 0; gcm_n_data = 4; gcm_decrypt = 1;
      gcm_tag_in = 128'h4d5c2af327cd64a62cf35abd2ba6fab4;
      gcm_run(c3, 1, outs, t, ok);
      check_msg("gcm-lc", outs, p3, t, 128'h4d5c2af327cd64a62cf35abd2ba6fab4);
      count_tag("gcm-lc", ok, 1);
      n_decrypt++;
      gcm_tag_in[0] = ~gcm_tag_in[0];
      gcm_run(c3, 0, outs, t, ok);
      count_tag("gcm-lc forged", ok, 0);
    end

    // Compact AEGIS-128.
    begin
      agl_key = rnd_blk();
      agl_iv = rnd_blk();
      txt = {};
      repeat (3) txt.push_back(rnd_blk());
      aegis(agl_key, agl_iv, txt, ect, et);
      agl_n_data = 3; agl_decrypt = 1; agl_tag_in = et;
      agl_run(ect, 1, outs, t, ok);
      check_msg("aegis-lc", outs, txt, t, et);
      count_tag("aegis-lc", ok, 1);
      n_decrypt++;
      agl_tag_in = et ^ 128'h1;
      agl_run(ect, 0, outs, t, ok);
      count_tag("aegis-lc forged", ok, 0);
    end

    report();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
