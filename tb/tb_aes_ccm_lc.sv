// tb_aes_ccm_lc: low-cost AES-CCM with the plaintext block memory.
// Random messages (1..3 caller-formatted header blocks, 0..8 text blocks)
// are encrypted and compared with the reference model (CBC-MAC over header
// and plaintext, CTR from ctr0 + 1, tag = Y ^ E(ctr0)); the ciphertext is
// decrypted back with the right tag (tag_ok = 1), with a flipped tag bit
// and with one flipped ciphertext bit (tag_ok = 0). A message of MEM_DEPTH
// blocks fills the memory. The clock count is checked against two 50-clock
// AES operations per text block.
module tb_aes_ccm_lc;
  import ae_ref_pkg::*;

  localparam int WATCHDOG = 400000;

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

  logic [127:0] ctr0 = '0;
  logic [15:0] n_hdr = '0;

  aes_ccm_lc dut (.clk, .rst_n, .key, .start, .ctr0, .n_hdr, .n_data, .decrypt, .tag_in, .busy,
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

  task automatic one(int nh, int nd, bit gaps, bit tamper);
    blk_q_t hdr, txt, ect, outs, ctq;
    blk_t et, t;
    bit ok;
    int cyc;
    hdr = {}; txt = {};
    repeat (nh) hdr.push_back(rnd_blk());
    repeat (nd) txt.push_back(rnd_blk());
    key = rnd_blk();
    ctr0 = rnd_blk();
    ccm(key, ctr0, hdr, txt, ect, et);
    n_hdr = 16'(nh); n_data = 16'(nd); decrypt = 0; tag_in = et;
    stream({hdr, txt}, gaps, outs, t, ok, cyc);
    check(128'(outs.size()), 128'(nd), "encrypt block count");
    foreach (outs[i]) check(outs[i], ect[i], $sformatf("C%0d", i));
    check(t, et, "encrypt tag");
    check(128'(ok), 1, "encrypt tag_ok");
    if (!gaps) begin
      $display("CCM-LC: %0d header + %0d text blocks in %0d clocks", nh, nd, cyc);
      checks++;
      if (cyc < 100 * nd + 50 * nh + 50 || cyc > 100 * nd + 50 * nh + 50 + 4 * (nd + nh) + 20) begin
        failures++;
        $display("FAIL clock count %0d", cyc);
      end
    end
    decrypt = 1;
    stream({hdr, ect}, gaps, outs, t, ok, cyc);
    foreach (outs[i]) check(outs[i], txt[i], $sformatf("P%0d", i));
    check(t, et, "decrypt tag");
    check(128'(ok), 1, "decrypt tag_ok");
    if (tamper) begin
      tag_in[5] = ~tag_in[5];
      stream({hdr, ect}, 0, outs, t, ok, cyc);
      check(128'(ok), 0, "forged tag rejected");
      tag_in = et;
      if (nd > 0) begin
        ctq = ect;
        ctq[nd - 1][77] = ~ctq[nd - 1][77];
        stream({hdr, ctq}, 0, outs, t, ok, cyc);
        check(128'(ok), 0, "modified ciphertext rejected");
      end
    end
  endtask

  initial begin
    repeat (2) tick();
    rst_n = 1;
    tick();
    one(1, 4, 0, 1);
    one(2, 0, 0, 1);
    for (int m = 0; m < 8; m++) one(1 + $urandom_range(2), $urandom_range(8), m % 2, m < 3);
    one(1, 64, 0, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
