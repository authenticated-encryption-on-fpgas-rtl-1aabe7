// tb_aegis128_lc: low-cost AEGIS-128 on a quarter AES round.
// Random messages (0..6 blocks, random key and IV) in both directions with
// gaps on in_valid are compared with the reference AEGIS-128 model, the
// tag check (tag_ok) is exercised with a right and a forged tag, and the
// clock counts are checked: 20 clocks per state update, so 200 clocks of
// initialization, 20 per block and 7 x 20 = 140 of finalization.
module tb_aegis128_lc;
  import ae_ref_pkg::*;

  localparam int WATCHDOG = 100000;

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

  logic [127:0] iv = '0;
  localparam int PER_BLOCK = 20, INIT = 200, FINAL = 140, MSGS = 10, MAXB = 6;
  localparam bit TAGCHK = 1;

  aegis128_lc dut (.clk, .rst_n, .start, .key, .iv, .n_data, .decrypt, .tag_in, .busy,
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
    blk_q_t txt, ect, outs;
    blk_t et, t;
    bit ok;
    int cyc0, cyc1, cyc5;
    repeat (2) tick();
    rst_n = 1;
    tick();
    // Known-answer check: K = 0, IV = 0, one zero block.
    key = '0; iv = '0; n_data = 1; decrypt = 0; tag_in = '0;
    txt = '{128'h0};
    aegis(key, iv, txt, ect, et);
    stream(txt, 0, outs, t, ok, cyc1);
    check(outs[0], ect[0], "zero-key ciphertext");
    check(t, et, "zero-key tag");
    n_data = 0;
    txt = {};
    stream(txt, 0, outs, t, ok, cyc0);
    n_data = 5;
    repeat (5) txt.push_back(rnd_blk());
    stream(txt, 0, outs, t, ok, cyc5);
    $display("CYCLES: 0 blocks %0d, 1 block %0d, 5 blocks %0d", cyc0, cyc1, cyc5);
    check(128'(cyc5 - cyc1), 128'(4 * PER_BLOCK), "clocks per block");
    checks++;
    if (cyc0 < INIT + FINAL || cyc0 > INIT + FINAL + 6) begin
      failures++;
      $display("FAIL empty message took %0d clocks", cyc0);
    end
    for (int m = 0; m < MSGS; m++) begin
      bit dec;
      key = rnd_blk();
      iv = rnd_blk();
      txt = {};
      repeat ($urandom_range(MAXB)) txt.push_back(rnd_blk());
      aegis(key, iv, txt, ect, et);
      dec = m % 2;
      n_data = 16'(txt.size()); decrypt = dec; tag_in = et;
      stream(dec ? ect : txt, m > 1, outs, t, ok, cyc0);
      check(128'(outs.size()), 128'(txt.size()), "block count");
      foreach (outs[i]) check(outs[i], dec ? txt[i] : ect[i], $sformatf("msg %0d block %0d", m, i));
      check(t, et, $sformatf("msg %0d tag", m));
      if (TAGCHK) begin
        check(128'(ok), 1, "tag_ok");
        if (dec && txt.size() > 0) begin
          tag_in[100] = ~tag_in[100];
          stream(ect, 0, outs, t, ok, cyc0);
          check(128'(ok), 0, "forged tag rejected");
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
