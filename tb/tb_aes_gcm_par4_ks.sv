// tb_aes_gcm_par4_ks: 4-parallel key-synthesized AES-GCM (512 bits/clock).
// Random messages of 0..3 AAD groups and 1..5 text groups (a group is four
// blocks), plus one empty message, are compared block by block and on the tag against the
// sequential reference GCM model; encrypt and decrypt, with and without
// gaps on in_valid. With in_valid held high one 512-bit group is taken
// every clock.
module tb_aes_gcm_par4_ks;
  import ae_ref_pkg::*;

  localparam logic [127:0] K = 128'h000102030405060708090a0b0c0d0e0f;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, start = 0;
  logic [95:0] iv = '0;
  logic [15:0] n_aad = '0, n_data = '0;
  logic decrypt = 0, in_valid = 0;
  logic [511:0] in_block = '0, out_block;
  logic busy, in_ready, out_valid, tag_valid;
  logic [127:0] tag;

  aes_gcm_par4_ks dut (.clk, .rst_n, .start, .iv, .n_aad, .n_data, .decrypt, .busy,
                       .in_valid, .in_ready, .in_block, .out_valid, .out_block,
                       .tag_valid, .tag);

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

  initial begin
    blk_q_t aad, txt, pt, ect, outs;
    blk_t et, t;
    for (int i = 0; i < 3; i++) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    for (int m = 0; m < 20; m++) begin
      bit [95:0] v;
      bit dec, gaps, got_tag;
      int na, nd, fed, first, last, cyc;
      v = {$urandom, $urandom, $urandom};
      na = $urandom_range(3);
      nd = 1 + $urandom_range(4);
      dec = m % 2 == 1;
      gaps = m >= 4;
      if (m == 2) begin na = 0; nd = 0; end
      aad = {}; txt = {}; outs = {};
      repeat (4 * na) aad.push_back(rnd_blk());
      repeat (4 * nd) txt.push_back(rnd_blk());
      gcm(K, v, aad, txt, ect, et);
      pt = txt;
      if (dec) txt = ect;
      iv <= v; n_aad <= 16'(na); n_data <= 16'(nd); decrypt <= dec;
      start <= 1'b1;
      @(posedge clk);
      start <= 1'b0;
      fed = 0; first = -1; last = 0; cyc = 0; got_tag = 0;
      while (!got_tag) begin
        if (in_valid && in_ready) begin
          fed++;
          if (first < 0) first = cyc;
          last = cyc;
        end
        if (out_valid)
          for (int l = 0; l < 4; l++) outs.push_back(out_block[511-128*l -: 128]);
        if (tag_valid) begin t = tag; got_tag = 1; end
        in_valid <= (fed < na + nd) && (!gaps || $urandom_range(2) != 0);
        for (int l = 0; l < 4; l++)
          in_block[511-128*l -: 128] <= (fed < na) ? aad[4*fed+l] :
                                        (fed < na + nd) ? txt[4*(fed-na)+l] : '0;
        @(posedge clk);
        cyc++;
      end
      in_valid <= 1'b0;
      @(posedge clk);
      check(128'(outs.size()), 128'(4 * nd), "block count");
      foreach (outs[i])
        check(outs[i], dec ? pt[i] : ect[i],
              $sformatf("msg %0d block %0d", m, i));
      check(t, et, $sformatf("msg %0d tag", m));
      if (!gaps && na + nd > 0) check(128'(last - first + 1), 128'(na + nd), "one group per clock");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
