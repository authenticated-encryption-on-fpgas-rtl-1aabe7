// tb_ghash_koa: feedback-free GHASH with the H-power memory.
// Loads H, checks that h_ready rises after the 252-clock memory fill
// (63 products x 4 clocks, NMAX = 64), then hashes packets of 1..64
// blocks against the sequential reference X <- (X ^ B) * H and checks
// that the result is on z_valid 5 clock cycles after the cycle in which the
// last block is presented (64 + 5 cycles for a full packet): the testbench
// sees it on the 4th rising edge after the edge that takes the last block.
// Blocks arrive with random gaps in some packets. A second H is then loaded
// to check re-initialization (and that no leftover product from filling the
// memory reaches the accumulator).
module tb_ghash_koa;
  import ae_ref_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, h_load = 0, h_ready, start = 0, in_valid = 0, z_valid;
  logic [127:0] h = '0, in_block = '0, z;
  logic [6:0] n = '0;

  ghash_koa dut (.clk, .rst_n, .h_load, .h, .h_ready, .start, .n, .in_valid, .in_block,
                 .z_valid, .z);

  always #5 clk = ~clk;

  task automatic check(logic [127:0] got, logic [127:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h exp %h", what, got, exp);
    end
  endtask

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic load_h(logic [127:0] hv, output int clocks);
    h = hv;
    h_load = 1'b1;
    tick();
    h_load = 1'b0;
    clocks = 0;
    do begin
      tick();
      clocks++;
    end while (!h_ready);
  endtask

  // Drives and samples 1 time unit after each rising edge, clear of the
  // registers' updates.
  task automatic tick();
    @(posedge clk);
    #1;
  endtask

  task automatic packet(logic [127:0] hv, int nb, bit gaps);
    blk_t ref_x = '0;
    int sent = 0, cyc = 0, last = 0;
    n = 7'(nb);
    start = 1'b1;
    tick();
    start = 1'b0;
    while (sent < nb) begin
      in_valid = 1'b0;
      if (!gaps || $urandom_range(3) != 0) begin
        blk_t b;
        b = rnd_blk();
        ref_x = gmul128(ref_x ^ b, hv);
        in_valid = 1'b1;
        in_block = b;
        sent++;
      end
      tick();
      cyc++;
      if (in_valid) last = cyc;
    end
    in_valid = 1'b0;
    while (!z_valid) begin
      tick();
      cyc++;
    end
    check(z, ref_x, $sformatf("packet of %0d", nb));
    check(128'(cyc - last), 4, $sformatf("latency after last block, n=%0d", nb));
    tick();
  endtask

  initial begin
    logic [127:0] hv;
    int clocks;
    repeat (2) tick();
    rst_n = 1;
    tick();
    check(128'(h_ready), 0, "not ready before H");
    hv = 128'hc6a13b37878f5b826f4f8162a1c8d879;
    load_h(hv, clocks);
    $display("H memory filled after %0d clocks", clocks);
    checks++;
    if (clocks < 252 || clocks > 256) begin failures++; $display("FAIL fill took %0d", clocks); end
    packet(hv, 64, 0);
    packet(hv, 1, 0);
    packet(hv, 2, 0);
    for (int i = 0; i < 10; i++) packet(hv, 1 + $urandom_range(63), i % 2);
    hv = rnd_blk();
    load_h(hv, clocks);
    for (int i = 0; i < 6; i++) packet(hv, 1 + $urandom_range(63), i % 2);
    packet(hv, 64, 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
