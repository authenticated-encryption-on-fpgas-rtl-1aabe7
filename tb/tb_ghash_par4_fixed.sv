// tb_ghash_par4_fixed: four-lane GHASH with constant H^4..H. Random runs of
// groups with random right-aligned masks (1111, 0111, 0011, 0001) are
// compared against the one-block-per-step reference X <- (X ^ B) * H, and
// `clear` is checked to restart the accumulator.
module tb_ghash_par4_fixed;
  import ae_ref_pkg::*;

  localparam logic [127:0] H = 128'hc6a13b37878f5b826f4f8162a1c8d879;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, clear = 0, in_valid = 0;
  logic [3:0] mask = '0;
  logic [3:0][127:0] c = '0;
  logic [127:0] x;

  ghash_par4_fixed dut (.clk, .rst_n, .clear, .in_valid, .mask, .c, .x);

  always #5 clk = ~clk;

  task automatic check(logic [127:0] got, logic [127:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h exp %h", what, got, exp);
    end
  endtask

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    blk_t ref_x;
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    check(x, '0, "reset value");
    for (int run = 0; run < 40; run++) begin
      clear <= 1'b1;
      @(posedge clk);
      clear <= 1'b0;
      @(posedge clk);
      check(x, '0, "cleared");
      ref_x = '0;
      for (int g = 0; g < 1 + $urandom_range(6); g++) begin
        int nl;
        nl = (run % 4 == 0) ? 4 : 1 + $urandom_range(3);
        for (int l = 0; l < 4; l++) c[3-l] <= rnd_blk();
        mask <= 4'((1 << nl) - 1);
        in_valid <= 1'b1;
        @(posedge clk);
        for (int j = 4 - nl; j < 4; j++) ref_x = gmul128(ref_x ^ c[3-j], H);
        in_valid <= 1'b0;
        repeat ($urandom_range(2)) @(posedge clk);
        #1;
        check(x, ref_x, $sformatf("run %0d group %0d mask %b", run, g, mask));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
