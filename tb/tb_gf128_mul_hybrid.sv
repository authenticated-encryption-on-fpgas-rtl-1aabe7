// tb_gf128_mul_hybrid: digit-serial GF(2^128) multiplier (4 bits of the
// operand per clock). Corner and random operands are compared with the
// reference product; `done` must be seen on the 33rd rising edge after the
// one that takes `start` (one loading clock and 32 digit clocks), and
// p must hold its value until the next start.
module tb_gf128_mul_hybrid;
  import ae_ref_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, start = 0, busy, done;
  logic [127:0] a = '0, h = '0, p;

  gf128_mul_hybrid dut (.clk, .rst_n, .start, .a, .h, .busy, .done, .p);

  always #5 clk = ~clk;

  task automatic check(logic [127:0] got, logic [127:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h exp %h", what, got, exp);
    end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic tick();
    @(posedge clk);
    #1;
  endtask

  task automatic mul(logic [127:0] x, logic [127:0] y);
    int n;
    a = x;
    h = y;
    start = 1'b1;
    tick();
    start = 1'b0;
    a = rnd_blk();   // the operands may change once the product has started
    n = 1;
    while (!done && n < 100) begin
      tick();
      n++;
    end
    check(128'(n), 33, "clocks from start to done");
    check(p, gmul128(x, y), "product");
    tick();
    check(p, gmul128(x, y), "product held");
  endtask

  initial begin
    repeat (2) tick();
    rst_n = 1;
    tick();
    mul(128'h0388dace60b6a392f328c2b971b2fe78, 128'h66e94bd4ef8a2c3b884cfa59ca342b2e);
    check(p, 128'h5e2ec746917062882c85b0685353deb7, "GCM specification X1");
    mul('1, '1);
    mul('0, 128'h1234);
    mul({1'b1, 127'h0}, 128'hc6a13b37878f5b826f4f8162a1c8d879);
    for (int i = 0; i < 150; i++) mul(i < 128 ? (128'h1 << i) : rnd_blk(), rnd_blk());
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
