// tb_koa_mul_pipe: 4-stage pipelined Karatsuba GF(2^128) multiplier.
// Streams corner and random operand pairs, one per clock with random gaps,
// and checks every product against the reference model and that each
// product appears exactly 4 clocks after its operands.
module tb_koa_mul_pipe;
  import ae_ref_pkg::*;

  int checks = 0, failures = 0;
  logic clk = 0, rst_n = 0, in_valid = 0, out_valid;
  logic [127:0] x = '0, y = '0, p;

  koa_mul_pipe dut (.clk, .rst_n, .in_valid, .x, .y, .out_valid, .p);

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

  logic [127:0] exp_q[$];
  logic [3:0] vhist = '0;
  always @(posedge clk) begin
    vhist <= {vhist[2:0], in_valid};
    if (rst_n) begin
      checks++;
      if (out_valid !== vhist[3]) begin failures++; $display("FAIL latency"); end
    end
    if (out_valid) check(p, exp_q.pop_front(), "product");
  end

  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    for (int i = 0; i < 600; i++) begin
      logic [127:0] a, b;
      a = rnd_blk();
      b = rnd_blk();
      if (i < 128) begin a = 128'h1 << i; end
      if (i == 128) begin a = '1; b = '1; end
      if (i == 129) begin a = '0; end
      if (i == 130) begin a = {1'b1, 127'h0}; end
      in_valid <= 1'b1;
      x <= a;
      y <= b;
      exp_q.push_back(gmul128(a, b));
      @(posedge clk);
      if (i > 300 && $urandom_range(3) == 0) begin
        in_valid <= 1'b0;
        @(posedge clk);
      end
    end
    in_valid <= 1'b0;
    repeat (8) @(posedge clk);
    check(128'(exp_q.size()), 0, "all products out");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
