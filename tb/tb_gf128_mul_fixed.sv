// tb_gf128_mul_fixed: fixed-operand multiplier with its default operand
// H = E(000102...0f, 0) and with H from the GCM specification's first test
// key (66e94bd4...): random and corner operands against the reference
// product, and the specification's value H * (ciphertext block).
module tb_gf128_mul_fixed;
  import ae_ref_pkg::*;

  int checks = 0, failures = 0;
  localparam logic [127:0] H1 = 128'hc6a13b37878f5b826f4f8162a1c8d879;
  localparam logic [127:0] H2 = 128'h66e94bd4ef8a2c3b884cfa59ca342b2e;
  logic [127:0] a, p1, p2;

  gf128_mul_fixed dut1 (.a, .p(p1));
  gf128_mul_fixed #(.H(H2)) dut2 (.a, .p(p2));

  task automatic check(logic [127:0] got, logic [127:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h exp %h", what, got, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // GCM test case 2: X1 = C1 * H = 5e2ec746917062882c85b0685353deb7.
    a = 128'h0388dace60b6a392f328c2b971b2fe78;
    #1;
    check(p2, 128'h5e2ec746917062882c85b0685353deb7, "GCM spec X1");
    a = {1'b1, 127'h0};   // the field's 1
    #1;
    check(p1, H1, "1 * H");
    for (int i = 0; i < 300; i++) begin
      a = (i < 128) ? (128'h1 << i) : rnd_blk();
      #1;
      check(p1, gmul128(a, H1), "a * H (default)");
      check(p2, gmul128(a, H2), "a * H (spec key)");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
