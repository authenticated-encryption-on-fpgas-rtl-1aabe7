// tb_aes_round: random states and keys through a middle round and a final
// round, compared with the byte-array reference round; plus the first
// round of the FIPS-197 example (state after round 1).
module tb_aes_round;
  import ae_ref_pkg::*;
  int checks = 0, failures = 0;
  logic [127:0] in, rk, out_mid, out_fin;

  aes_round #(.FINAL(1'b0)) dut_mid (.in, .rk, .out(out_mid));
  aes_round #(.FINAL(1'b1)) dut_fin (.in, .rk, .out(out_fin));

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
    // FIPS-197 appendix B: input 3243f6a8..., key 2b7e1516...; state at the
    // start of round 2 is a49c7ff2689f352b6b5bea43026a5049 with k1.
    in = 128'h193de3bea0f4e22b9ac68d2ae9f84808;
    rk = 128'ha0fafe1788542cb123a339392a6c7605;
    #1;
    check(out_mid, 128'ha49c7ff2689f352b6b5bea43026a5049, "FIPS-197 round 1");
    for (int i = 0; i < 200; i++) begin
      in = rnd_blk();
      rk = rnd_blk();
      #1;
      check(out_mid, round_ref(in, rk, 1'b1), "middle round");
      check(out_fin, round_ref(in, rk, 1'b0), "final round");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
