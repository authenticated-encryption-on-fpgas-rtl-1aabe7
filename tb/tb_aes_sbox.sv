// tb_aes_sbox: exhaustive check of the S-box against the reference built by
// inverse search, plus the spot values S(00)=63, S(01)=7c, S(53)=ed.
module tb_aes_sbox;
  import ae_ref_pkg::*;
  int checks = 0, failures = 0;
  logic [7:0] in, out;

  aes_sbox dut (.in, .out);

  task automatic check(logic [7:0] got, logic [7:0] exp, string what);
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
    for (int x = 0; x < 256; x++) begin
      in = 8'(x);
      #1;
      check(out, sb(8'(x)), $sformatf("sbox[%02h]", x));
      if (x == 8'h00) check(out, 8'h63, "S(00)");
      if (x == 8'h01) check(out, 8'h7c, "S(01)");
      if (x == 8'h53) check(out, 8'hed, "S(53)");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
