// tb_exponent_block: checks sign, biased exponent, overflow, underflow and
// zero detection against integer arithmetic for every exponent pair, both
// shift values and random signs. A watchdog ends the run.
module tb_exponent_block;
  int checks = 0, failures = 0;

  logic       sa, sb, shift, sign, ovf, unf, zero;
  logic [7:0] ea, eb, exp;

  exponent_block dut (.sign_a(sa), .sign_b(sb), .exp_a(ea), .exp_b(eb),
                      .shift(shift), .sign(sign), .exp(exp), .ovf(ovf),
                      .unf(unf), .zero(zero));

  initial begin
    for (int i = 0; i < 256; i++)
      for (int j = 0; j < 256; j++)
        for (int s = 0; s < 2; s++) begin
          int  e;
          logic z, eo, eu;
          ea = 8'(i); eb = 8'(j); shift = s[0];
          sa = 1'($urandom); sb = 1'($urandom);
          #1;
          e  = i + j - 127 + s;
          z  = (i == 0) || (j == 0);
          eo = !z && e >= 255;
          eu = !z && e <= 0;
          checks++;
          if (sign != (sa ^ sb) || zero != z || ovf != eo || unf != eu ||
              (!z && !eo && !eu && exp != 8'(e))) begin
            failures++;
            if (failures < 10)
              $display("FAIL ea=%0d eb=%0d sh=%0d exp=%0d ovf=%b unf=%b", i, j, s, exp, ovf, unf);
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
