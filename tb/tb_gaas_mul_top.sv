// tb_gaas_mul_top: end-to-end test of both multipliers through the top
// level, at the default configuration.
//
// The 16 x 16 fixed point multiplier is checked against the integer product
// alongside every floating point case (random operands plus corners).
//
// For the single precision multiplier:
// Every result is compared with an integer reference: the exact 48-bit
// significand product, normalised, rounded to nearest even, with the
// exponent range checked (overflow -> infinity, underflow -> zero, a zero
// exponent field -> zero operand). Directed cases reach the rare paths, and
// random cases (a quarter with the low 11 fraction bits clear, so exact ties occur) cover
// the rest. The test counts how often each mechanism of the design fired:
// negative Booth digits, round-up, ties rounded to even both ways,
// normalisation shift from a product >= 2, a round-up that carries into the
// next binade, exponent overflow, exponent underflow and zero operands.
// Any mechanism that never fired counts as a failure. A watchdog ends the
// run.
module tb_gaas_mul_top;
  int checks = 0, failures = 0;
  int n_negdig = 0, n_up = 0, n_tie_up = 0, n_tie_down = 0, n_vshift = 0;
  int n_carry = 0, n_ovf = 0, n_unf = 0, n_zero = 0;

  logic [31:0] a, b, p;
  logic        ovf, unf;

  logic [15:0] fx_x, fx_y;
  logic [31:0] fx_p;
  int          n_fx = 0;

  gaas_mul_top dut (.fp_a(a), .fp_b(b), .fp_p(p), .fp_ovf(ovf), .fp_unf(unf),
                    .fx_x(fx_x), .fx_y(fx_y), .fx_p(fx_p));

  task automatic run(logic [31:0] av, logic [31:0] bv);
    logic [47:0] prod;
    logic [24:0] m;
    logic        sgn, v, rb, st, up, z, eo, eu;
    logic [31:0] e_p;
    int          e;
    a = av; b = bv;
    fx_x = (n_fx == 0) ? 16'hFFFF : 16'($urandom);
    fx_y = (n_fx == 0) ? 16'hFFFF : 16'($urandom);
    #1;
    n_fx++;
    checks++;
    if (fx_p != 32'(fx_x) * 32'(fx_y)) begin
      failures++;
      $display("FAIL16 x=%h y=%h p=%h", fx_x, fx_y, fx_p);
    end
    sgn  = av[31] ^ bv[31];
    z    = (av[30:23] == 0) || (bv[30:23] == 0);
    prod = 48'(longint'({1'b1, av[22:0]}) * longint'({1'b1, bv[22:0]}));
    v    = prod[47];
    m    = v ? {1'b0, prod[47:24]} : {1'b0, prod[46:23]};
    rb   = v ? prod[23] : prod[22];
    st   = v ? |prod[22:0] : |prod[21:0];
    up   = rb & (st | m[0]);
    e    = int'(av[30:23]) + int'(bv[30:23]) - 127 + int'(v);
    if (up) m = m + 25'd1;
    if (m[24]) begin
      m = m >> 1;
      e = e + 1;
      if (!z) n_carry++;
    end
    eo = !z && e >= 255;
    eu = !z && e <= 0;
    if (z || eu)  e_p = {sgn, 31'd0};
    else if (eo)  e_p = {sgn, 8'hFF, 23'd0};
    else          e_p = {sgn, 8'(e), m[22:0]};
    // Mechanism counts.
    begin
      logic [25:0] yx;
      yx = {2'b01, bv[22:0], 1'b0};  // significand with y[-1] = 0
      for (int i = 0; i <= 12; i++)
        if (yx[2*i+2] && !(yx[2*i+1] && yx[2*i])) begin n_negdig++; break; end
    end
    if (up) n_up++;
    if (rb && !st && up) n_tie_up++;
    if (rb && !st && !up) n_tie_down++;
    if (v) n_vshift++;
    if (z) n_zero++;
    if (eo) n_ovf++;
    if (eu) n_unf++;
    checks++;
    if (p != e_p || ovf != eo || unf != eu) begin
      failures++;
      if (failures < 10)
        $display("FAIL a=%h b=%h p=%h exp=%h ovf=%b unf=%b", av, bv, p, e_p, ovf, unf);
    end
  endtask

  initial begin
    run(32'h3F800000, 32'h3F800000);            // 1 * 1
    run(32'h40000000, 32'hC0400000);            // 2 * -3
    run(32'h3FB50F52, 32'h3FB4FA95);            // rounds up into 2.0
    run(32'hBFB50F53, 32'h3FB4FA94);            // the same, negative
    run(32'h3FB50F54, 32'h3FB4FA93);
    run(32'h3FB50F55, 32'h3FB4FA92);
    run(32'h42B50F52, 32'h3AB4FA95);            // the same at other exponents
    run(32'h7F000000, 32'h40000000);            // overflow
    run(32'h00800000, 32'h3F000000);            // underflow
    run(32'h00000000, 32'h40490FDB);            // zero operand
    run(32'h3FC00001, 32'h3F800001);            // 1.5 * (1 + ulp)
    run(32'h7F7FFFFF, 32'h3F800000);            // largest finite * 1
    for (int k = 0; k < 100000; k++) begin
      logic [31:0] av, bv;
      av = $urandom;
      bv = $urandom;
      // Keep most exponents near the bias so most results are normal.
      if (k % 8 != 0) begin
        av[30:23] = 8'($urandom_range(64, 190));
        bv[30:23] = 8'($urandom_range(64, 190));
      end
      if (k % 4 == 1) begin
        av[10:0] = '0;
        bv[10:0] = '0;
      end
      run(av, bv);
    end
    $display("mechanisms: negdigit=%0d roundup=%0d tie_up=%0d tie_down=%0d vshift=%0d",
             n_negdig, n_up, n_tie_up, n_tie_down, n_vshift);
    $display("mechanisms: round_carry=%0d ovf=%0d unf=%0d zero=%0d",
             n_carry, n_ovf, n_unf, n_zero);
    if (n_negdig == 0) failures++;
    if (n_up == 0) failures++;
    if (n_tie_up == 0) failures++;
    if (n_tie_down == 0) failures++;
    if (n_vshift == 0) failures++;
    if (n_carry == 0) failures++;
    if (n_ovf == 0) failures++;
    if (n_unf == 0) failures++;
    if (n_zero == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
