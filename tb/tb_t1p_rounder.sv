// tb_t1p_rounder: checks trailing-1's rounding of 48-bit products.
//
// Each case picks a product value P no larger than (2^24 - 1)^2 (about half
// of them an exact product of two significands, the rest random with the
// top bit forced to 1 so P >= 2^46), splits it into two random addends
// a + b = P mod 2^48, and feeds the addends' top 26 bits, P[47:22] and
// P[21:0] to the rounder. The expected fraction and shift come from a
// direct round-to-nearest-even of P. Counted mechanisms: round-up, ties
// rounded to even both ways, the overflow shift and a round-up that carries
// into bit 47. A watchdog ends the run.
module tb_t1p_rounder;
  int checks = 0, failures = 0;
  int n_up = 0, n_tie_up = 0, n_tie_down = 0, n_v = 0, n_carry = 0;

  logic [25:0] a_hi, b_hi, s_hi;
  logic [21:0] s_lo;
  logic [22:0] frac;
  logic        shift;

  t1p_rounder dut (.a_hi(a_hi), .b_hi(b_hi), .s_hi(s_hi), .s_lo(s_lo),
                   .frac(frac), .shift(shift));

  task automatic run(logic [47:0] p);
    logic [47:0] a, b;
    logic [24:0] m;
    logic        v, rb, st, up, sh;
    a = {16'($urandom), $urandom};
    b = p - a;
    a_hi = a[47:22]; b_hi = b[47:22]; s_hi = p[47:22]; s_lo = p[21:0];
    #1;
    v  = p[47];
    m  = v ? {1'b0, p[47:24]} : {1'b0, p[46:23]};
    rb = v ? p[23] : p[22];
    st = v ? |p[22:0] : |p[21:0];
    up = rb & (st | m[0]);
    if (up) m = m + 25'd1;
    sh = v;
    if (m[24]) begin
      sh = 1'b1;
      m  = m >> 1;
      n_carry++;
    end
    if (up) n_up++;
    if (rb && !st && m[0] == 1'b0 && up) n_tie_up++;
    if (rb && !st && !up) n_tie_down++;
    if (v) n_v++;
    checks++;
    if (frac != m[22:0] || shift != sh) begin
      failures++;
      $display("FAIL P=%h frac=%h exp=%h shift=%b exp=%b", p, frac, m[22:0], shift, sh);
    end
  endtask

  initial begin
    run(48'h7FFFFFFFFEBA);  // 0xb50f52 * 0xb4fa95: rounds up into bit 47
    run(48'h7FFFFFC00000);  // all ones from bit 46 to 22, tie, rounds to 2.0
    run(48'h600000C00000);  // tie with l = 1: rounds up
    run(48'h600000400000);  // tie with l = 0: stays
    run(48'hFFFFFE000001);  // largest product
    for (int k = 0; k < 20000; k++) begin
      logic [23:0] x, y;
      x = {1'b1, 23'($urandom)};
      y = {1'b1, 23'($urandom)};
      if (k % 3 == 0) begin
        x[10:0] = '0;
        y[10:0] = '0;
      end
      if (k % 2 == 0) run(48'(longint'(x) * longint'(y)));
      else run({1'b0, 1'b1, 14'($urandom), $urandom});
    end
    if (n_up == 0 || n_tie_up == 0 || n_tie_down == 0 || n_v == 0 || n_carry == 0)
      failures++;
    $display("rounder: up=%0d tie_up=%0d tie_down=%0d ovf_shift=%0d carry47=%0d",
             n_up, n_tie_up, n_tie_down, n_v, n_carry);
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
