// tb_t1p: checks the trailing-1's predictor. For addends a, b and a carry
// in c, with s = a + b + c, every flag r[i] must equal "s[i-1:0] are all
// ones", and s ^ r must be s + 1. Checked on the 8-bit default (two groups
// of 4), a 24-bit carry-select form and a 24-bit carry-ripple form, with
// random addends and addends chosen to make long runs of ones. A watchdog
// ends the run.
module tb_t1p;
  int checks = 0, failures = 0;

  logic [7:0]  a8, b8;
  logic [8:0]  r8;
  logic [23:0] a24, b24;
  logic [24:0] r24s, r24r;
  logic        s0_8, s0_24;

  t1p dut8 (.a(a8), .b(b8), .s0(s0_8), .r(r8));
  t1p #(.W(24), .GROUP(4))  dut24s (.a(a24), .b(b24), .s0(s0_24), .r(r24s));
  t1p #(.W(24), .GROUP(24)) dut24r (.a(a24), .b(b24), .s0(s0_24), .r(r24r));

  function automatic logic [24:0] ref_flags(logic [23:0] s, int w);
    logic [24:0] f;
    f[0] = 1'b1;
    for (int i = 1; i <= w; i++) f[i] = f[i-1] & s[i-1];
    return f;
  endfunction

  task automatic run(logic [23:0] av, logic [23:0] bv, logic c);
    logic [23:0] s;
    logic [24:0] f, f8;
    s = av + bv + 24'(c);
    a24 = av; b24 = bv; s0_24 = s[0];
    a8 = av[7:0]; b8 = bv[7:0]; s0_8 = s[0];
    #1;
    f = ref_flags(s, 24);
    checks += 3;
    if (r24s != f) begin
      failures++;
      $display("FAIL a=%h b=%h c=%b r=%h exp=%h", av, bv, c, r24s, f);
    end
    if (r24r != f) failures++;
    f8 = ref_flags(s, 8);
    if (r8 != f8[8:0]) failures++;
    checks++;
    if ((s ^ r24s[23:0]) != 24'(s + 1)) failures++;
  endtask

  initial begin
    for (int k = 0; k < 20000; k++) begin
      logic [23:0] av, bv;
      logic c;
      av = 24'($urandom);
      c  = 1'($urandom);
      // Put the sum near a run of ones of random length.
      bv = 24'((24'hFFFFFF >> $urandom_range(0, 23)) - av - 24'(c));
      if (k % 4 == 0) bv = 24'($urandom);
      if (k % 8 == 1) bv = bv ^ (24'h1 << $urandom_range(0, 23));
      run(av, bv, c);
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
