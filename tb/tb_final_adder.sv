// tb_final_adder: checks the 48-bit final adder (22-bit and 26-bit
// carry-select sections): s must be (a + b) mod 2^48 and c22 the carry out
// of bit 21, for random and carry-chain operands. A watchdog ends the run.
module tb_final_adder;
  int checks = 0, failures = 0;

  logic [47:0] a, b, s;
  logic        c22;
  final_adder dut (.a(a), .b(b), .s(s), .c22(c22));

  task automatic run(logic [47:0] av, logic [47:0] bv);
    logic [22:0] lo;
    a = av; b = bv;
    #1;
    lo = {1'b0, av[21:0]} + {1'b0, bv[21:0]};
    checks += 2;
    if (s != 48'(av + bv)) begin
      failures++;
      $display("FAIL a=%h b=%h s=%h", av, bv, s);
    end
    if (c22 != lo[22]) failures++;
  endtask

  initial begin
    run(48'hFFFFFFFFFFFF, 48'h1);
    run(48'h00000003FFFFF, 48'h1);
    for (int k = 0; k < 20000; k++) begin
      logic [47:0] av;
      av = {16'($urandom), $urandom};
      if (k % 3 == 0) run(av, ~av + 48'($urandom_range(0, 2)));
      else run(av, {16'($urandom), $urandom});
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
