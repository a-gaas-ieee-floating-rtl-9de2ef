// tb_cs_adder: checks the carry-select adder against the integer sum in
// three forms: the default 48-bit one (blocks 7,7,8,8,9,9), a 16-bit one
// with four selected 4-bit blocks, and a 30-bit one whose blocks grow by one
// bit (4 to 8). Operands are random, with random carry-in, plus operands
// that make the carry run through every block. A watchdog ends the run.
module tb_cs_adder;
  int checks = 0, failures = 0;

  logic [47:0] a, b, s;
  logic        cin, cout;
  cs_adder dut (.a(a), .b(b), .cin(cin), .s(s), .cout(cout));

  logic [15:0] a16, b16, s16;
  logic        cout16;
  cs_adder #(.W(16), .NB(4), .BW('{4, 4, 4, 4, 0, 0, 0, 0}), .FIRST_RIPPLE(1'b0))
    dut16 (.a(a16), .b(b16), .cin(cin), .s(s16), .cout(cout16));

  // Blocks growing by one bit from a 4-bit ripple block: 4, 5, 6, 7, 8.
  logic [29:0] s30;
  logic        cout30;
  cs_adder #(.W(30), .NB(5), .BW('{4, 5, 6, 7, 8, 0, 0, 0}), .FIRST_RIPPLE(1'b1))
    dut30 (.a(a[29:0]), .b(b[29:0]), .cin(cin), .s(s30), .cout(cout30));

  task automatic run(logic [47:0] av, logic [47:0] bv, logic c);
    logic [48:0] e;
    logic [16:0] e16;
    a = av; b = bv; cin = c; a16 = av[15:0]; b16 = bv[15:0];
    #1;
    e   = {1'b0, av} + {1'b0, bv} + 49'(c);
    e16 = {1'b0, av[15:0]} + {1'b0, bv[15:0]} + 17'(c);
    checks += 2;
    if ({cout, s} != e) begin
      failures++;
      $display("FAIL a=%h b=%h c=%b got=%h exp=%h", av, bv, c, {cout, s}, e);
    end
    if ({cout16, s16} != e16) failures++;
    checks++;
    if ({cout30, s30} != {1'b0, av[29:0]} + {1'b0, bv[29:0]} + 31'(c)) failures++;
  endtask

  initial begin
    run(48'hFFFFFFFFFFFF, 48'h0, 1'b1);
    run(48'hFFFFFFFFFFFF, 48'h1, 1'b0);
    run(48'h7FFFFFFFFFFF, 48'h7FFFFFFFFFFF, 1'b1);
    for (int k = 0; k < 20000; k++) begin
      logic [47:0] av;
      av = {16'($urandom), $urandom};
      if (k % 4 == 0) run(av, ~av, 1'($urandom));
      else run(av, {16'($urandom), $urandom}, 1'($urandom));
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
