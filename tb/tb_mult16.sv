// tb_mult16: checks the 16 x 16 fixed point multiplier against the integer
// product for corner and random operands. A watchdog ends the run.
module tb_mult16;
  int checks = 0, failures = 0;

  logic [15:0] x, y;
  logic [31:0] p;

  mult16 dut (.x(x), .y(y), .p(p));

  task automatic run(logic [15:0] xv, logic [15:0] yv);
    x = xv; y = yv;
    #1;
    checks++;
    if (p != 32'(xv) * 32'(yv)) begin
      failures++;
      $display("FAIL x=%h y=%h p=%h", xv, yv, p);
    end
  endtask

  initial begin
    run(16'hFFFF, 16'hFFFF);
    run(16'h0000, 16'hFFFF);
    run(16'h8000, 16'h8000);
    run(16'hAAAA, 16'h5555);
    for (int k = 0; k < 50000; k++) run(16'($urandom), 16'($urandom));
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
