// tb_mcs_array: checks the Booth partial product array at 24 and 8 bits.
//
// The testbench recodes the multiplier itself (digit i = -2*y[2i+1] +
// y[2i] + y[2i-1]) and checks that sum + carry equals x * y modulo
// 2^(2N) for random and corner operands, and that the 24-bit array's
// reduction is 7 full adders deep. A watchdog ends the run.
module tb_mcs_array;
  import fp_mul_pkg::*;

  int checks = 0, failures = 0;

  logic [23:0] x24, y24;
  booth_digit_t [12:0] d24;
  logic [47:0] s24, c24;
  mcs_array #(.N(24)) dut24 (.x(x24), .d(d24), .sum(s24), .carry(c24));

  logic [7:0] x8, y8;
  booth_digit_t [4:0] d8;
  logic [15:0] s8, c8;
  mcs_array #(.N(8)) dut8 (.x(x8), .d(d8), .sum(s8), .carry(c8));

  function automatic booth_digit_t digit(longint y, int i);
    int v;
    booth_digit_t bd;
    v = -2 * int'((y >> (2*i+1)) & 1) + int'((y >> (2*i)) & 1)
        + ((i == 0) ? 0 : int'((y >> (2*i-1)) & 1));
    bd.neg = v < 0;
    bd.one = (v == 1) || (v == -1);
    bd.two = (v == 2) || (v == -2);
    return bd;
  endfunction

  task automatic run24(logic [23:0] x, logic [23:0] y);
    logic [47:0] exp;
    x24 = x;
    for (int i = 0; i <= 12; i++) d24[i] = digit(longint'(y), i);
    #1;
    exp = 48'(longint'(x) * longint'(y));
    checks++;
    if (48'(s24 + c24) != exp) begin
      failures++;
      $display("FAIL24 x=%h y=%h got=%h exp=%h", x, y, 48'(s24 + c24), exp);
    end
  endtask

  initial begin
    // Reduction depth: 7 full adders for 24 x 24 bits, odd chain no deeper
    // than the even chain.
    checks += 2;
    if (dut24.FA_DEPTH != 7) failures++;
    if (dut24.ODD_DEPTH > dut24.EVEN_DEPTH) failures++;
    run24(24'hFFFFFF, 24'hFFFFFF);
    run24(24'h800000, 24'h800000);
    run24(24'hFFFFFF, 24'h800001);
    run24(24'h000000, 24'hABCDEF);
    for (int k = 0; k < 5000; k++) run24(24'($urandom), 24'($urandom));
    for (int xv = 0; xv < 256; xv++)
      for (int yv = 0; yv < 256; yv++) begin
        x8 = 8'(xv);
        for (int i = 0; i <= 4; i++) d8[i] = digit(longint'(yv), i);
        #1;
        checks++;
        if (16'(s8 + c8) != 16'(xv * yv)) failures++;
      end
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
