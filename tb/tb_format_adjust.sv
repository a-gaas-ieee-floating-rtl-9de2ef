// tb_format_adjust: checks IEEE packing of normal results and the
// infinity / zero substitution for overflow, underflow and zero operands.
// A watchdog ends the run.
module tb_format_adjust;
  int checks = 0, failures = 0;

  logic        sign, ovf, unf, zero;
  logic [7:0]  exp;
  logic [22:0] frac;
  logic [31:0] result;

  format_adjust dut (.sign(sign), .exp(exp), .frac(frac), .ovf(ovf),
                     .unf(unf), .zero(zero), .result(result));

  initial begin
    for (int k = 0; k < 4000; k++) begin
      logic [31:0] e;
      sign = 1'($urandom); exp = 8'($urandom); frac = 23'($urandom);
      ovf = 1'b0; unf = 1'b0; zero = 1'b0;
      case (k % 4)
        1: ovf = 1'b1;
        2: unf = 1'b1;
        3: zero = 1'b1;
        default: ;
      endcase
      #1;
      if (zero || unf) e = {sign, 31'd0};
      else if (ovf)    e = {sign, 8'hFF, 23'd0};
      else             e = {sign, exp, frac};
      checks++;
      if (result != e) begin
        failures++;
        $display("FAIL k=%0d got=%h exp=%h", k, result, e);
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
