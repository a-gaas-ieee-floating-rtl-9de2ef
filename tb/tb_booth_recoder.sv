// tb_booth_recoder: checks radix-4 Booth recoding of 24-bit multipliers.
//
// For random and corner multipliers y it checks that the 13 digits are well
// formed (never both |d| = 1 and |d| = 2; negative only with a nonzero
// magnitude) and that sum d_i * 4^i equals y. A watchdog ends the run.
module tb_booth_recoder;
  import fp_mul_pkg::*;

  int checks = 0, failures = 0;
  logic [23:0] y;
  booth_digit_t [12:0] d;

  booth_recoder #(.N(24)) dut (.y(y), .d(d));

  task automatic check_one(logic [23:0] val);
    longint acc;
    y = val;
    #1;
    acc = 0;
    for (int i = 0; i <= 12; i++) begin
      if (d[i].one && d[i].two) failures++;
      if (d[i].neg && !d[i].one && !d[i].two) failures++;
      acc += longint'(booth_value(d[i])) <<< (2 * i);
      checks++;
    end
    checks++;
    if (acc != longint'(val)) begin
      failures++;
      $display("FAIL y=%h value=%0d", val, acc);
    end
  endtask

  initial begin
    check_one(24'h000000);
    check_one(24'hFFFFFF);
    check_one(24'h800000);
    check_one(24'hAAAAAA);
    check_one(24'h555555);
    for (int k = 0; k < 5000; k++) check_one(24'($urandom));
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
