// tb_fp_negate: checks that fp_negate returns -a for random floats, zeros and
// infinities (the value, through a double-precision reference, and the sign
// bit of zero and NaN patterns).
module tb_fp_negate;
  import tb_fp_pkg::*;
  logic [31:0] a, y;
  int checks = 0, failures = 0;

  fp_negate dut (.a(a), .y(y));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 500; i++) begin
      a = (i < 2) ? {1'(i), 31'd0} : rand_float(1, 254);
      #1;
      checks++;
      if (f2r(y) != -f2r(a) || y[31] == a[31] || y[30:0] != a[30:0]) begin
        failures++;
        $display("mismatch: a=%h y=%h", a, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
