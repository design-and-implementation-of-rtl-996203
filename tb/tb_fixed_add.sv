// tb_fixed_add: checks the 20-bit fixed adder against integer addition
// modulo 2^20 for random operands, including the +1.0 (65536) constant the
// LogSig path adds.
module tb_fixed_add;
  logic signed [19:0] a, b, y;
  int checks = 0, failures = 0;

  fixed_add #(.W(20)) dut (.a(a), .b(b), .y(y));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 1000; i++) begin
      int ai, bi, s;
      ai = int'($urandom % 300000) - 150000;
      bi = (i % 4 == 0) ? 65536 : int'($urandom % 300000) - 150000;
      a  = 20'(ai);
      b  = 20'(bi);
      #1;
      s = ai + bi;
      if (s >= 524288) s -= 1048576;
      if (s < -524288) s += 1048576;
      checks++;
      if (int'(y) != s) begin
        failures++;
        $display("mismatch: %0d + %0d = %0d, expected %0d", ai, bi, y, s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
