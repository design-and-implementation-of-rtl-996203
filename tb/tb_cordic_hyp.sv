// tb_cordic_hyp: streams one random angle per clock (|z| <= pi/4 mostly, some
// up to 1.1) and checks cosh and sinh against the real functions within
// 4 LSB of the s.1.16 output, exactly 22 cycles after the angle was applied.
module tb_cordic_hyp;
  import tb_fp_pkg::*;
  localparam int LAT = 22;
  logic               clk = 1'b0;
  logic signed [17:0] phase;
  logic signed [17:0] ch, sh;
  real                zq [$];
  int checks = 0, failures = 0;
  real maxerr = 0.0;

  cordic_hyp dut (.clk(clk), .phase(phase), .cosh_o(ch), .sinh_o(sh));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    phase = '0;
    for (int i = 0; i < 2000 + LAT; i++) begin
      @(negedge clk);
      if (i >= LAT) begin
        real z, ec, es;
        z  = zq.pop_front();
        ec = absr(real'(ch) / 65536.0 - $cosh(z));
        es = absr(real'(sh) / 65536.0 - $sinh(z));
        if (ec > maxerr) maxerr = ec;
        if (es > maxerr) maxerr = es;
        checks += 2;
        if (ec > 4.0 / 65536.0) failures++;
        if (es > 4.0 / 65536.0) failures++;
        if ((ec > 4.0 / 65536.0 || es > 4.0 / 65536.0) && failures < 10)
          $display("z=%f cosh %f sinh %f", z, real'(ch) / 65536.0, real'(sh) / 65536.0);
      end
      if (i % 4 == 3) phase = 18'($rtoi(rand_real(-1.1, 1.1) * 32768.0));
      else            phase = 18'($rtoi(rand_real(-0.7854, 0.7854) * 32768.0));
      if (i < 2000) zq.push_back(real'(phase) / 32768.0);
    end
    $display("max error %e", maxerr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
