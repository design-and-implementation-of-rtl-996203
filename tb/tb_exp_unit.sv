// tb_exp_unit: streams one random float x per clock with |x| <= pi/4 and
// checks the 20-bit fixed e^x (s.3.16) against exp(x) within 1e-4,
// exactly 28 cycles after x was applied. This covers the float-to-fixed
// conversion, the CORDIC, the 2-bit extensions and the fixed adder.
module tb_exp_unit;
  import tb_fp_pkg::*;
  localparam int LAT = 28;
  logic               clk = 1'b0;
  logic [31:0]        x;
  logic signed [19:0] ex;
  real                xq [$];
  int checks = 0, failures = 0;
  real maxerr = 0.0;

  exp_unit dut (.clk(clk), .x(x), .ex(ex));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    x = '0;
    for (int i = 0; i < 2000 + LAT; i++) begin
      @(negedge clk);
      if (i >= LAT) begin
        real xv, err;
        xv  = xq.pop_front();
        err = absr(real'(ex) / 65536.0 - $exp(xv));
        if (err > maxerr) maxerr = err;
        checks++;
        if (err > 1.0e-4) begin
          failures++;
          if (failures < 10) $display("x=%f got %f expected %f", xv, real'(ex) / 65536.0, $exp(xv));
        end
      end
      x = r2f(rand_real(-0.785, 0.785));
      if (i < 2000) xq.push_back(f2r(x));
    end
    $display("max error %e", maxerr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
