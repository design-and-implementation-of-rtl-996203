// tb_tansig_act: streams one random float x per clock over the usable input
// range and checks the float result against the real-valued formula
// (2.0 / (1.0 + $exp(-2.0 * xv)) - 1.0) within 2e-4, exactly 94 cycles after x was applied.
module tb_tansig_act;
  import tb_fp_pkg::*;
  localparam int LAT = 94;
  logic        clk = 1'b0;
  logic [31:0] x, y;
  real         xq [$];
  int checks = 0, failures = 0;
  real maxerr = 0.0;

  tansig_act dut (.clk(clk), .x(x), .y(y));

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
        real xv, rv, err;
        xv  = xq.pop_front();
        rv  = 2.0 / (1.0 + $exp(-2.0 * xv)) - 1.0;
        err = absr(f2r(y) - rv);
        if (err > maxerr) maxerr = err;
        checks++;
        if (err > 2.0e-4) begin
          failures++;
          if (failures < 10) $display("x=%f got %f expected %f", xv, f2r(y), rv);
        end
      end
      x = (i % 50 == 0) ? 32'h0 : r2f(rand_real(-0.785, 0.785));
      if (i < 2000) xq.push_back(f2r(x));
    end
    $display("max error %e", maxerr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
