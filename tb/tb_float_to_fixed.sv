// tb_float_to_fixed: converts random floats (inside and outside the s.2.15
// range, plus zero, infinities and tiny values) and compares with
// round-to-nearest-even of x*2^15, saturated to 18 bits, 6 cycles later.
module tb_float_to_fixed;
  import tb_fp_pkg::*;
  localparam int LAT = 6;
  logic               clk = 1'b0;
  logic [31:0]        a;
  logic signed [17:0] y;
  int                 expq [$];
  int checks = 0, failures = 0;

  float_to_fixed dut (.clk(clk), .a(a), .y(y));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int ref_fix(input logic [31:0] f);
    real v, fl, fr;
    int  r;
    if (f[30:23] == 8'hFF) return f[31] ? -131072 : 131071;
    v  = f2r(f) * 32768.0;
    if (v >= 131071.5) return 131071;
    if (v <= -131072.5) return -131072;
    fl = $floor(v);
    fr = v - fl;
    r  = $rtoi(fl);
    if (fl < 0.0 && real'(r) != fl) r = r - 1;
    if (fr > 0.5 || (fr == 0.5 && (r % 2 != 0))) r = r + 1;
    if (r > 131071) r = 131071;
    if (r < -131072) r = -131072;
    return r;
  endfunction

  initial begin
    a = '0;
    for (int i = 0; i < 2000 + LAT; i++) begin
      @(negedge clk);
      if (i >= LAT) begin
        int e;
        e = expq.pop_front();
        checks++;
        if (int'(y) != e) begin
          failures++;
          if (failures < 10) $display("cycle %0d: got %0d expected %0d", i, y, e);
        end
      end
      case (i % 5)
        0:       a = r2f(rand_real(-1.0, 1.0));
        1:       a = r2f(rand_real(-4.2, 4.2));
        2:       a = rand_float(90, 135);
        3:       a = r2f(real'(int'($urandom % 4000) - 2000) / 32768.0 + 0.5 / 32768.0);
        default: a = (i % 15 == 4) ? 32'h7F80_0000 : ((i % 15 == 9) ? 32'h0000_0000 : 32'hFF80_0000);
      endcase
      if (i < 2000) expq.push_back(ref_fix(a));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
