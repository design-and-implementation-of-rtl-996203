// tb_fixed_to_float: converts random 20-bit s.3.16 values (and the extremes)
// and checks that the float equals value/2^16 exactly, 6 cycles later.
module tb_fixed_to_float;
  import tb_fp_pkg::*;
  localparam int LAT = 6;
  logic               clk = 1'b0;
  logic signed [19:0] a;
  logic [31:0]        y;
  logic [31:0]        expq [$];
  int checks = 0, failures = 0;

  fixed_to_float dut (.clk(clk), .a(a), .y(y));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a = '0;
    for (int i = 0; i < 2000 + LAT; i++) begin
      @(negedge clk);
      if (i >= LAT) begin
        logic [31:0] e;
        e = expq.pop_front();
        checks++;
        if (y !== e) begin
          failures++;
          if (failures < 10) $display("cycle %0d: got %h expected %h", i, y, e);
        end
      end
      case (i % 4)
        0: a = 20'($urandom);
        1: a = 20'(int'($urandom % 200) - 100);
        2: a = (i % 8 == 2) ? 20'sh80000 : 20'sh7FFFF;
        default: a = 20'(int'($urandom % 400000) - 200000);
      endcase
      if (i < 2000) expq.push_back(r2f(real'(a) / 65536.0));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
