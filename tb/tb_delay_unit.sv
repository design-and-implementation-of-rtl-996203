// tb_delay_unit: streams a random word every clock into a 12-deep delay unit
// and checks that each comes out exactly 12 cycles later.
module tb_delay_unit;
  localparam int DEPTH = 12;
  logic        clk = 1'b0;
  logic [31:0] d, q;
  logic [31:0] hist [$];
  int checks = 0, failures = 0;

  delay_unit #(.W(32), .DEPTH(DEPTH)) dut (.clk(clk), .d(d), .q(q));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    d = '0;
    for (int i = 0; i < 500; i++) begin
      @(negedge clk);
      if (i >= DEPTH) begin
        checks++;
        if (q !== hist[i - DEPTH]) begin
          failures++;
          $display("cycle %0d: got %h expected %h", i, q, hist[i - DEPTH]);
        end
      end
      d = $urandom;
      hist.push_back(d);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
