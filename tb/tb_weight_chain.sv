// tb_weight_chain: loads six random words through the serial input with
// shift high and checks that they land in reverse order (first in, last
// register); checks that the registers hold while shift is low, that a
// partial shift moves everything one place, and that reset clears them.
module tb_weight_chain;
  localparam int N = 6;
  logic        clk = 1'b0, rst, shift;
  logic [31:0] weight_in;
  logic [31:0] regs [N];
  logic [31:0] vals [N];
  int checks = 0, failures = 0;

  weight_chain #(.N_REGS(N)) dut (.clk(clk), .rst(rst), .shift(shift), .weight_in(weight_in), .regs(regs));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_regs(input logic [31:0] e [N]);
    for (int i = 0; i < N; i++) begin
      checks++;
      if (regs[i] !== e[i]) begin
        failures++;
        $display("reg %0d: got %h expected %h", i, regs[i], e[i]);
      end
    end
  endtask

  initial begin
    logic [31:0] e [N];
    rst = 1'b1; shift = 1'b0; weight_in = '0;
    @(negedge clk); @(negedge clk);
    rst = 1'b0;
    for (int i = 0; i < N; i++) e[i] = '0;
    expect_regs(e);
    for (int round = 0; round < 20; round++) begin
      // load N values
      for (int i = 0; i < N; i++) begin
        vals[i]   = $urandom;
        weight_in = vals[i];
        shift     = 1'b1;
        @(negedge clk);
      end
      shift     = 1'b0;
      weight_in = $urandom;
      for (int i = 0; i < N; i++) e[i] = vals[N-1-i];
      expect_regs(e);
      // hold for a few cycles
      repeat (3) @(negedge clk);
      expect_regs(e);
      // one more shift moves every value one place on
      weight_in = $urandom;
      shift     = 1'b1;
      @(negedge clk);
      shift = 1'b0;
      for (int i = N-1; i > 0; i--) e[i] = e[i-1];
      e[0] = weight_in;
      expect_regs(e);
    end
    rst = 1'b1;
    @(negedge clk);
    rst = 1'b0;
    for (int i = 0; i < N; i++) e[i] = '0;
    expect_regs(e);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
