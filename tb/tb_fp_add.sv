// tb_fp_add: self-checking testbench of fp_add. Streams one operand pair per
// clock (random normal floats over a wide exponent range, then special
// cases) and checks every result bit-exactly against a reference computed in
// double precision and rounded to single, exactly 12 cycles after the
// operands were applied (the unit's latency).
module tb_fp_add;
  import tb_fp_pkg::*;
  localparam int LAT = 12;
  localparam int NRAND = 3000;

  logic        clk = 1'b0;
  logic [31:0] a, b, y;
  int checks = 0, failures = 0;
  logic [31:0] expq [$];
  int          cyc = 0;

  fp_add dut (.clk(clk), .a(a), .b(b), .y(y));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (NRAND + 200) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [31:0] ref_op(input logic [31:0] a, input logic [31:0] b);
    logic a_nan, b_nan;
    a_nan = (a[30:23] == 8'hFF) && (a[22:0] != 0);
    b_nan = (b[30:23] == 8'hFF) && (b[22:0] != 0);
    if (a_nan || b_nan) return 32'h7FC0_0000;
    if (a[30:23] == 8'hFF && b[30:23] == 8'hFF && a[31] != b[31]) return 32'h7FC0_0000;
    if (a[30:23] == 8'hFF) return a;
    if (b[30:23] == 8'hFF) return b;
    if (a[30:23] == 8'h00 && b[30:23] == 8'h00) return {a[31] & b[31], 31'd0};
    if (a[30:23] == 8'h00) return b;
    if (b[30:23] == 8'h00) return a;
    if (f2r(a) + f2r(b) == 0.0) return 32'd0;
    return r2f(f2r(a) + f2r(b));
  endfunction

  // special operands: zero, one, infinity, NaN, large and tiny values
  logic [31:0] spec [10] = '{32'h0000_0000, 32'h8000_0000, 32'h3F80_0000, 32'hBF80_0000,
                             32'h7F80_0000, 32'hFF80_0000, 32'h7FC0_0000, 32'h7F7F_FFFF,
                             32'h0080_0000, 32'h4000_0000};

  initial begin
    a = '0;
    b = '0;
    for (int i = 0; i < NRAND + 100 + LAT; i++) begin
      @(negedge clk);
      // check the result of the pair applied LAT cycles ago
      if (i >= LAT) begin
        logic [31:0] e;
        e = expq.pop_front();
        checks++;
        if (y !== e) begin
          failures++;
          if (failures < 10)
            $display("mismatch at %0d: got %h expected %h", i, y, e);
        end
      end
      if (i < NRAND) begin
        if (i % 3 == 0) begin
          a = rand_float(1, 254);
          b = rand_float(1, 254);
        end else if (i % 3 == 1) begin
          a = rand_float(100, 154);
          b = rand_float(100, 154);
        end else begin
          a = rand_float(120, 130);
          b = {~a[31] ^ 1'($urandom), a[30:23] - 8'($urandom % 3), 23'($urandom)};
        end
      end else if (i < NRAND + 100) begin
        a = spec[(i - NRAND) % 10];
        b = spec[(i - NRAND) / 10];
      end
      if (i < NRAND + 100) expq.push_back(ref_op(a, b));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
