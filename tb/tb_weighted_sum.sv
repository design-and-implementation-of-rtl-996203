// tb_weighted_sum: runs all six multiply/add configurations (2, 4, 6 inputs,
// each without and with bias) side by side on the same random stream, one
// input set per clock, and checks each sum against the real-valued
// sum(w_i*x_i) (+ bias) within a relative 1e-6 of the sum of magnitudes,
// exactly at each configuration's latency: 20, 32, 32, 44, 44, 44 cycles.
module tb_weighted_sum;
  import tb_fp_pkg::*;
  localparam int NCFG = 6;
  localparam int NCYC = 600;
  localparam int NIN [NCFG] = '{2, 2, 4, 4, 6, 6};
  localparam bit BI  [NCFG] = '{1'b0, 1'b1, 1'b0, 1'b1, 1'b0, 1'b1};
  localparam int LAT [NCFG] = '{20, 32, 32, 44, 44, 44};

  logic        clk = 1'b0;
  logic [31:0] w [6];
  logic [31:0] x [6];
  logic [31:0] bias;
  logic [31:0] sums [NCFG];
  real         exp_sum [NCFG][NCYC];
  real         exp_mag [NCFG][NCYC];
  int checks = 0, failures = 0;

  for (genvar c = 0; c < NCFG; c++) begin : g_cfg
    logic [31:0] wc [NIN[c]];
    logic [31:0] xc [NIN[c]];
    for (genvar i = 0; i < NIN[c]; i++) begin : g_i
      assign wc[i] = w[i];
      assign xc[i] = x[i];
    end
    weighted_sum #(.N_INPUTS(NIN[c]), .BIAS(BI[c])) dut (
      .clk(clk), .weights(wc), .bias(bias), .data_in(xc), .sum(sums[c]));
  end

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (NCYC + 200) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 6; i++) begin
      w[i] = r2f(rand_real(-2.0, 2.0));
      x[i] = '0;
    end
    bias = r2f(rand_real(-1.0, 1.0));
    for (int t = 0; t < NCYC; t++) begin
      @(negedge clk);
      for (int c = 0; c < NCFG; c++) begin
        if (t >= LAT[c] && t - LAT[c] >= 1) begin
          real got, err;
          got = f2r(sums[c]);
          err = absr(got - exp_sum[c][t - LAT[c]]);
          checks++;
          if (err > 1.0e-6 * exp_mag[c][t - LAT[c]] + 1.0e-30) begin
            failures++;
            if (failures < 10)
              $display("cfg %0d cycle %0d: got %f expected %f", c, t, got, exp_sum[c][t - LAT[c]]);
          end
        end
      end
      for (int i = 0; i < 6; i++) x[i] = r2f(rand_real(-3.0, 3.0));
      for (int c = 0; c < NCFG; c++) begin
        real s, m;
        s = BI[c] ? f2r(bias) : 0.0;
        m = absr(s);
        for (int i = 0; i < NIN[c]; i++) begin
          s += f2r(w[i]) * f2r(x[i]);
          m += absr(f2r(w[i]) * f2r(x[i]));
        end
        exp_sum[c][t] = s;
        exp_mag[c][t] = m;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
