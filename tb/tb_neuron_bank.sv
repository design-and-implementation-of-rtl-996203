// tb_neuron_bank: end-to-end test of the whole bank of eighteen neurons at
// its default size. It
//  1. resets the bank and loads every neuron with its own random weights and
//     bias through the shared Weight/Bias input, one neuron's Shift at a time;
//  2. streams random input sets, one per clock while input_ready is high,
//     with random idle gaps, and checks for every neuron that each input set
//     produces exactly one result_ready pulse exactly at the published
//     latency of that variant (62 .. 138 cycles) and that f_out matches the
//     activation of the real-valued weighted sum within 3e-4;
//  3. resets the bank with results in flight (they must be dropped), reloads
//     new weights and streams again, then drains.
// Weights lie in [-0.3, 0.3], inputs in [-0.35, 0.35] and the bias in
// [-0.1, 0.1], keeping every net input inside the exponent calculator's
// range. It counts how often each mechanism happened (weight load, per-neuron
// shift select, back-to-back input sets, idle gaps, biased and delay-unit
// trees, each activation, reset flush) and fails if one never did.
module tb_neuron_bank;
  import tb_fp_pkg::*;

  // Table 1 latencies, neuron k = act*6 + n*2 + b
  localparam int LAT [18] = '{62, 74, 74, 86, 86, 86,      // RadBas
                              82, 94, 94, 106, 106, 106,   // LogSig
                              114, 126, 126, 138, 138, 138};  // TanSig
  localparam int NPHASE = 250;

  typedef struct {
    int  cyc;
    real v;
  } item_t;

  logic        clk = 1'b0;
  logic        rst;
  logic [17:0] shift;
  logic [31:0] weight_in;
  logic [31:0] data_in [6];
  logic        input_ready;
  logic [31:0] f_out [18];
  logic [17:0] result_ready;

  real   wt [18][7];          // weights, [6] = bias
  item_t q [18][$];
  int    cyc = 0;
  int checks = 0, failures = 0;
  real maxerr = 0.0;

  // mechanism counters
  int n_load = 0, n_sel = 0, n_b2b = 0, n_gap = 0, n_res_bias = 0, n_res_delay = 0;
  int n_act [3] = '{0, 0, 0};
  int n_flush = 0;

  neuron_bank dut (
    .clk(clk), .rst(rst), .shift(shift), .weight_in(weight_in), .data_in(data_in),
    .input_ready(input_ready), .f_out(f_out), .result_ready(result_ready));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (4000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int nin(input int k);
    return 2 * ((k % 6) / 2) + 2;
  endfunction

  function automatic real act_ref(input int a, input real s);
    case (a)
      0:       return $exp(-(s * s));
      1:       return 1.0 / (1.0 + $exp(-s));
      default: return 2.0 / (1.0 + $exp(-2.0 * s)) - 1.0;
    endcase
  endfunction

  // one clock: check outputs of the cycle that ended, then advance
  task automatic tick();
    @(negedge clk);
    cyc++;
    for (int k = 0; k < 18; k++) begin
      if (result_ready[k]) begin
        checks++;
        if (q[k].size() == 0) begin
          failures++;
          $display("neuron %0d: unexpected result_ready at cycle %0d", k, cyc);
        end else begin
          item_t it;
          real   err;
          it  = q[k].pop_front();
          err = absr(f2r(f_out[k]) - it.v);
          if (err > maxerr) maxerr = err;
          if (cyc - it.cyc != LAT[k]) begin
            failures++;
            $display("neuron %0d: latency %0d, expected %0d", k, cyc - it.cyc, LAT[k]);
          end
          checks++;
          if (err > 3.0e-4) begin
            failures++;
            if (failures < 20)
              $display("neuron %0d: got %f expected %f", k, f2r(f_out[k]), it.v);
          end
          n_act[k / 6]++;
          if (k % 2 == 1) n_res_bias++;
          if (k % 6 == 4) n_res_delay++;
        end
      end else if (q[k].size() != 0 && cyc - q[k][0].cyc >= LAT[k]) begin
        failures++;
        $display("neuron %0d: result missing at cycle %0d", k, cyc);
        void'(q[k].pop_front());
      end
    end
  endtask

  task automatic load_weights();
    for (int k = 0; k < 18; k++) begin
      int n, nb;
      n  = nin(k);
      nb = k % 2;
      for (int i = 0; i < 6; i++) wt[k][i] = 0.0;
      wt[k][6] = 0.0;
      shift = 18'd1 << k;
      n_sel++;
      // bias first, then W(n-1) .. W0
      if (nb == 1) begin
        weight_in = r2f(rand_real(-0.1, 0.1));
        wt[k][6]  = f2r(weight_in);
        tick();
        n_load++;
      end
      for (int i = n - 1; i >= 0; i--) begin
        weight_in = r2f(rand_real(-0.3, 0.3));
        wt[k][i]  = f2r(weight_in);
        tick();
        n_load++;
      end
    end
    shift     = '0;
    weight_in = '0;
  endtask

  task automatic stream(input int ncyc);
    logic prev = 1'b0;
    for (int t = 0; t < ncyc; t++) begin
      input_ready = ($urandom % 4) != 0;
      for (int i = 0; i < 6; i++) data_in[i] = r2f(rand_real(-0.35, 0.35));
      if (input_ready) begin
        if (prev) n_b2b++;
        for (int k = 0; k < 18; k++) begin
          real   s;
          item_t it;
          s = wt[k][6];
          for (int i = 0; i < nin(k); i++) s += wt[k][i] * f2r(data_in[i]);
          it.cyc = cyc;
          it.v   = act_ref(k / 6, s);
          q[k].push_back(it);
        end
      end else begin
        n_gap++;
      end
      prev = input_ready;
      tick();
    end
    input_ready = 1'b0;
  endtask

  initial begin
    rst = 1'b1; shift = '0; weight_in = '0; input_ready = 1'b0;
    for (int i = 0; i < 6; i++) data_in[i] = '0;
    tick(); tick();
    rst = 1'b0;
    load_weights();
    stream(NPHASE);
    // reset with results in flight: they must never appear
    for (int k = 0; k < 18; k++) begin
      n_flush += q[k].size();
      q[k].delete();
    end
    rst = 1'b1;
    tick();
    rst = 1'b0;
    load_weights();
    stream(NPHASE);
    repeat (150) tick();
    for (int k = 0; k < 18; k++) begin
      checks++;
      if (q[k].size() != 0) begin
        failures++;
        $display("neuron %0d: %0d results never came", k, q[k].size());
      end
    end
    $display("max error %e", maxerr);
    $display("mechanisms: weight words loaded %0d, shift selects %0d, back-to-back sets %0d, idle gaps %0d",
             n_load, n_sel, n_b2b, n_gap);
    $display("            biased results %0d, delay-unit results %0d, radbas %0d logsig %0d tansig %0d, flushed %0d",
             n_res_bias, n_res_delay, n_act[0], n_act[1], n_act[2], n_flush);
    checks++; if (n_load == 0) failures++;
    checks++; if (n_sel == 0) failures++;
    checks++; if (n_b2b == 0) failures++;
    checks++; if (n_gap == 0) failures++;
    checks++; if (n_res_bias == 0) failures++;
    checks++; if (n_res_delay == 0) failures++;
    for (int a = 0; a < 3; a++) begin
      checks++;
      if (n_act[a] == 0) failures++;
    end
    checks++; if (n_flush == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
