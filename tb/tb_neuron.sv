// tb_neuron: tests single neurons: the default one (6 inputs, no bias,
// RadBas, the tree with the delay unit), a 2-input biased LogSig and a
// 4-input biased TanSig. Each is loaded through its own Shift, then random
// input sets stream in with random gaps; every set must give one
// result_ready pulse exactly at the published latency (86, 94 and 138
// cycles) with f_out within 3e-4 of the real-valued activation of
// sum(w_i*x_i)+b. Weights are then reloaded without reset and the run
// repeated, and a reset with results in flight must drop them.
module tb_neuron;
  import tb_fp_pkg::*;
  import neuron_pkg::*;

  localparam int   NN = 3;
  localparam int   NI  [NN] = '{6, 2, 4};
  localparam bit   BI  [NN] = '{1'b0, 1'b1, 1'b1};
  localparam int   AC  [NN] = '{0, 1, 2};
  localparam int   LAT [NN] = '{86, 94, 138};

  typedef struct {
    int  cyc;
    real v;
  } item_t;

  logic        clk = 1'b0;
  logic        rst, input_ready;
  logic [NN-1:0] shift, rdy;
  logic [31:0] weight_in;
  logic [31:0] data_in [6];
  logic [31:0] f_out [NN];

  real   wt [NN][7];
  item_t q [NN][$];
  int    cyc = 0;
  int checks = 0, failures = 0;
  int n_flush = 0;

  for (genvar k = 0; k < NN; k++) begin : g_n
    logic [31:0] din [NI[k]];
    for (genvar i = 0; i < NI[k]; i++) begin : g_i
      assign din[i] = data_in[i];
    end
    if (k == 0) begin : g_default
      neuron dut (.clk(clk), .rst(rst), .shift(shift[k]), .weight_in(weight_in),
                  .data_in(din), .input_ready(input_ready), .f_out(f_out[k]), .result_ready(rdy[k]));
    end else begin : g_other
      neuron #(.N_INPUTS(NI[k]), .BIAS(BI[k]), .ACT(act_e'(AC[k]))) dut (
        .clk(clk), .rst(rst), .shift(shift[k]), .weight_in(weight_in),
        .data_in(din), .input_ready(input_ready), .f_out(f_out[k]), .result_ready(rdy[k]));
    end
  end

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real act_ref(input int a, input real s);
    case (a)
      0:       return $exp(-(s * s));
      1:       return 1.0 / (1.0 + $exp(-s));
      default: return 2.0 / (1.0 + $exp(-2.0 * s)) - 1.0;
    endcase
  endfunction

  task automatic tick();
    @(negedge clk);
    cyc++;
    for (int k = 0; k < NN; k++) begin
      if (rdy[k]) begin
        checks++;
        if (q[k].size() == 0) begin
          failures++;
          $display("neuron %0d: unexpected result_ready at %0d", k, cyc);
        end else begin
          item_t it;
          it = q[k].pop_front();
          if (cyc - it.cyc != LAT[k]) begin
            failures++;
            $display("neuron %0d: latency %0d expected %0d", k, cyc - it.cyc, LAT[k]);
          end
          checks++;
          if (absr(f2r(f_out[k]) - it.v) > 3.0e-4) begin
            failures++;
            if (failures < 20) $display("neuron %0d: got %f expected %f", k, f2r(f_out[k]), it.v);
          end
        end
      end else if (q[k].size() != 0 && cyc - q[k][0].cyc >= LAT[k]) begin
        failures++;
        $display("neuron %0d: missing result at %0d", k, cyc);
        void'(q[k].pop_front());
      end
    end
  endtask

  task automatic load();
    for (int k = 0; k < NN; k++) begin
      for (int i = 0; i < 7; i++) wt[k][i] = 0.0;
      shift = NN'(1) << k;
      if (BI[k]) begin
        weight_in = r2f(rand_real(-0.1, 0.1));
        wt[k][6]  = f2r(weight_in);
        tick();
      end
      for (int i = NI[k] - 1; i >= 0; i--) begin
        weight_in = r2f(rand_real(-0.3, 0.3));
        wt[k][i]  = f2r(weight_in);
        tick();
      end
    end
    shift = '0;
  endtask

  task automatic stream(input int n);
    for (int t = 0; t < n; t++) begin
      input_ready = ($urandom % 3) != 0;
      for (int i = 0; i < 6; i++) data_in[i] = r2f(rand_real(-0.35, 0.35));
      if (input_ready)
        for (int k = 0; k < NN; k++) begin
          real s;
          item_t it;
          s = wt[k][6];
          for (int i = 0; i < NI[k]; i++) s += wt[k][i] * f2r(data_in[i]);
          it.cyc = cyc;
          it.v   = act_ref(AC[k], s);
          q[k].push_back(it);
        end
      tick();
    end
    input_ready = 1'b0;
  endtask

  initial begin
    rst = 1'b1; shift = '0; weight_in = '0; input_ready = 1'b0;
    for (int i = 0; i < 6; i++) data_in[i] = '0;
    tick(); tick();
    rst = 1'b0;
    load();
    stream(200);
    repeat (150) tick();
    load();               // reload without reset
    stream(200);
    for (int k = 0; k < NN; k++) begin
      n_flush += q[k].size();
      q[k].delete();
    end
    rst = 1'b1;
    tick();
    rst = 1'b0;
    repeat (150) tick();  // nothing may come out
    checks++;
    if (n_flush == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
