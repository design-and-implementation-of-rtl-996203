// tb_neuron_chain: a two-layer network built from neurons connected only by
// their ready handshake. Layer 1 has two 2-input non-biased TanSig neurons
// on the same inputs; their outputs feed a 2-input biased LogSig neuron
// whose input_ready is layer 1's result_ready, so each layer fires the next.
// Random input sets stream in with gaps; every set must produce one output
// after 114 + 94 = 208 cycles, within 3e-4 of the real-valued network.
module tb_neuron_chain;
  import tb_fp_pkg::*;
  import neuron_pkg::*;
  localparam int LAT = 208;

  typedef struct {
    int  cyc;
    real v;
  } item_t;

  logic        clk = 1'b0;
  logic        rst, input_ready;
  logic [2:0]  shift;
  logic [31:0] weight_in;
  logic [31:0] x [2];
  logic [31:0] h [2];
  logic [1:0]  h_rdy;
  logic [31:0] y;
  logic        y_rdy;

  real   w1 [2][2];
  real   w2 [3];           // [2] = bias
  item_t q [$];
  int    cyc = 0;
  int checks = 0, failures = 0;
  int n_chain = 0;

  neuron #(.N_INPUTS(2), .BIAS(1'b0), .ACT(TANSIG)) u_h0 (
    .clk(clk), .rst(rst), .shift(shift[0]), .weight_in(weight_in), .data_in(x),
    .input_ready(input_ready), .f_out(h[0]), .result_ready(h_rdy[0]));
  neuron #(.N_INPUTS(2), .BIAS(1'b0), .ACT(TANSIG)) u_h1 (
    .clk(clk), .rst(rst), .shift(shift[1]), .weight_in(weight_in), .data_in(x),
    .input_ready(input_ready), .f_out(h[1]), .result_ready(h_rdy[1]));
  neuron #(.N_INPUTS(2), .BIAS(1'b1), .ACT(LOGSIG)) u_out (
    .clk(clk), .rst(rst), .shift(shift[2]), .weight_in(weight_in), .data_in(h),
    .input_ready(h_rdy[0]), .f_out(y), .result_ready(y_rdy));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic real tansig(input real s);
    return 2.0 / (1.0 + $exp(-2.0 * s)) - 1.0;
  endfunction

  task automatic tick();
    @(negedge clk);
    cyc++;
    if (h_rdy[0] != h_rdy[1]) begin
      failures++;
      $display("layer 1 ready signals disagree at %0d", cyc);
    end
    if (h_rdy[0]) n_chain++;
    if (y_rdy) begin
      checks++;
      if (q.size() == 0) begin
        failures++;
        $display("unexpected output at %0d", cyc);
      end else begin
        item_t it;
        it = q.pop_front();
        if (cyc - it.cyc != LAT) begin
          failures++;
          $display("latency %0d, expected %0d", cyc - it.cyc, LAT);
        end
        checks++;
        if (absr(f2r(y) - it.v) > 3.0e-4) begin
          failures++;
          $display("got %f expected %f", f2r(y), it.v);
        end
      end
    end else if (q.size() != 0 && cyc - q[0].cyc >= LAT) begin
      failures++;
      $display("missing output at %0d", cyc);
      void'(q.pop_front());
    end
  endtask

  task automatic put(input int k, input real v, output real stored);
    shift     = 3'b001 << k;
    weight_in = r2f(v);
    stored    = f2r(weight_in);
    tick();
  endtask

  initial begin
    rst = 1'b1; shift = '0; weight_in = '0; input_ready = 1'b0;
    x[0] = '0; x[1] = '0;
    tick(); tick();
    rst = 1'b0;
    // load order per neuron: bias (if any), W1, W0
    for (int k = 0; k < 2; k++) begin
      put(k, rand_real(-0.4, 0.4), w1[k][1]);
      put(k, rand_real(-0.4, 0.4), w1[k][0]);
    end
    put(2, rand_real(-0.2, 0.2), w2[2]);
    put(2, rand_real(-0.5, 0.5), w2[1]);
    put(2, rand_real(-0.5, 0.5), w2[0]);
    shift = '0;
    for (int t = 0; t < 300; t++) begin
      input_ready = ($urandom % 3) != 0;
      x[0] = r2f(rand_real(-0.9, 0.9));
      x[1] = r2f(rand_real(-0.9, 0.9));
      if (input_ready) begin
        real h0, h1, s;
        item_t it;
        h0 = tansig(w1[0][0] * f2r(x[0]) + w1[0][1] * f2r(x[1]));
        h1 = tansig(w1[1][0] * f2r(x[0]) + w1[1][1] * f2r(x[1]));
        s  = w2[0] * h0 + w2[1] * h1 + w2[2];
        it.cyc = cyc;
        it.v   = 1.0 / (1.0 + $exp(-s));
        q.push_back(it);
      end
      tick();
    end
    input_ready = 1'b0;
    repeat (LAT + 20) tick();
    checks++;
    if (q.size() != 0 || n_chain == 0) failures++;
    $display("layer-1 results that fired layer 2: %0d", n_chain);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
