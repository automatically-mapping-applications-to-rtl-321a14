// tb_fir_tlut: checks the reconfigurable FIR filter at its full 32 taps.
// Three coefficient sets (random, an impulse-response probe, extremes) are
// each written as truth tables through the configuration record; after each
// retune a stream of random samples, with random gaps in in_valid, is
// compared with a direct convolution. An impulse measures the latency,
// which must be 2 + log2(TAPS) cycles.
module tb_fir_tlut;
  import srp_pkg::*;
  import srp_tb_pkg::*;

  localparam int TAPS = 32;
  localparam int YW   = 16 + $clog2(TAPS);
  localparam int LAT  = 2 + $clog2(TAPS);

  logic                  clk = 0, rst_n = 0;
  lut_cfg_t              cfg;
  logic                  in_valid;
  logic signed [7:0]     x_in;
  logic                  out_valid;
  logic signed [YW-1:0]  y;
  int checks = 0, failures = 0;

  fir_tlut #(.TAPS(TAPS)) dut (.clk, .rst_n, .cfg, .in_valid, .x_in, .out_valid, .y);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic signed [7:0] coef [TAPS];
  logic signed [7:0] hist [TAPS];     // newest valid sample at [0]
  longint            exp_q[$];
  int                cyc = 0;

  always @(posedge clk) cyc <= cyc + 1;

  // compare every output with the next expected value
  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      checks++;
      if (exp_q.size() == 0) begin
        failures++;
        $display("FAIL unexpected output %0d", y);
      end else begin
        automatic longint e = exp_q.pop_front();
        if (longint'(y) != e) begin
          failures++;
          $display("FAIL y=%0d exp=%0d", y, e);
        end
      end
    end
  end

  task automatic retune();
    lut_write_t w[$];
    for (int k = 0; k < TAPS; k++) tap_writes(w, k, coef[k]);
    foreach (w[n]) begin
      @(negedge clk);
      cfg = '{we: 1'b1, addr: w[n].addr, tt: w[n].tt};
    end
    @(negedge clk);
    cfg.we = 1'b0;
  endtask

  task automatic push_sample(logic signed [7:0] v);
    longint acc = 0;
    for (int k = TAPS - 1; k > 0; k--) hist[k] = hist[k-1];
    hist[0] = v;
    for (int k = 0; k < TAPS; k++) acc += longint'(coef[k]) * longint'(hist[k]);
    exp_q.push_back(acc);
    in_valid = 1'b1;
    x_in     = v;
    @(negedge clk);
    in_valid = 1'b0;
  endtask

  task automatic stream(int n);
    for (int s = 0; s < n; s++) begin
      push_sample(8'($urandom));
      if ($urandom_range(0, 4) == 0) repeat ($urandom_range(1, 3)) @(negedge clk);
    end
    repeat (LAT + 2) @(negedge clk);
    checks++;
    if (exp_q.size() != 0) begin
      failures++;
      $display("FAIL %0d outputs missing", exp_q.size());
      exp_q.delete();
    end
  endtask

  initial begin
    automatic int t_in, t_out;
    cfg = '0; in_valid = 0; x_in = '0;
    foreach (hist[k]) hist[k] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;

    foreach (coef[k]) coef[k] = 8'($urandom);
    retune();
    stream(300);

    foreach (coef[k]) coef[k] = 8'(k - 16);
    retune();
    stream(200);

    foreach (coef[k]) coef[k] = (k % 2 != 0) ? -8'sd128 : 8'sd127;
    retune();
    for (int s = 0; s < 100; s++) push_sample((s % 3 == 0) ? 8'sd127 : -8'sd128);
    stream(50);

    // latency: one impulse into a cleared delay line
    for (int s = 0; s < TAPS; s++) push_sample(8'sd0);
    repeat (LAT + 2) @(negedge clk);
    exp_q.delete();
    fork
      begin
        t_in = cyc + 1;     // index of the edge that takes the sample
        push_sample(8'sd1);
      end
      begin
        @(posedge clk iff out_valid);
        #1;
        t_out = cyc - 1;    // index of the edge that raised out_valid
      end
    join
    checks++;
    if (t_out - t_in != LAT) begin
      failures++;
      $display("FAIL latency %0d, expected %0d", t_out - t_in, LAT);
    end
    repeat (4) @(negedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
