// tb_kcm_tlut: checks the tap multiplier. For a set of coefficients (the
// extremes and random values) the 24 truth tables are written, then every
// one of the 256 signed samples is applied and the product, two cycles
// later, compared with x*c.
module tb_kcm_tlut;
  import srp_pkg::*;
  import srp_tb_pkg::*;

  localparam lut_addr_t BASE = 16'h0030;

  logic              clk = 0, rst_n = 0;
  lut_cfg_t          cfg;
  logic signed [7:0]  x;
  logic signed [15:0] p;
  int checks = 0, failures = 0;

  kcm_tlut #(.BASE(BASE)) dut (.clk, .rst_n, .cfg, .x, .p);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic load(logic signed [7:0] c);
    lut_write_t w[$];
    tap_writes(w, 0, c);
    foreach (w[k]) begin
      @(negedge clk);
      cfg = '{we: 1'b1, addr: w[k].addr - fir_lut_addr(0, 0, 0) + BASE, tt: w[k].tt};
    end
    @(negedge clk);
    cfg.we = 1'b0;
  endtask

  initial begin
    automatic logic signed [7:0] coefs[$] = '{8'sd0, 8'sd1, -8'sd1, 8'sd127, -8'sd128, 8'sd85, -8'sd43};
    automatic int lat_seen = -1;
    for (int r = 0; r < 8; r++) coefs.push_back(8'($urandom));
    cfg = '0;
    x   = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    foreach (coefs[ci]) begin
      automatic logic signed [7:0] c = coefs[ci];
      load(c);
      // stream all samples, one per cycle, and check each product 2 cycles later
      for (int n = 0; n <= 256; n++) begin
        if (n < 256) x = 8'(n);
        @(posedge clk);
        #1;
        if (n >= 1) begin
          automatic logic signed [7:0] xs = 8'(n - 1);
          checks++;
          if (p !== 16'(xs * c)) begin
            failures++;
            $display("FAIL c=%0d x=%0d p=%0d exp=%0d", c, xs, p, xs * c);
          end
        end
        @(negedge clk);
      end
    end
    // latency: a step on x must reach p after exactly two clock edges
    load(8'sd3);
    x = 8'sd0;
    repeat (3) @(negedge clk);
    x = 8'sd5;
    for (int e = 1; e <= 4; e++) begin
      @(posedge clk); #1;
      if (lat_seen < 0 && p == 16'sd15) lat_seen = e;
    end
    checks++;
    if (lat_seen != 2) begin
      failures++;
      $display("FAIL latency %0d, expected 2", lat_seen);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
