// fir_tlut: the adaptive FIR filter of the platform, with its coefficients
// held in TLUT truth tables instead of registers.
//
//   y[n] = sum_{k=0}^{TAPS-1} c_k * x[n-k]
//
// A direct-form delay line holds the last TAPS samples (signed 8-bit). Each
// tap owns a kcm_tlut, a multiplier whose coefficient c_k exists only as the
// truth tables of its 24 TLUTs; a pipelined adder tree sums the products.
// There is no coefficient register and no coefficient port: the filter is
// retuned by writing truth tables through the configuration port (cfg), one
// LUT per write, while samples keep flowing. During a retune the output mixes
// old and new coefficients until the last truth table of the update has
// been written.
//
// Timing: one sample per clock when in_valid is held high. The delay line
// shifts only on in_valid. y appears with out_valid LATENCY = 2 + clog2(TAPS)
// cycles after the clock edge that takes the sample (7 cycles for 32 taps).
//
// From the document: 32 taps, 8-bit coefficients, 8-bit input, fully
// pipelined, coefficients changed by reconfiguring LUTs. This design's own
// choices: direct form with an adder tree, signed two's-complement numbers,
// a full-precision 21-bit output, the valid handshake.
//
// Interface: clk, rst_n, cfg (tap k's TLUTs at BASE + 24*k ...), in_valid,
// x_in, out_valid, y.
module fir_tlut
  import srp_pkg::*;
#(
  parameter int unsigned TAPS = FIR_TAPS_DEF,
  parameter lut_addr_t   BASE = FIR_BASE,
  parameter int unsigned YW   = 16 + $clog2(TAPS)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  lut_cfg_t             cfg,
  input  logic                 in_valid,
  input  logic signed [7:0]    x_in,
  output logic                 out_valid,
  output logic signed [YW-1:0] y
);

  logic signed [7:0]  x_q  [TAPS];
  logic signed [15:0] prod [TAPS];
  logic [2:0]         v_q;

  // delay line: x_q[0] is the newest sample
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < TAPS; k++) x_q[k] <= '0;
    end else if (in_valid) begin
      x_q[0] <= x_in;
      for (int k = 1; k < TAPS; k++) x_q[k] <= x_q[k-1];
    end
  end

  // valid follows the sample through the delay line and the two multiplier stages
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) v_q <= '0;
    else        v_q <= {v_q[1:0], in_valid};
  end

  for (genvar k = 0; k < TAPS; k++) begin : g_tap
    kcm_tlut #(.BASE(BASE + lut_addr_t'(k * KCM_LUTS))) u_kcm (
      .clk, .rst_n, .cfg, .x(x_q[k]), .p(prod[k])
    );
  end

  adder_tree #(.N(TAPS), .IW(16), .OW(YW)) u_sum (
    .clk, .rst_n,
    .in_valid (v_q[2]),
    .in       (prod),
    .out_valid,
    .sum      (y)
  );

endmodule
