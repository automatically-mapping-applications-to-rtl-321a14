// kcm_tlut: one tap multiplier of the reconfigurable FIR filter, a signed
// 8-bit sample times an 8-bit coefficient that exists only inside TLUT truth
// tables.
//
// The sample is cut into two 4-bit slices: the low slice x[3:0] (unsigned,
// 0..15) and the high slice x[7:4] (signed, -8..7). Each slice addresses
// twelve TLUTs, one per bit of its 12-bit signed partial product
// slice * coefficient; the truth table of TLUT b of a slice is, for each of
// the 16 slice values, bit b of that product. The coefficient is therefore a
// parameter in the document's sense: changing it means rewriting these 24
// truth tables, and no multiplier is built. The product is
//   p = (pp_hi << 4) + pp_lo   (16-bit signed, exact for 8x8 signed).
//
// Timing: two register stages. The partial products are registered, then
// their sum, so p follows x by 2 cycles.
//
// That the tap multiplier takes its coefficient from truth tables follows the
// document; the slicing into two 4-bit halves, the signed number format and
// the register placement are this design's own choices.
//
// Interface: clk, rst_n, cfg (TLUT b of slice s at BASE + 12*s + b),
// x signed sample, p signed product.
module kcm_tlut
  import srp_pkg::*;
#(
  parameter lut_addr_t BASE = '0
) (
  input  logic               clk,
  input  logic               rst_n,
  input  lut_cfg_t           cfg,
  input  logic signed [7:0]  x,
  output logic signed [15:0] p
);

  logic [KCM_PW-1:0]        pp_lo, pp_hi;
  logic signed [KCM_PW-1:0] pp_lo_q, pp_hi_q;

  for (genvar b = 0; b < KCM_PW; b++) begin : g_bit
    tlut4 #(.ADDR(BASE + lut_addr_t'(b))) u_lo (
      .clk, .rst_n, .cfg, .in(x[3:0]), .out(pp_lo[b])
    );
    tlut4 #(.ADDR(BASE + lut_addr_t'(KCM_PW + b))) u_hi (
      .clk, .rst_n, .cfg, .in(x[7:4]), .out(pp_hi[b])
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pp_lo_q <= '0;
      pp_hi_q <= '0;
      p       <= '0;
    end else begin
      pp_lo_q <= pp_lo;
      pp_hi_q <= pp_hi;
      p       <= (16'(pp_hi_q) <<< 4) + 16'(pp_lo_q);
    end
  end

endmodule
