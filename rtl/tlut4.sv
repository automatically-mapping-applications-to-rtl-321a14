// tlut4: a tunable LUT, the fabric element the whole platform is built on.
//
// A 4-input LUT whose 16 truth-table bits are configuration memory. The
// datapath sees a plain combinational LUT: out = tt[in]. The truth table is
// rewritten at run time by a configuration write addressed to this LUT
// (cfg.we with cfg.addr == ADDR); the new table takes effect the cycle after
// the write. In a circuit mapped with tunable LUTs, a parameter input of the
// original circuit never reaches a LUT pin: its value is folded into the
// truth table, which a processor recomputes (the "tuning functions") and
// rewrites when the parameter changes.
//
// Four regular inputs and a 16-entry truth table follow the document. The
// address-matched write record and the reset value INIT (the truth table the
// start-up configuration holds) are this design's own choices.
//
// Interface: clk, rst_n (asynchronous, active low), cfg (write record shared
// by all LUTs), in[3:0] regular inputs, out combinational.
module tlut4
  import srp_pkg::*;
#(
  parameter lut_addr_t ADDR = '0,     // this LUT's configuration address
  parameter tt_t       INIT = '0      // truth table after reset
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  lut_cfg_t             cfg,
  input  logic [LUT_K-1:0]     in,
  output logic                 out
);

  tt_t tt_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                          tt_q <= INIT;
    else if (cfg.we && cfg.addr == ADDR) tt_q <= cfg.tt;
  end

  assign out = tt_q[in];

endmodule
