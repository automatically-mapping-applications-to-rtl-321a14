// srp_top: the fabric side of a self-reconfiguring platform running an
// adaptive FIR filter.
//
// An embedded processor (outside this module, reached through the OPB slave
// port) is the configuration controller. When the filter coefficients change
// it evaluates the tuning functions, i.e. computes the new truth tables of
// the TLUTs that hold the coefficients, packs them into a configuration
// stream, and hands the stream to the HWICAP. The HWICAP sends it byte by
// byte into the configuration port, which rewrites one TLUT per record. The
// filter itself has no coefficient inputs: it runs on whatever its truth
// tables hold, one sample per clock, and keeps running during a retune.
//
//   OPB --> hwicap --(ce_n, write_n, byte)--> icap_port --cfg--> fir_tlut
//                                                          \--> mux6_tlut
//
// The 6:1 multiplexer of the worked example (select inputs folded into two
// TLUTs) sits on the same configuration port at its own addresses, with its
// data inputs and output brought out.
//
// From the document: the processor + HWICAP + ICAP reconfiguration path, a
// 32-tap FIR with 8-bit samples and coefficients, fully pipelined, and the
// two-TLUT multiplexer. This design's own choices: the configuration stream
// format, the LUT address map and the HWICAP register map (see srp_pkg), a
// single clock for bus and filter.
//
// Interface: clk, rst_n (asynchronous, active low); OPB slave of the HWICAP;
// cfg_busy (HWICAP transfer running), cfg_in_stream (configuration port
// inside a stream); filter in_valid/x_in -> out_valid/y, latency
// 2 + clog2(TAPS) cycles; multiplexer mux_i -> mux_o, combinational.
module srp_top
  import srp_pkg::*;
#(
  parameter int unsigned TAPS        = FIR_TAPS_DEF,
  parameter logic [31:0] HWICAP_BASE = 32'h4120_0000,
  parameter int unsigned YW          = 16 + $clog2(TAPS)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // OPB slave (HWICAP registers and buffer)
  input  logic                 opb_select,
  input  logic                 opb_rnw,
  input  logic [31:0]          opb_abus,
  input  logic [31:0]          opb_dbus,
  output logic                 sl_xferack,
  output logic [31:0]          sl_dbus,
  output logic                 cfg_busy,
  output logic                 cfg_in_stream,
  // adaptive FIR filter
  input  logic                 fir_in_valid,
  input  logic signed [7:0]    fir_x,
  output logic                 fir_out_valid,
  output logic signed [YW-1:0] fir_y,
  // 6:1 multiplexer example
  input  logic [5:0]           mux_i,
  output logic                 mux_o
);

  logic       icap_ce_n, icap_write_n;
  logic [7:0] icap_i;
  lut_cfg_t   cfg;

  hwicap #(.BASE_ADDR(HWICAP_BASE)) u_hwicap (
    .clk, .rst_n,
    .opb_select, .opb_rnw, .opb_abus, .opb_dbus, .sl_xferack, .sl_dbus,
    .icap_ce_n, .icap_write_n, .icap_i,
    .busy (cfg_busy)
  );

  icap_port u_icap (
    .clk, .rst_n,
    .ce_n    (icap_ce_n),
    .write_n (icap_write_n),
    .i       (icap_i),
    .cfg,
    .in_stream (cfg_in_stream)
  );

  fir_tlut #(.TAPS(TAPS), .BASE(FIR_BASE), .YW(YW)) u_fir (
    .clk, .rst_n, .cfg,
    .in_valid  (fir_in_valid),
    .x_in      (fir_x),
    .out_valid (fir_out_valid),
    .y         (fir_y)
  );

  mux6_tlut #(.BASE(MUX6_BASE)) u_mux6 (
    .clk, .rst_n, .cfg,
    .i (mux_i),
    .o (mux_o)
  );

endmodule
