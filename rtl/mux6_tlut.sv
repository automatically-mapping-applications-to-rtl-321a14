// mux6_tlut: the 6:1 multiplexer of the worked example, mapped onto two
// tunable LUTs.
//
// The multiplexer has data inputs I0..I5 and select inputs S0..S2. A
// conventional mapping needs four 4-input LUTs; with S2..S0 treated as
// parameters, the selects disappear from the circuit and live only in the
// truth tables of two TLUTs:
//   L1 reads {I3, I0, I1, I2} (I3 on the most significant pin) and handles
//      the four inputs chosen when S2 = 0;
//   L0 reads {0, L1, I4, I5} (most significant pin unused) and combines L1
//      with I4 and I5.
// The truth tables the processor writes for a select value are the tuning
// functions of the example (L1 stores the inverted choice among I0..I3, L0
// inverts it back). With them, O = I[S] for S = 0..5, and O = I5 for S = 6, 7.
//
// The pin assignment and the truth tables follow the example's TLUT circuit
// and tuning-function table; the unused pin of L0 is tied to 0 here.
//
// Interface: clk, rst_n, cfg (configuration write record; L1 at BASE, L0 at
// BASE+1), i[5:0] data inputs, o output, combinational from i.
module mux6_tlut
  import srp_pkg::*;
#(
  parameter lut_addr_t BASE = MUX6_BASE
) (
  input  logic       clk,
  input  logic       rst_n,
  input  lut_cfg_t   cfg,
  input  logic [5:0] i,
  output logic       o
);

  logic l1;

  tlut4 #(.ADDR(BASE)) u_l1 (
    .clk, .rst_n, .cfg,
    .in  ({i[3], i[0], i[1], i[2]}),
    .out (l1)
  );

  tlut4 #(.ADDR(BASE + lut_addr_t'(1))) u_l0 (
    .clk, .rst_n, .cfg,
    .in  ({1'b0, l1, i[4], i[5]}),
    .out (o)
  );

endmodule
