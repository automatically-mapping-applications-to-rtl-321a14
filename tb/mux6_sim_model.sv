// mux6_sim_model: simulation model of the two-TLUT 6:1 multiplexer, for
// testbenches only. It is the same TLUT circuit as mux6_tlut, but the select
// inputs stay real inputs: each LUT's truth table is produced on the fly by
// the tuning functions of the selects instead of being stored in
// configuration bits. Comparing it with the plain multiplexer checks the
// tuning functions; comparing it with the reconfigured hardware checks the
// configuration path. Purely combinational.
module mux6_sim_model
  import srp_pkg::*;
  import srp_tb_pkg::*;
(
  input  logic [5:0] i,
  input  logic [2:0] s,
  output logic       o
);
  tt_t  tt_l1, tt_l0;
  logic l1;

  always_comb begin
    tt_l1 = mux6_tt_l1(s);
    tt_l0 = mux6_tt_l0(s);
    l1    = tt_l1[{i[3], i[0], i[1], i[2]}];
    o     = tt_l0[{1'b0, l1, i[4], i[5]}];
  end
endmodule
