// tb_mux6_tlut: checks the two-TLUT 6:1 multiplexer. For each select value the
// truth tables given by the tuning functions are written, then the output is
// compared with a plain multiplexer for all 64 data patterns, and with the
// simulation model, in which the selects are real inputs of the same TLUT
// circuit.
module tb_mux6_tlut;
  import srp_pkg::*;
  import srp_tb_pkg::*;

  logic       clk = 0, rst_n = 0;
  lut_cfg_t   cfg;
  logic [5:0] i;
  logic       o;
  int checks = 0, failures = 0;

  logic [2:0] s_model;
  logic       o_model;

  mux6_tlut #(.BASE(MUX6_BASE)) dut (.clk, .rst_n, .cfg, .i, .o);
  mux6_sim_model u_model (.i, .s(s_model), .o(o_model));

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic write(lut_addr_t a, tt_t t);
    @(negedge clk);
    cfg = '{we: 1'b1, addr: a, tt: t};
    @(negedge clk);
    cfg.we = 1'b0;
  endtask

  initial begin
    cfg = '0;
    i   = '0;
    s_model = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // two rounds, in a shuffled order of selects in the second
    for (int r = 0; r < 16; r++) begin
      automatic logic [2:0] s = (r < 8) ? 3'(r) : 3'($urandom);
      write(MUX6_BASE,     mux6_tt_l1(s));
      write(MUX6_BASE + 1, mux6_tt_l0(s));
      s_model = s;
      for (int n = 0; n < 64; n++) begin
        i = 6'(n);
        #1;
        checks++;
        if (o !== mux6_ref(i, s)) begin
          failures++;
          $display("FAIL s=%0d i=%b o=%b", s, i, o);
        end
        checks++;
        if (o !== o_model) begin
          failures++;
          $display("FAIL s=%0d i=%b o=%b, simulation model %b", s, i, o, o_model);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
