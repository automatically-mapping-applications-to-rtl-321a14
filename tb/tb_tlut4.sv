// tb_tlut4: checks the tunable LUT. After reset it must hold INIT; a write to
// another address must leave it alone; a write to its address must take
// effect the next cycle, for random truth tables and every input value.
module tb_tlut4;
  import srp_pkg::*;

  localparam lut_addr_t ADDR = 16'h0123;
  localparam tt_t       INIT = 16'hA5C3;

  logic     clk = 0, rst_n = 0;
  lut_cfg_t cfg;
  logic [3:0] in;
  logic     out;
  int checks = 0, failures = 0;

  tlut4 #(.ADDR(ADDR), .INIT(INIT)) dut (.clk, .rst_n, .cfg, .in, .out);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_table(tt_t exp);
    for (int n = 0; n < 16; n++) begin
      in = 4'(n);
      #1;
      checks++;
      if (out !== exp[n]) begin
        failures++;
        $display("FAIL in=%0d out=%0b exp=%0b", n, out, exp[n]);
      end
    end
  endtask

  task automatic write(lut_addr_t a, tt_t t);
    @(negedge clk);
    cfg = '{we: 1'b1, addr: a, tt: t};
    @(negedge clk);
    cfg.we = 1'b0;
  endtask

  initial begin
    tt_t cur;
    cfg = '0;
    in  = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    check_table(INIT);
    cur = INIT;
    for (int r = 0; r < 200; r++) begin
      automatic tt_t t = 16'($urandom);
      if ($urandom_range(0, 3) == 0) begin
        write(ADDR ^ 16'(1 << $urandom_range(0, 15)), t);   // someone else's
      end else begin
        write(ADDR, t);
        cur = t;
      end
      check_table(cur);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
