// tb_icap_port: checks the configuration port. Random streams of LUT writes
// are sent, surrounded by junk bytes (some of them near-miss sync words),
// with random idle cycles and cycles where only one of ce_n/write_n is low.
// Every write the port emits must match the next expected record, no write
// may appear outside a stream, and in_stream must follow sync and end.
module tb_icap_port;
  import srp_pkg::*;
  import srp_tb_pkg::*;

  logic       clk = 0, rst_n = 0;
  logic       ce_n, write_n;
  logic [7:0] i;
  lut_cfg_t   cfg;
  logic       in_stream;
  int checks = 0, failures = 0;
  int syncs_seen = 0;

  icap_port dut (.clk, .rst_n, .ce_n, .write_n, .i, .cfg, .in_stream);

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  lut_write_t exp_q[$];

  always @(posedge clk) begin
    if (rst_n && cfg.we) begin
      checks++;
      if (exp_q.size() == 0) begin
        failures++;
        $display("FAIL unexpected write addr=%h", cfg.addr);
      end else begin
        automatic lut_write_t e = exp_q.pop_front();
        if (cfg.addr !== e.addr || cfg.tt !== e.tt) begin
          failures++;
          $display("FAIL write addr=%h tt=%h exp addr=%h tt=%h", cfg.addr, cfg.tt, e.addr, e.tt);
        end
      end
    end
  end

  task automatic send(logic [7:0] q[$]);
    foreach (q[k]) begin
      // idle or half-enabled cycles: must not be taken
      while ($urandom_range(0, 5) == 0) begin
        case ($urandom_range(0, 2))
          0: begin ce_n = 1; write_n = 1; end
          1: begin ce_n = 0; write_n = 1; end
          default: begin ce_n = 1; write_n = 0; end
        endcase
        i = 8'($urandom);
        @(negedge clk);
      end
      ce_n = 0; write_n = 0; i = q[k];
      @(negedge clk);
    end
    ce_n = 1; write_n = 1;
  endtask

  initial begin
    logic [7:0] junk[$];
    ce_n = 1; write_n = 1; i = '0; cfg = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;

    for (int r = 0; r < 20; r++) begin
      automatic lut_write_t w[$];
      automatic logic [7:0] q[$];
      // junk outside a stream, including records and a broken sync word
      junk.delete();
      repeat ($urandom_range(0, 12)) junk.push_back(8'($urandom));
      push_word(junk, 32'hAA99_5567);
      push_word(junk, {16'h0001, 16'hBEEF});
      send(junk);
      checks++;
      if (in_stream) begin
        failures++;
        $display("FAIL in_stream high on junk");
      end
      repeat ($urandom_range(1, 40))
        w.push_back('{addr: 16'($urandom_range(0, 16'hFFFE)), tt: 16'($urandom)});
      build_stream(q, w);
      // everything but the end record
      foreach (w[k]) exp_q.push_back(w[k]);
      send(q[0:q.size()-5]);
      @(negedge clk);
      checks++;
      if (!in_stream) begin
        failures++;
        $display("FAIL in_stream low inside a stream");
      end
      send(q[q.size()-4:q.size()-1]);
      @(negedge clk);
      checks++;
      if (in_stream || exp_q.size() != 0) begin
        failures++;
        $display("FAIL after end record: in_stream=%b, %0d writes missing", in_stream, exp_q.size());
        exp_q.delete();
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
