// tb_hwicap: checks the HWICAP peripheral from its OPB side to its ICAP side.
// Each round fills part of the buffer with random words, reads some back,
// sets SIZE (any byte count, not only whole words) and starts a transfer.
// The bytes on the ICAP must be the buffer contents, most significant byte
// first, exactly SIZE of them on consecutive clocks starting in the clock
// after the start is accepted; a second start while busy must be ignored;
// STATUS must show busy during and done after. Accesses outside the
// peripheral's window must not be acknowledged.
module tb_hwicap;
  import srp_pkg::*;

  localparam logic [31:0] BASE = 32'h4120_0000;

  logic        clk = 0, rst_n = 0;
  logic        opb_select, opb_rnw;
  logic [31:0] opb_abus, opb_dbus, sl_dbus;
  logic        sl_xferack;
  logic        icap_ce_n, icap_write_n, busy;
  logic [7:0]  icap_i;
  int checks = 0, failures = 0;

  hwicap #(.BASE_ADDR(BASE)) dut (
    .clk, .rst_n, .opb_select, .opb_rnw, .opb_abus, .opb_dbus, .sl_xferack, .sl_dbus,
    .icap_ce_n, .icap_write_n, .icap_i, .busy
  );

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (300000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int         cyc = 0;
  logic [7:0] got_q[$];
  int         first_cyc, last_cyc, ack_cyc;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && !icap_ce_n && !icap_write_n) begin
      if (got_q.size() == 0) first_cyc = cyc;
      last_cyc = cyc;
      got_q.push_back(icap_i);
    end
    if (rst_n && sl_xferack) ack_cyc = cyc;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic opb_write(logic [31:0] a, logic [31:0] d);
    @(negedge clk);
    opb_select = 1; opb_rnw = 0; opb_abus = a; opb_dbus = d;
    do @(posedge clk); while (!sl_xferack);
    @(negedge clk);
    opb_select = 0; opb_dbus = '0;
  endtask

  task automatic opb_read(logic [31:0] a, output logic [31:0] d);
    @(negedge clk);
    opb_select = 1; opb_rnw = 1; opb_abus = a;
    do @(posedge clk); while (!sl_xferack);
    d = sl_dbus;
    @(negedge clk);
    opb_select = 0;
  endtask

  logic [31:0] model [HWICAP_BUF_WORDS];

  initial begin
    logic [31:0] d;
    opb_select = 0; opb_rnw = 1; opb_abus = '0; opb_dbus = '0;
    foreach (model[k]) model[k] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;

    // a select outside the window gets no acknowledge
    @(negedge clk);
    opb_select = 1; opb_rnw = 1; opb_abus = BASE + 32'h1000;
    repeat (5) begin
      @(posedge clk); #1;
      check(!sl_xferack && sl_dbus == '0, "acknowledge outside the window");
    end
    @(negedge clk);
    opb_select = 0;

    // SIZE of 0 sends nothing
    opb_write(BASE + 32'(HWICAP_REG_SIZE), 0);
    opb_write(BASE + 32'(HWICAP_REG_CTRL), 1);
    repeat (5) @(negedge clk);
    check(got_q.size() == 0 && !busy, "start with SIZE 0");

    for (int r = 0; r < 12; r++) begin
      automatic int size  = (r == 0) ? HWICAP_BUF_WORDS * 4 : $urandom_range(1, 300);
      automatic int words = (size + 3) / 4;
      automatic bit seen_busy = 0;
      for (int w = 0; w < words; w++) begin
        model[w] = $urandom;
        opb_write(BASE + 32'(4 * w), model[w]);
      end
      for (int k = 0; k < 4; k++) begin
        automatic int w = $urandom_range(0, words - 1);
        opb_read(BASE + 32'(4 * w), d);
        check(d == model[w], $sformatf("buffer read word %0d: %h, expected %h", w, d, model[w]));
      end
      opb_write(BASE + 32'(HWICAP_REG_SIZE), size);
      opb_read(BASE + 32'(HWICAP_REG_SIZE), d);
      check(d == 32'(size), "SIZE read back");
      got_q.delete();
      opb_write(BASE + 32'(HWICAP_REG_CTRL), 1);
      check(busy, "busy right after start");
      // a second start while busy must not restart the transfer
      if (size > 20) opb_write(BASE + 32'(HWICAP_REG_CTRL), 1);
      do begin
        opb_read(BASE + 32'(HWICAP_REG_STATUS), d);
        if (d[0]) seen_busy = 1;
      end while (d[0]);
      check(d[1], "done after the transfer");
      check(seen_busy || size < 8, "STATUS.busy never read as 1");
      check(got_q.size() == size, $sformatf("%0d bytes sent, expected %0d", got_q.size(), size));
      check(last_cyc - first_cyc + 1 == size, "bytes not on consecutive clocks");
      for (int b = 0; b < size && b < got_q.size(); b++) begin
        automatic logic [31:0] wd = model[b / 4];
        automatic logic [7:0]  e  = wd[31 - 8 * (b % 4) -: 8];
        check(got_q[b] == e, $sformatf("byte %0d = %h, expected %h", b, got_q[b], e));
      end
    end

    // the start is taken on the edge that raises its acknowledge; the first
    // byte is on the ICAP in that same clock
    opb_write(BASE + 32'(HWICAP_REG_SIZE), 8);
    got_q.delete();
    opb_write(BASE + 32'(HWICAP_REG_CTRL), 1);
    repeat (12) @(negedge clk);
    check(first_cyc == ack_cyc && got_q.size() == 8,
          $sformatf("start latency: first byte at %0d, start acknowledged at %0d", first_cyc, ack_cyc));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
