// tb_srp_top: end-to-end test of the self-reconfiguring platform at its full
// size (32 taps, 2 KiB HWICAP buffer), with the top's parameters left alone.
//
// The testbench plays the processor. Like the generated reconfiguration
// software, it evaluates the tuning functions for new parameter values,
// packs the truth tables into configuration streams, loads them into the
// HWICAP buffer over the OPB, starts each transfer and polls STATUS.
// It exercises:
//   - a full retune of all 32 taps, which needs more than one buffer fill;
//   - partial retunes that rewrite only the taps whose coefficient changed,
//     while the filter keeps taking a sample on (almost) every clock;
//   - a retune of the 6:1 multiplexer for every select value.
// Filter outputs are compared with a direct convolution using the
// coefficients in force; outputs of samples taken while a transfer is
// running are counted but not compared, since they mix old and new
// coefficients by design. Each mechanism is counted and must occur.
module tb_srp_top;
  import srp_pkg::*;
  import srp_tb_pkg::*;

  localparam int          TAPS = FIR_TAPS_DEF;
  localparam int          YW   = 16 + $clog2(TAPS);
  localparam logic [31:0] BASE = 32'h4120_0000;

  logic                 clk = 0, rst_n = 0;
  logic                 opb_select, opb_rnw;
  logic [31:0]          opb_abus, opb_dbus, sl_dbus;
  logic                 sl_xferack, cfg_busy, cfg_in_stream;
  logic                 fir_in_valid, fir_out_valid;
  logic signed [7:0]    fir_x;
  logic signed [YW-1:0] fir_y;
  logic [5:0]           mux_i;
  logic                 mux_o;

  int checks = 0, failures = 0;
  // mechanism counters
  int n_full_retunes = 0, n_partial_retunes = 0, n_multi_fill = 0, n_fills = 0;
  int n_busy_polls = 0, n_out_during_retune = 0, n_mux_retunes = 0, n_stream_seen = 0;
  int n_out_checked = 0;

  srp_top dut (
    .clk, .rst_n,
    .opb_select, .opb_rnw, .opb_abus, .opb_dbus, .sl_xferack, .sl_dbus,
    .cfg_busy, .cfg_in_stream,
    .fir_in_valid, .fir_x, .fir_out_valid, .fir_y,
    .mux_i, .mux_o
  );

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // ---- processor: OPB accesses ---------------------------------------------------
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

  // ---- processor: reconfiguration routine ---------------------------------------------
  // Sends LUT writes in as many buffer fills as needed; each fill is a
  // complete stream (sync, records, end record).
  task automatic reconfigure(const ref lut_write_t w[$]);
    localparam int MAX_REC = HWICAP_BUF_WORDS - 2;
    int fills = 0;
    for (int first = 0; first < w.size(); first += MAX_REC) begin
      lut_write_t part[$];
      logic [7:0] bytes[$];
      logic [31:0] d;
      for (int k = first; k < w.size() && k < first + MAX_REC; k++) part.push_back(w[k]);
      build_stream(bytes, part);
      for (int b = 0; b < bytes.size(); b += 4)
        opb_write(BASE + 32'(b), {bytes[b], bytes[b+1], bytes[b+2], bytes[b+3]});
      opb_write(BASE + 32'(HWICAP_REG_SIZE), bytes.size());
      opb_write(BASE + 32'(HWICAP_REG_CTRL), 1);
      do begin
        opb_read(BASE + 32'(HWICAP_REG_STATUS), d);
        if (d[0]) n_busy_polls++;
      end while (!d[1]);
      fills++;
      n_fills++;
    end
    if (fills > 1) n_multi_fill++;
  endtask

  // ---- filter: sample source and checker ---------------------------------------------
  logic signed [7:0] coef [TAPS];     // coefficients the expected values use
  logic signed [7:0] hist [TAPS];
  typedef struct { longint v; bit skip; } exp_t;
  exp_t exp_q[$];
  bit   skip = 1;                     // samples taken now are not compared
  bit   run_src = 0;

  always @(posedge clk) begin
    if (cfg_in_stream) n_stream_seen++;
    if (rst_n && fir_out_valid) begin
      if (exp_q.size() == 0) begin
        check(0, "filter output with no sample behind it");
      end else begin
        automatic exp_t e = exp_q.pop_front();
        if (e.skip) n_out_during_retune++;
        else begin
          n_out_checked++;
          check(longint'(fir_y) == e.v, $sformatf("y=%0d expected %0d", fir_y, e.v));
        end
      end
    end
  end

  // drives a sample on most clocks while run_src is set
  initial begin
    fir_in_valid = 0; fir_x = '0;
    forever begin
      @(negedge clk);
      fir_in_valid = 0;
      if (run_src && $urandom_range(0, 7) != 0) begin
        automatic longint acc = 0;
        automatic logic signed [7:0] v = 8'($urandom);
        for (int k = TAPS - 1; k > 0; k--) hist[k] = hist[k-1];
        hist[0] = v;
        for (int k = 0; k < TAPS; k++) acc += longint'(coef[k]) * longint'(hist[k]);
        exp_q.push_back('{v: acc, skip: skip});
        fir_in_valid = 1;
        fir_x = v;
      end
    end
  end

  task automatic retune_fir(logic signed [7:0] nc [TAPS], bit partial);
    lut_write_t w[$];
    for (int k = 0; k < TAPS; k++)
      if (!partial || nc[k] != coef[k]) tap_writes(w, k, nc[k]);
    skip = 1;
    reconfigure(w);
    coef = nc;
    repeat (4) @(negedge clk);
    skip = 0;
    if (partial) n_partial_retunes++; else n_full_retunes++;
  endtask

  initial begin
    logic signed [7:0] nc [TAPS];
    opb_select = 0; opb_rnw = 1; opb_abus = '0; opb_dbus = '0;
    mux_i = '0;
    foreach (coef[k]) coef[k] = '0;
    foreach (hist[k]) hist[k] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;

    // ---- 6:1 multiplexer: retune for every select value -------------------------
    for (int s = 0; s < 8; s++) begin
      automatic lut_write_t w[$];
      w.push_back('{addr: MUX6_BASE,     tt: mux6_tt_l1(3'(s))});
      w.push_back('{addr: MUX6_BASE + 1, tt: mux6_tt_l0(3'(s))});
      reconfigure(w);
      n_mux_retunes++;
      for (int n = 0; n < 64; n++) begin
        mux_i = 6'(n);
        #1;
        check(mux_o == mux6_ref(mux_i, 3'(s)), $sformatf("mux s=%0d i=%b o=%b", s, mux_i, mux_o));
      end
    end

    // ---- filter: start-up configuration, then run ----------------------------------
    foreach (nc[k]) nc[k] = 8'($urandom);
    run_src = 1;
    retune_fir(nc, 0);
    repeat (400) @(negedge clk);

    // ---- coefficient updates while samples keep flowing --------------------------------
    for (int r = 0; r < 4; r++) begin
      nc = coef;
      repeat ($urandom_range(1, 6)) nc[$urandom_range(0, TAPS - 1)] = 8'($urandom);
      retune_fir(nc, 1);
      repeat (300) @(negedge clk);
    end

    // ---- a complete new filter, again while running ---------------------------------------
    foreach (nc[k]) nc[k] = 8'(k * 7 - 100);
    retune_fir(nc, 0);
    repeat (300) @(negedge clk);

    run_src = 0;
    repeat (20) @(negedge clk);
    check(exp_q.size() == 0, "filter outputs missing");

    $display("mechanisms: full retunes %0d, partial retunes %0d, multi-fill retunes %0d, fills %0d,",
             n_full_retunes, n_partial_retunes, n_multi_fill, n_fills);
    $display("            busy polls %0d, outputs during retune %0d, mux retunes %0d, outputs checked %0d",
             n_busy_polls, n_out_during_retune, n_mux_retunes, n_out_checked);
    check(n_full_retunes > 0,      "no full retune");
    check(n_partial_retunes > 0,   "no partial retune");
    check(n_multi_fill > 0,        "no retune needing several buffer fills");
    check(n_busy_polls > 0,        "HWICAP never seen busy");
    check(n_out_during_retune > 0, "filter did not run during a retune");
    check(n_mux_retunes == 8,      "not every multiplexer select configured");
    check(n_stream_seen > 0,       "configuration port never inside a stream");
    check(n_out_checked > 1000,    "too few filter outputs checked");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
