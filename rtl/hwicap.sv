// hwicap: the OPB peripheral that lets the processor reconfigure the fabric
// through the ICAP.
//
// The processor fills a 2 KiB buffer (512 32-bit words) over the OPB with a
// configuration stream, writes the stream length in bytes to SIZE and 1 to
// CTRL. The transfer engine then sends the buffer to the ICAP one byte per
// clock, most significant byte of each word first, and clears STATUS.busy
// after the last byte. A reconfiguration longer than the buffer is sent as
// several fills and starts.
//
// Register map (byte offsets from BASE_ADDR, 4 KiB window):
//   0x000-0x7FF  buffer, read/write
//   0x800        SIZE   bytes to send, read/write (0 sends nothing)
//   0x804        CTRL   write bit0 = 1 to start (ignored while busy), reads 0
//   0x808        STATUS bit0 busy, bit1 done (set when a transfer ends,
//                cleared by the next start), read only
//
// OPB slave side: a transfer is opb_select with opb_rnw, opb_abus and, for a
// write, opb_dbus, held until sl_xferack. The peripheral acknowledges one
// cycle after it sees a select to its window; sl_dbus carries read data in
// the acknowledge cycle and is zero otherwise, so it can be ORed onto the bus.
// ICAP side: ce_n, write_n (active low) and icap_i, one byte per clock.
//
// Timing: a start written in cycle t puts the first byte on the ICAP in cycle
// t+1 and the last in cycle t+SIZE; busy reads 1 from cycle t+1 to t+SIZE.
//
// The document names the HWICAP as the module connecting the processor to the
// ICAP over the OPB and says no more. The buffer, the register map and the
// single-cycle acknowledge are this design's own choices.
module hwicap
  import srp_pkg::*;
#(
  parameter logic [31:0] BASE_ADDR = 32'h4120_0000,
  parameter int unsigned BUF_WORDS = HWICAP_BUF_WORDS
) (
  input  logic        clk,
  input  logic        rst_n,
  // OPB slave
  input  logic        opb_select,
  input  logic        opb_rnw,
  input  logic [31:0] opb_abus,
  input  logic [31:0] opb_dbus,
  output logic        sl_xferack,
  output logic [31:0] sl_dbus,
  // ICAP
  output logic        icap_ce_n,
  output logic        icap_write_n,
  output logic [7:0]  icap_i,
  // status
  output logic        busy
);

  localparam int unsigned WAW = $clog2(BUF_WORDS);     // word address width
  localparam int unsigned BW  = $clog2(BUF_WORDS * 4) + 1;   // byte count width

  logic [31:0]    mem [BUF_WORDS];
  logic           hit, acc, wr_acc;
  logic [11:0]    off;
  logic           is_buf;
  logic [WAW-1:0] opb_widx;
  logic [31:0]    buf_rd_q, reg_rd_q;
  logic           rd_buf_q;
  logic [BW-1:0]  size_q, idx_q, idx_d;
  logic           busy_q, done_q, start;
  logic [31:0]    eng_word_q;

  // ---- OPB decode -------------------------------------------------------------
  assign hit      = opb_select && (opb_abus[31:12] == BASE_ADDR[31:12]);
  assign acc      = hit && !sl_xferack;          // one access per transfer
  assign wr_acc   = acc && !opb_rnw;
  assign off      = opb_abus[11:0];
  assign is_buf   = (off < 12'(BUF_WORDS * 4));
  assign opb_widx = off[WAW+1:2];
  assign start    = wr_acc && off == HWICAP_REG_CTRL && opb_dbus[0] && !busy_q
                    && size_q != '0;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) sl_xferack <= 1'b0;
    else        sl_xferack <= acc;
  end

  // ---- buffer: OPB port (read/write) and engine port (read) ----------------------
  always_ff @(posedge clk) begin
    if (wr_acc && is_buf) mem[opb_widx] <= opb_dbus;
    buf_rd_q   <= mem[opb_widx];
    eng_word_q <= mem[idx_d[BW-2:2]];
  end

  // ---- registers ----------------------------------------------------------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      size_q   <= '0;
      reg_rd_q <= '0;
      rd_buf_q <= 1'b0;
    end else begin
      if (wr_acc && off == HWICAP_REG_SIZE)
        size_q <= (opb_dbus > 32'(BUF_WORDS * 4)) ? BW'(BUF_WORDS * 4) : BW'(opb_dbus);
      rd_buf_q <= is_buf;
      unique case (off)
        HWICAP_REG_SIZE:   reg_rd_q <= 32'(size_q);
        HWICAP_REG_STATUS: reg_rd_q <= {30'd0, done_q, busy_q};
        default:           reg_rd_q <= '0;
      endcase
    end
  end

  assign sl_dbus = !(sl_xferack && opb_rnw) ? '0 : rd_buf_q ? buf_rd_q : reg_rd_q;

  // ---- transfer engine -------------------------------------------------------------
  always_comb begin
    if (start)       idx_d = '0;
    else if (busy_q) idx_d = idx_q + BW'(1);
    else             idx_d = idx_q;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy_q <= 1'b0;
      done_q <= 1'b0;
      idx_q  <= '0;
    end else begin
      idx_q <= idx_d;
      if (start) begin
        busy_q <= 1'b1;
        done_q <= 1'b0;
      end else if (busy_q && idx_q == size_q - BW'(1)) begin
        busy_q <= 1'b0;
        done_q <= 1'b1;
      end
    end
  end

  assign busy         = busy_q;
  assign icap_ce_n    = !busy_q;
  assign icap_write_n = !busy_q;
  always_comb begin
    unique case (idx_q[1:0])
      2'd0: icap_i = eng_word_q[31:24];
      2'd1: icap_i = eng_word_q[23:16];
      2'd2: icap_i = eng_word_q[15:8];
      2'd3: icap_i = eng_word_q[7:0];
    endcase
  end

  // ---- bus rules ----------------------------------------------------------------------
  // an acknowledge answers a select of the cycle before, and lasts one cycle
  a_ack_after_select: assert property (@(posedge clk) disable iff (!rst_n)
    sl_xferack |-> $past(opb_select));
  a_ack_single: assert property (@(posedge clk) disable iff (!rst_n)
    sl_xferack |=> !sl_xferack);

endmodule
