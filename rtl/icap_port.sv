// icap_port: the fabric's configuration interface. It takes the byte stream
// written into the internal configuration access port (ICAP) and turns it
// into truth-table writes for the tunable LUTs.
//
// A byte is taken on every clock with ce_n = 0 and write_n = 0 (both active
// low). While out of a stream the port only watches for the 32-bit sync word
// 0xAA995566 (most significant byte first); all other bytes are dropped.
// Inside a stream it gathers 4-byte records
//   {addr[15:8], addr[7:0], tt[15:8], tt[7:0]}
// and, on the last byte of each, raises cfg.we for one cycle with the LUT
// address and its new truth table. A record with address 0xFFFF ends the
// stream. The port never stalls: it takes one byte per clock.
//
// The document has the processor write the LUT bits into configuration
// memory through the ICAP; it does not describe the port's format, which the
// vendor defines. This port stands in for it with a much smaller packet
// format of its own: a sync word, one record per LUT, an end record.
//
// Interface: clk, rst_n, ce_n, write_n, i[7:0] (ICAP side); cfg (one write
// per record, registered); in_stream (high between sync and end record).
module icap_port
  import srp_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       ce_n,
  input  logic       write_n,
  input  logic [7:0] i,
  output lut_cfg_t   cfg,
  output logic       in_stream
);

  typedef enum logic {S_HUNT, S_STREAM} state_t;

  state_t      state_q;
  logic [23:0] shreg_q;    // last three bytes received, newest in [7:0]
  logic [1:0]  nbyte_q;    // bytes of the current record taken so far
  logic        take;
  logic [31:0] word;

  assign take      = !ce_n && !write_n;
  assign word      = {shreg_q[23:0], i};
  assign in_stream = (state_q == S_STREAM);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q <= S_HUNT;
      shreg_q <= '0;
      nbyte_q <= '0;
      cfg     <= '0;
    end else begin
      cfg.we <= 1'b0;
      if (take) begin
        shreg_q <= word[23:0];
        unique case (state_q)
          S_HUNT: begin
            if (word == CFG_SYNC) begin
              state_q <= S_STREAM;
              nbyte_q <= '0;
            end
          end
          S_STREAM: begin
            nbyte_q <= nbyte_q + 2'd1;
            if (nbyte_q == 2'd3) begin
              if (word[31:16] == CFG_DESYNC) begin
                state_q <= S_HUNT;
                shreg_q <= '0;   // a new stream needs a whole new sync word
              end else begin
                cfg.we   <= 1'b1;
                cfg.addr <= word[31:16];
                cfg.tt   <= word[15:0];
              end
            end
          end
          default: state_q <= S_HUNT;
        endcase
      end
    end
  end

endmodule
