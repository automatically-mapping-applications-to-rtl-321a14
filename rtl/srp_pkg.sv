// srp_pkg: shared constants and types of the self-reconfiguring platform.
//
// The platform keeps the slowly changing parameters of a circuit (the FIR
// coefficients, the multiplexer select) out of the datapath: they are folded
// into the truth tables of tunable LUTs (TLUTs), and a processor rewrites
// those truth tables through the configuration port when a parameter changes.
// This package holds what several modules share: the LUT geometry, the
// configuration-write record that travels from the configuration port to the
// LUTs, the layout of the configuration byte stream, the LUT address map and
// the register map of the HWICAP peripheral.
//
// LUTs with four inputs follow the document. The stream format, the address
// map and the register map are this design's own choices.
package srp_pkg;

  // ---- LUT geometry --------------------------------------------------------
  localparam int unsigned LUT_K  = 4;            // regular inputs per LUT
  localparam int unsigned LUT_TT = 1 << LUT_K;   // truth-table bits per LUT

  typedef logic [LUT_TT-1:0] tt_t;

  // ---- configuration-write record -------------------------------------------
  localparam int unsigned CFG_AW = 16;           // LUT address width
  typedef logic [CFG_AW-1:0] lut_addr_t;

  typedef struct packed {
    logic      we;    // one-cycle write strobe
    lut_addr_t addr;  // which LUT
    tt_t       tt;    // its new truth table
  } lut_cfg_t;

  // ---- configuration byte stream ----------------------------------------------
  // A stream opens with the 32-bit sync word, then carries 4-byte records
  // {address[15:8], address[7:0], tt[15:8], tt[7:0]}; the record whose
  // address is CFG_DESYNC closes it. Bytes outside a stream are ignored.
  localparam logic [31:0] CFG_SYNC   = 32'hAA99_5566;
  localparam lut_addr_t   CFG_DESYNC = 16'hFFFF;

  // ---- LUT address map --------------------------------------------------------
  // Signed 8x8 tap multiplier: two 4-bit slices of the sample, each addressing
  // KCM_PW TLUTs (one per bit of its 12-bit partial product).
  localparam int unsigned KCM_PW       = 12;
  localparam int unsigned KCM_LUTS     = 2 * KCM_PW;       // 24 TLUTs per tap
  localparam int unsigned FIR_TAPS_DEF = 32;
  localparam lut_addr_t   FIR_BASE     = 16'h0000;
  localparam lut_addr_t   MUX6_BASE    = 16'h0400;          // L1 at +0, L0 at +1

  // Address of the TLUT for bit `bit_i` of slice `slice` (0 = low nibble)
  // of tap `tap`.
  function automatic lut_addr_t fir_lut_addr(int unsigned tap, int unsigned slice,
                                             int unsigned bit_i);
    return FIR_BASE + lut_addr_t'(tap * KCM_LUTS + slice * KCM_PW + bit_i);
  endfunction

  // ---- HWICAP register map (byte addresses relative to its base) --------------
  localparam int unsigned HWICAP_BUF_WORDS = 512;           // 2 KiB buffer
  localparam logic [11:0] HWICAP_REG_SIZE   = 12'h800;      // bytes to send
  localparam logic [11:0] HWICAP_REG_CTRL   = 12'h804;      // write 1: start
  localparam logic [11:0] HWICAP_REG_STATUS = 12'h808;      // bit0 busy, [31:16] sent

endpackage
