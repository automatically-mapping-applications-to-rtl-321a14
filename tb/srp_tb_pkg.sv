// srp_tb_pkg: what the testbenches share. It plays the part of the software
// on the configuration controller: the tuning functions that turn parameter
// values (a tap coefficient, a multiplexer select) into TLUT truth tables,
// and the packing of truth tables into a configuration stream. It also holds
// the plain reference functions the outputs are checked against.
package srp_tb_pkg;
  import srp_pkg::*;

  typedef struct {
    lut_addr_t addr;
    tt_t       tt;
  } lut_write_t;

  // ---- tuning functions of the tap multiplier ----------------------------------
  // Truth table of TLUT `bit_i` of slice `slice`: entry n is bit bit_i of the
  // 12-bit product v*c, v = n (low slice) or n as a signed 4-bit value (high).
  function automatic tt_t kcm_tt(logic signed [7:0] c, int slice, int bit_i);
    tt_t t;
    for (int n = 0; n < 16; n++) begin
      int v = (slice == 1 && n >= 8) ? n - 16 : n;
      int prod = v * int'(c);
      t[n] = prod[bit_i];
    end
    return t;
  endfunction

  // ---- tuning functions of the 6:1 multiplexer ------------------------------------
  // Entry r of each TLUT as a Boolean function of the selects (the table of
  // the worked example, row r top to bottom).
  function automatic tt_t mux6_tt_l1(logic [2:0] s);
    logic s0, s1;
    tt_t  t;
    s0 = s[0]; s1 = s[1];
    t[0]  = 1'b1;
    t[1]  = !s1 || s0;
    t[2]  = s1 || !s0;
    t[3]  = (!s1 && !s0) || (s1 && s0);
    t[4]  = s1 || s0;
    t[5]  = s0;
    t[6]  = s1;
    t[7]  = s1 && s0;
    t[8]  = !s1 || !s0;
    t[9]  = !s1;
    t[10] = !s0;
    t[11] = !s1 && !s0;
    t[12] = (s1 && !s0) || (!s1 && s0);
    t[13] = !s1 && s0;
    t[14] = s1 && !s0;
    t[15] = 1'b0;
    return t;
  endfunction

  function automatic tt_t mux6_tt_l0(logic [2:0] s);
    logic s0, s1, s2;
    tt_t  t;
    s0 = s[0]; s1 = s[1]; s2 = s[2];
    for (int h = 0; h < 16; h += 8) begin
      t[h+0] = !s2;
      t[h+1] = s1 || s0 || !s2;
      t[h+2] = (!s1 && !s0) || !s2;
      t[h+3] = 1'b1;
      t[h+4] = 1'b0;
      t[h+5] = (s1 && s2) || (s0 && s2);
      t[h+6] = !s1 && !s0 && s2;
      t[h+7] = s2;
    end
    return t;
  endfunction

  // 6:1 multiplexer: O = I[S] for S = 0..5; S = 6, 7 pick I5.
  function automatic logic mux6_ref(logic [5:0] i, logic [2:0] s);
    return (s <= 3'd5) ? i[s] : i[5];
  endfunction

  // ---- configuration stream ----------------------------------------------------------
  function automatic void push_word(ref logic [7:0] q[$], input logic [31:0] w);
    q.push_back(w[31:24]); q.push_back(w[23:16]);
    q.push_back(w[15:8]);  q.push_back(w[7:0]);
  endfunction

  // One stream: sync word, one record per write, end record.
  function automatic void build_stream(ref logic [7:0] q[$], const ref lut_write_t w[$]);
    push_word(q, CFG_SYNC);
    foreach (w[k]) push_word(q, {w[k].addr, w[k].tt});
    push_word(q, {CFG_DESYNC, 16'h0000});
  endfunction

  // All truth tables of a tap for coefficient c.
  function automatic void tap_writes(ref lut_write_t w[$], input int tap,
                                       input logic signed [7:0] c);
    for (int s = 0; s < 2; s++)
      for (int b = 0; b < KCM_PW; b++)
        w.push_back('{addr: fir_lut_addr(tap, s, b), tt: kcm_tt(c, s, b)});
  endfunction

endpackage
