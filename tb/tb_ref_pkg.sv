// tb_ref_pkg: reference models for the testbenches, written independently
// of the RTL. CRC-32 uses a 256-entry table built from the polynomial; the
// delimiter CRC-8 is computed by long division of the message polynomial
// (first 8 bits inverted for the all-ones preset) times x^8 by
// x^8 + x^2 + x + 1. Frame builders append FCS, delimiters and padding.
package tb_ref_pkg;
  typedef byte unsigned bq_t[$];

  function automatic logic [31:0] crc32_ref(bq_t d);
    logic [31:0] tbl [256];
    logic [31:0] c;
    for (int n = 0; n < 256; n++) begin
      c = 32'(n);
      for (int k = 0; k < 8; k++) c = c[0] ? (32'hEDB88320 ^ (c >> 1)) : (c >> 1);
      tbl[n] = c;
    end
    c = 32'hFFFFFFFF;
    foreach (d[i]) c = tbl[(c ^ 32'(d[i])) & 32'hFF] ^ (c >> 8);
    return ~c;
  endfunction

  // long division: message bit B0 is the highest-order coefficient
  function automatic logic [7:0] crc8_ref(logic [15:0] b);
    logic [23:0] m;
    logic [7:0] rem;
    for (int i = 0; i < 16; i++) m[23-i] = b[i] ^ (i < 8);
    m[7:0] = 8'h00;
    for (int i = 23; i >= 8; i--)
      if (m[i]) m[i -: 9] = m[i -: 9] ^ 9'h107;
    rem = ~m[7:0];
    // highest-order remainder coefficient goes into delimiter bit B16
    return {rem[0], rem[1], rem[2], rem[3], rem[4], rem[5], rem[6], rem[7]};
  endfunction

  function automatic bq_t add_fcs(bq_t f);
    logic [31:0] c = crc32_ref(f);
    bq_t r = f;
    for (int i = 0; i < 4; i++) r.push_back(c[8*i +: 8]);
    return r;
  endfunction

  function automatic bq_t delim(int unsigned len);
    logic [15:0] b;
    bq_t r;
    b = {len[11:0], len[13:12], 2'b00};
    r.push_back(b[7:0]); r.push_back(b[15:8]); r.push_back(crc8_ref(b)); r.push_back(8'h4E);
    return r;
  endfunction

  // frames are MPDUs without FCS; result is the A-MPDU PSDU
  function automatic bq_t ampdu(bq_t frames[$]);
    bq_t r, m;
    foreach (frames[k]) begin
      m = add_fcs(frames[k]);
      r = {r, delim(m.size()), m};
      if (k != frames.size() - 1) while (m.size() % 4 != 0) begin r.push_back(8'h00); m.push_back(8'h00); end
    end
    return r;
  endfunction

  // MAC header builder: type/subtype, retry, duration, addr1, addr2, seq
  function automatic bq_t mk_frame(logic [1:0] ftype, logic [3:0] sub, bit retry,
                                   logic [15:0] dur, logic [47:0] a1, logic [47:0] a2,
                                   logic [15:0] seq, int unsigned body);
    bq_t r;
    r.push_back({sub, ftype, 2'b00}); r.push_back({4'b0, retry, 3'b0});
    r.push_back(dur[7:0]); r.push_back(dur[15:8]);
    for (int i = 0; i < 6; i++) r.push_back(a1[8*i +: 8]);
    if (ftype == 2'd1 && (sub == 4'hD || sub == 4'hC)) return r;
    for (int i = 0; i < 6; i++) r.push_back(a2[8*i +: 8]);
    if (ftype == 2'd1) return r;
    for (int i = 0; i < 6; i++) r.push_back(8'h33);
    r.push_back(seq[7:0]); r.push_back(seq[15:8]);
    for (int unsigned i = 0; i < body; i++) r.push_back(8'(i * 7 + 1));
    return r;
  endfunction
endpackage
