// atm_tb_pkg: reference models shared by the testbenches.
//
// The CRCs are computed by plain polynomial long division over a bit list,
// written separately from the design's shift-register form, and cells are
// assembled field by field from the standard ATM / AAL 3/4 layouts:
//   header  GFC(4)=0 VPI(8)=0 VCI(16) PT(3) CLP(1)=0, HEC = CRC-8 ^ 0x55
//   Class 4 ST(2) SN(4) MID(10) | 44 bytes | LI(6) CRC-10(10)
//   other   48 bytes
package atm_tb_pkg;

  typedef byte unsigned cell_t [53];

  // remainder of (msg * x^deg) / poly; poly given without its x^deg term
  function automatic int unsigned polymod(bit msg[$], int deg, int unsigned poly);
    bit r[$];
    int unsigned res;
    r = msg;
    for (int i = 0; i < deg; i++) r.push_back(1'b0);
    for (int i = 0; i + deg < r.size(); i++) begin
      if (r[i]) begin
        // subtract x^deg + poly aligned at i
        for (int k = 1; k <= deg; k++)
          r[i + k] = r[i + k] ^ poly[deg - k];
        r[i] = 1'b0;
      end
    end
    res = 0;
    for (int k = 0; k < deg; k++) res = (res << 1) | int'(r[r.size() - deg + k]);
    return res;
  endfunction

  function automatic void push_byte(ref bit q[$], input byte unsigned b, input int nbits = 8);
    for (int i = 7; i >= 8 - nbits; i--) q.push_back(b[i]);
  endfunction

  function automatic byte unsigned ref_hec(byte unsigned h0, h1, h2, h3);
    bit q[$];
    push_byte(q, h0); push_byte(q, h1); push_byte(q, h2); push_byte(q, h3);
    return byte'(polymod(q, 8, 'h07)) ^ 8'h55;
  endfunction

  // CRC-10 over SAR header + payload (46 bytes) and the 6 LI bits
  function automatic int unsigned ref_crc10(byte unsigned sar[46], int unsigned li);
    bit q[$];
    foreach (sar[i]) push_byte(q, sar[i]);
    for (int i = 5; i >= 0; i--) q.push_back(li[i]);
    return polymod(q, 10, 'h233);
  endfunction

  // remainder over a whole received 48-byte SAR-PDU (0 when intact)
  function automatic int unsigned ref_crc10_check(cell_t c);
    bit q[$];
    bit z[$];
    int unsigned rem;
    for (int i = 5; i < 53; i++) push_byte(q, c[i]);
    // remainder of msg itself: divide msg, without the x^10 shift
    z = q;
    rem = polymod(z, 10, 'h233);
    return rem;
  endfunction

  function automatic cell_t build_cell(int unsigned vci, bit pt_last, bit class4,
                                       int unsigned st, int unsigned sn, int unsigned mid,
                                       byte unsigned pay[], int unsigned li);
    cell_t c;
    byte unsigned sar[46];
    int unsigned crc;
    c[0] = 8'h00;
    c[1] = {4'h0, vci[15:12]};
    c[2] = vci[11:4];
    c[3] = {vci[3:0], 2'b00, pt_last, 1'b0};
    c[4] = ref_hec(c[0], c[1], c[2], c[3]);
    if (class4) begin
      c[5] = {st[1:0], sn[3:0], mid[9:8]};
      c[6] = mid[7:0];
      for (int i = 0; i < 44; i++) c[7 + i] = (i < pay.size()) ? pay[i] : 8'h00;
      for (int i = 0; i < 46; i++) sar[i] = c[5 + i];
      crc = ref_crc10(sar, li);
      c[51] = {li[5:0], crc[9:8]};
      c[52] = crc[7:0];
    end else begin
      for (int i = 0; i < 48; i++) c[5 + i] = (i < pay.size()) ? pay[i] : 8'h00;
    end
    return c;
  endfunction

endpackage
