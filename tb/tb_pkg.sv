// tb_pkg: reference models shared by the testbenches.
//
// - raster_word(): the HD-SDI word at a given position of a progressive
//   raster (EAV on words 0..3 of a line, SAV on the four words before the
//   active part, active part at the end of the line, active lines at the end
//   of the frame), pixels from pix_y/pix_c, which never produce the reserved
//   codes 000h-003h and 3FCh-3FFh.
// - sdi_enc / sdi_dec: bit-serial SMPTE 292 scrambler + NRZI coder and the
//   matching decoder, written one bit at a time and independently of the
//   20-bit parallel RTL.
// - build_row_packet(): a row packet as the frame decoder should send it,
//   built byte by byte from the header description.
package tb_pkg;
  import mvtp_pkg::*;

  typedef struct {
    int tw;   // words per line
    int aw;   // active words
    int tl;   // lines per frame
    int al;   // active lines
  } fmt_t;

  function automatic logic [9:0] pix_y(int ch, int fr, int ln, int w);
    return 10'(4 + ((ch * 13 + fr * 31 + ln * 7 + w * 3) % 1016));
  endfunction
  function automatic logic [9:0] pix_c(int ch, int fr, int ln, int w);
    return 10'(4 + ((ch * 5 + fr * 3 + ln * 11 + w * 5 + 500) % 1016));
  endfunction

  function automatic logic [9:0] xyz_ref(bit f, bit v, bit h);
    logic [9:0] x;
    x[9] = 1; x[8] = f; x[7] = v; x[6] = h;
    x[5] = v ^ h; x[4] = f ^ h; x[3] = f ^ v; x[2] = f ^ v ^ h; x[1:0] = 0;
    return x;
  endfunction

  // active pixel index w (0..aw-1) of active line ln
  function automatic logic [19:0] raster_word(fmt_t f, int ch, int fr, int line, int wpos);
    bit vblank;
    int as;
    vblank = line < (f.tl - f.al);
    as = f.tw - f.aw;
    if (wpos == 0 || wpos == as - 4) return 20'hFFFFF;
    if (wpos == 1 || wpos == 2 || wpos == as - 3 || wpos == as - 2) return 20'h0;
    if (wpos == 3)      return {xyz_ref(0, vblank, 1), xyz_ref(0, vblank, 1)};
    if (wpos == as - 1) return {xyz_ref(0, vblank, 0), xyz_ref(0, vblank, 0)};
    if (!vblank && wpos >= as)
      return {pix_y(ch, fr, line - (f.tl - f.al), wpos - as),
              pix_c(ch, fr, line - (f.tl - f.al), wpos - as)};
    return {10'h040, 10'h200};
  endfunction

  class sdi_enc;
    bit sh[9];   // scrambled history, sh[0] newest
    bit nrzi;
    function logic [19:0] step(logic [19:0] w);
      logic [19:0] o;
      for (int i = 0; i < 20; i++) begin
        bit s;
        s = w[i] ^ sh[3] ^ sh[8];
        for (int j = 8; j > 0; j--) sh[j] = sh[j-1];
        sh[0] = s;
        nrzi = nrzi ^ s;
        o[i] = nrzi;
      end
      return o;
    endfunction
  endclass

  class sdi_dec;
    bit sh[9];
    bit last;
    function logic [19:0] step(logic [19:0] w);
      logic [19:0] o;
      for (int i = 0; i < 20; i++) begin
        bit s;
        s = w[i] ^ last;
        last = w[i];
        o[i] = s ^ sh[3] ^ sh[8];
        for (int j = 8; j > 0; j--) sh[j] = sh[j-1];
        sh[0] = s;
      end
      return o;
    endfunction
  endclass

  // 16-bit one's complement checksum over the 20 IPv4 header bytes
  function automatic logic [15:0] csum_ref(logic [7:0] b[], int off);
    int unsigned s = 0;
    for (int i = 0; i < 20; i += 2) s += {b[off+i], b[off+i+1]};
    while (s >> 16) s = (s & 16'hFFFF) + (s >> 16);
    return ~s[15:0];
  endfunction

  function automatic void build_row_packet(net_hdr_cfg_t c, fmt_t f, int ch, int fr8,
                                           int line, int pch, int pfr, int pline,
                                           output logic [63:0] words[$]);
    logic [7:0] b[];
    int pw, n, udp_len, ip_len;
    logic [15:0] cs;
    pw = (f.aw + 2) / 3;
    n = 56 + pw * 8;
    udp_len = n - 34;
    ip_len = n - 14;
    b = new[n];
    foreach (b[i]) b[i] = 0;
    for (int i = 0; i < 6; i++) b[i]     = c.dst_mac[47 - 8*i -: 8];
    for (int i = 0; i < 6; i++) b[6 + i] = c.src_mac[47 - 8*i -: 8];
    b[12] = 8'h08; b[13] = 8'h00;
    b[14] = 8'h45; b[15] = 0; b[16] = 8'(ip_len >> 8); b[17] = 8'(ip_len);
    b[18] = 0; b[19] = 0; b[20] = 8'h40; b[21] = 0; b[22] = 8'h40; b[23] = 8'h11;
    for (int i = 0; i < 4; i++) b[26 + i] = c.src_ip[31 - 8*i -: 8];
    for (int i = 0; i < 4; i++) b[30 + i] = c.dst_ip[31 - 8*i -: 8];
    cs = csum_ref(b, 14);
    b[24] = cs[15:8]; b[25] = cs[7:0];
    b[34] = c.udp_src[15:8]; b[35] = c.udp_src[7:0];
    b[36] = c.udp_dst[15:8]; b[37] = c.udp_dst[7:0];
    b[38] = 8'(udp_len >> 8); b[39] = 8'(udp_len);
    b[42] = 8'(ch); b[43] = 8'(fr8);
    b[44] = 8'(line >> 8); b[45] = 8'(line);
    b[46] = 8'(f.al >> 8); b[47] = 8'(f.al);
    b[48] = 8'(f.tl >> 8); b[49] = 8'(f.tl);
    b[50] = 8'(f.tw >> 8); b[51] = 8'(f.tw);
    b[52] = 8'(f.aw >> 8); b[53] = 8'(f.aw);
    words.delete();
    for (int i = 0; i < 7; i++) begin
      logic [63:0] w;
      for (int j = 0; j < 8; j++) w[63 - 8*j -: 8] = b[8*i + j];
      words.push_back(w);
    end
    for (int i = 0; i < pw; i++) begin
      logic [63:0] w;
      w = 0;
      for (int k = 0; k < 3; k++)
        if (3*i + k < f.aw)
          w[59 - 20*k -: 20] = {pix_y(pch, pfr, pline, 3*i + k), pix_c(pch, pfr, pline, 3*i + k)};
      words.push_back(w);
    end
  endfunction
endpackage
