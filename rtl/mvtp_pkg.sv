// mvtp_pkg: types and constants shared by the video transfer design.
//
// Packet streams in the network clock domain are 64 bits wide (one word per
// clock, valid/ready handshake).  A pkt_word_t carries start/end of packet
// markers and, on the last word, the number of unused trailing bytes.  Byte 0
// of a packet is data[63:56] (network byte order).
//
// Video row packet layout (this design's own format; 8-byte words):
//   word 0..4  Ethernet II (0x0800), IPv4 (proto 17), UDP header
//   word 5     UDP checksum (0) | channel | frame | line | active lines
//   word 6     total lines | total words per line | active words per line | 0
//   word 7..   payload, three 20-bit {Y,C} pairs per word in bits 59:0,
//              first pair in bits 59:40
// HD-SDI words are 20 bits, {Y[9:0], C[9:0]}.
package mvtp_pkg;

  localparam int DW        = 64;   // network datapath width
  localparam int HDR_WORDS = 7;    // header words before the row payload
  localparam int SDI_W     = 20;   // HD-SDI parallel word width

  typedef struct packed {
    logic        sop;
    logic        eop;
    logic [2:0]  empty;   // unused bytes in the eop word
    logic [63:0] data;
  } pkt_word_t;

  // Processing core configurations (Fig. 4 interconnect)
  typedef enum logic [1:0] {
    MODE_NET_NET = 2'd0,   // net in -> PM2 -> PM1 -> net out
    MODE_DUPLEX  = 2'd1,   // net in -> PM2 -> video out ; video in -> PM1 -> net out
    MODE_VID_VID = 2'd2    // video in -> PM2 -> PM1 -> video out
  } core_mode_e;

  // Addresses written into the headers of outgoing video packets
  typedef struct packed {
    logic [47:0] dst_mac;
    logic [47:0] src_mac;
    logic [31:0] src_ip;
    logic [31:0] dst_ip;
    logic [15:0] udp_src;
    logic [15:0] udp_dst;
  } net_hdr_cfg_t;

  // Classifier rule: all enabled terms must match
  typedef struct packed {
    logic [2:0]  idx;     // packet word index the term looks at
    logic [63:0] mask;    // mask 0 = term always matches
    logic [63:0] value;
  } rule_term_t;

  localparam int N_TERMS = 3;

  typedef struct packed {
    logic                   en;
    logic                   to_vpm;
    logic                   to_rx;
    rule_term_t [N_TERMS-1:0] term;
  } rule_t;

  // Video header fields (words 5 and 6)
  typedef struct packed {
    logic [7:0]  channel;
    logic [7:0]  frame;
    logic [15:0] line;          // active line index, 0 = first active line
    logic [15:0] active_lines;
    logic [15:0] total_lines;
    logic [15:0] total_words;   // words per line, EAV to EAV
    logic [15:0] active_words;  // active {Y,C} words per line
  } vid_hdr_t;

  // Blanking levels and TRS
  localparam logic [9:0] Y_BLANK = 10'h040;
  localparam logic [9:0] C_BLANK = 10'h200;

  // XYZ word of a TRS: 1 F V H P3 P2 P1 P0 0 0
  function automatic logic [9:0] trs_xyz(input logic f, input logic v, input logic h);
    return {1'b1, f, v, h, v ^ h, f ^ h, f ^ v, f ^ v ^ h, 2'b00};
  endfunction

  // Payload words needed for a row of n {Y,C} words
  function automatic logic [15:0] payload_words(input logic [15:0] n);
    return 16'((32'(n) + 32'd2) / 32'd3);
  endfunction

  // One's-complement 16-bit sum for the IPv4 header checksum
  function automatic logic [15:0] ip_checksum(input logic [15:0] total_len,
                                              input logic [31:0] src_ip,
                                              input logic [31:0] dst_ip);
    logic [31:0] s;
    s = 32'h4500 + 32'(total_len) + 32'h0000 + 32'h4000 + 32'h4011
      + 32'(src_ip[31:16]) + 32'(src_ip[15:0]) + 32'(dst_ip[31:16]) + 32'(dst_ip[15:0]);
    s = 32'(s[15:0]) + 32'(s[31:16]);
    s = 32'(s[15:0]) + 32'(s[31:16]);
    return ~s[15:0];
  endfunction

  // Header word i (0..6) of a video row packet
  function automatic logic [63:0] hdr_word(input int unsigned i, input net_hdr_cfg_t c,
                                           input vid_hdr_t h);
    logic [15:0] pw, udp_len, ip_len;
    pw      = payload_words(h.active_words);
    udp_len = 16'(32'd22 + 32'(pw) * 32'd8);
    ip_len  = 16'(32'd20 + 32'(udp_len));
    case (i)
      0: return {c.dst_mac, c.src_mac[47:32]};
      1: return {c.src_mac[31:0], 16'h0800, 8'h45, 8'h00};
      2: return {ip_len, 16'h0000, 16'h4000, 8'h40, 8'h11};
      3: return {ip_checksum(ip_len, c.src_ip, c.dst_ip), c.src_ip, c.dst_ip[31:16]};
      4: return {c.dst_ip[15:0], c.udp_src, c.udp_dst, udp_len};
      5: return {16'h0000, h.channel, h.frame, h.line, h.active_lines};
      default: return {h.total_lines, h.total_words, h.active_words, 16'h0000};
    endcase
  endfunction

  function automatic vid_hdr_t parse_hdr(input logic [63:0] w5, input logic [63:0] w6);
    vid_hdr_t h;
    h.channel      = w5[47:40];
    h.frame        = w5[39:32];
    h.line         = w5[31:16];
    h.active_lines = w5[15:0];
    h.total_lines  = w6[63:48];
    h.total_words  = w6[47:32];
    h.active_words = w6[31:16];
    return h;
  endfunction

endpackage
