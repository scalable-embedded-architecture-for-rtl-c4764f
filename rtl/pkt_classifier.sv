// pkt_classifier: sorts received packets between the video processing
// modules (VPM) and the CPU's RX FIFO using a small rule memory.
//
// Each of N_RULES rules has up to N_TERMS terms (word index, 64-bit mask,
// value); a rule matches when it is enabled and, for every term, the packet
// word at that index masked equals the value (mask 0: term always true).  A
// rule carries two destination flags, to_vpm and to_rx; the packet goes to
// the OR of the flags of all matching rules, and is discarded if none match.
// Example rules (written by software): UDP video = EtherType 0800 in word 1,
// protocol 17 in word 2, UDP destination port in word 4; ARP = EtherType
// 0806; ICMP = EtherType 0800 and protocol 1.
//
// Words enter an 8-word buffer while the terms are evaluated; the decision
// is queued when word 4 (or an earlier eop) has been accepted, and words
// leave the buffer only when the decision for their packet is known.  A
// packet sent to both destinations waits until both are ready.  Latency is
// five words at the start of a packet; throughput is one word per clock.
// Four rules with VPM/RX flags follow the document; the rule encoding,
// the OR of flags and the buffering are this design's.
module pkt_classifier
  import mvtp_pkg::*;
#(
  parameter int N_RULES = 4
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  rule_t [N_RULES-1:0]  rules,

  input  logic      in_valid,
  input  pkt_word_t in_data,
  output logic      in_ready,

  output logic      vpm_valid,
  output pkt_word_t vpm_data,
  input  logic      vpm_ready,
  output logic      rx_valid,
  output pkt_word_t rx_data,
  input  logic      rx_ready,
  output logic [15:0] drop_count
);
  // ---------------- input side: term evaluation ----------------
  logic [2:0] widx;                         // word index in packet (saturates)
  logic [N_RULES-1:0][N_TERMS-1:0] hit_q, hit_now;
  logic       decided;                      // decision already queued
  logic       acc_in;

  // data buffer
  pkt_word_t  dbuf [8];
  logic [3:0] dw, dr;
  // decision queue: {to_vpm, to_rx}
  logic [1:0] qbuf [4];
  logic [2:0] qw, qr;

  logic dfull, qfull;
  assign dfull    = (dw - dr) == 4'd8;
  assign qfull    = (qw - qr) == 3'd4;
  assign in_ready = !dfull && !qfull;
  assign acc_in   = in_valid && in_ready;

  logic [2:0] cur_idx;
  assign cur_idx = in_data.sop ? 3'd0 : widx;

  // terms true so far in this packet, including the word now entering
  always_comb begin
    for (int r = 0; r < N_RULES; r++)
      for (int t = 0; t < N_TERMS; t++) begin
        hit_now[r][t] = (in_data.sop ? (rules[r].term[t].mask == '0) : hit_q[r][t]) ||
          (rules[r].term[t].idx == cur_idx &&
           (in_data.data & rules[r].term[t].mask) == rules[r].term[t].value);
      end
  end

  logic [1:0] dec_now;
  always_comb begin
    dec_now = '0;
    for (int r = 0; r < N_RULES; r++)
      if (rules[r].en && &hit_now[r])
        dec_now = dec_now | {rules[r].to_vpm, rules[r].to_rx};
  end

  logic decide;
  assign decide = acc_in && (in_data.sop ? 1'b1 : !decided) &&
                  (cur_idx == 3'd4 || in_data.eop);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      widx <= '0; hit_q <= '0; decided <= 1'b0; dw <= '0; qw <= '0;
    end else if (acc_in) begin
      dw    <= dw + 4'd1;
      hit_q <= hit_now;
      widx  <= (cur_idx == 3'd7) ? 3'd7 : cur_idx + 3'd1;
      if (in_data.sop) decided <= 1'b0;
      if (decide) begin
        qw      <= qw + 3'd1;
        decided <= 1'b1;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (acc_in) dbuf[dw[2:0]] <= in_data;
    if (decide) qbuf[qw[1:0]] <= dec_now;
  end

  // ---------------- output side ----------------
  logic      head_ok;
  logic [1:0] dest;
  pkt_word_t head;
  logic      pop;

  assign head_ok = (dw != dr) && (qw != qr);
  assign head    = dbuf[dr[2:0]];
  assign dest    = qbuf[qr[1:0]];

  always_comb begin
    vpm_valid = head_ok && dest[1] && (!dest[0] || rx_ready);
    rx_valid  = head_ok && dest[0] && (!dest[1] || vpm_ready);
    vpm_data  = head;
    rx_data   = head;
    pop       = head_ok && (!dest[1] || vpm_ready) && (!dest[0] || rx_ready);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dr <= '0; qr <= '0; drop_count <= '0;
    end else if (pop) begin
      dr <= dr + 4'd1;
      if (head.eop) begin
        qr <= qr + 3'd1;
        if (dest == 2'b00) drop_count <= drop_count + 16'd1;
      end
    end
  end
endmodule
