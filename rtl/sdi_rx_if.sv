// sdi_rx_if: HD-SDI video input interface, channel decoding side.
//
// Takes the 20 raw bits per clock delivered by the transceiver (bit 0 first
// on the line), undoes NRZI (x + 1) and the self-synchronising scrambler
// (x^9 + x^4 + 1) of SMPTE 292, and finds the word boundary: the TRS preamble
// 3FF 3FF 000 000 000 000 (20 ones then 40 zeros on the line) is searched at
// all 20 bit offsets of a 100-bit history, and the offset where it appears
// becomes the word boundary.  Four aligned words are visible at once, so a
// TRS is flagged on its first word (trs_start) together with the F, V and H
// bits of its XYZ word.
//
// Output: vid_word = {Y[9:0], C[9:0]} with vid_valid once aligned.  Latency
// from rx_word to vid_word is five clocks.  The document only says that this
// interface handles the low layer of the HD-SDI link; the coding and the
// alignment scheme are the standard HD-SDI ones, chosen here.
module sdi_rx_if
  import mvtp_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic [SDI_W-1:0] rx_word,
  output logic [SDI_W-1:0] vid_word,
  output logic             vid_valid,
  output logic             trs_start,
  output logic             trs_f,
  output logic             trs_v,
  output logic             trs_h,
  output logic             aligned
);
  // ---------------- NRZI decode and descramble ----------------
  logic [8:0]       s_q, s_d;       // last 9 NRZI-decoded bits, [0] newest
  logic             y_q, y_d;       // last line bit
  logic [SDI_W-1:0] desc_d;

  // one 20-bit step of the decoder: returns {descrambler state, last bit, word}
  function automatic logic [29:0] decode_step(input logic [SDI_W-1:0] w,
                                              input logic [8:0] sh, input logic last);
    logic [SDI_W-1:0] o;
    logic             b;
    for (int i = 0; i < SDI_W; i++) begin
      b    = w[i] ^ last;
      last = w[i];
      o[i] = b ^ sh[3] ^ sh[8];
      sh   = {sh[7:0], b};
    end
    return {sh, last, o};
  endfunction

  assign {s_d, y_d, desc_d} = decode_step(rx_word, s_q, y_q);

  // ---------------- history and alignment ----------------
  // hist[0] is the oldest bit, hist[99] the newest
  logic [99:0] hist;
  logic [4:0]  off;
  logic        found;
  logic [4:0]  found_k;

  always_comb begin
    found   = 1'b0;
    found_k = '0;
    for (int k = 0; k < SDI_W; k++) begin
      if (!found && (hist[k +: 20] == 20'hFFFFF) && (hist[k + 20 +: 40] == 40'd0)) begin
        found   = 1'b1;
        found_k = 5'(k);
      end
    end
  end

  logic [SDI_W-1:0] w0, w3;
  logic [4:0]       use_off;
  assign use_off = found ? found_k : off;
  assign w0 = hist[7'(use_off) +: 20];
  assign w3 = hist[7'(use_off) + 7'd60 +: 20];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s_q       <= '0;
      y_q       <= 1'b0;
      hist      <= '0;
      off       <= '0;
      aligned   <= 1'b0;
      vid_word  <= '0;
      vid_valid <= 1'b0;
      trs_start <= 1'b0;
      trs_f     <= 1'b0;
      trs_v     <= 1'b0;
      trs_h     <= 1'b0;
    end else begin
      s_q  <= s_d;
      y_q  <= y_d;
      hist <= {desc_d, hist[99:20]};
      if (found) begin
        off     <= found_k;
        aligned <= 1'b1;
      end
      vid_word  <= w0;
      vid_valid <= aligned || found;
      trs_start <= found;
      trs_f     <= w3[8];
      trs_v     <= w3[7];
      trs_h     <= w3[6];
    end
  end
endmodule
