// sdi_tx_if: HD-SDI video output interface, channel coding side.
//
// Each clock takes one 20-bit {Y[9:0], C[9:0]} word and produces the 20 bits
// the transceiver serialises, bit 0 first (chroma before luma, LSB first).
// The bits are scrambled with G1(x) = x^9 + x^4 + 1 and NRZI coded with
// G2(x) = x + 1, the SMPTE 292 channel coding.  The document only names the
// video output interface; the coding is the standard HD-SDI one, chosen here.
// Latency: one clock (registered output).
module sdi_tx_if
  import mvtp_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic [SDI_W-1:0] vid_word,
  output logic [SDI_W-1:0] tx_word
);
  logic [8:0] scr_q, scr_d;    // last 9 scrambled bits, [0] newest
  logic       nrzi_q, nrzi_d;  // last line bit
  logic [SDI_W-1:0] word_d;

  // one 20-bit step of the coder: returns {scrambler state, NRZI bit, word}
  function automatic logic [29:0] code_step(input logic [SDI_W-1:0] w,
                                            input logic [8:0] scr_in, input logic nrzi_in);
    logic [SDI_W-1:0] o;
    logic             b;
    logic [8:0]       scr;
    logic             nrzi;
    scr  = scr_in;
    nrzi = nrzi_in;
    for (int i = 0; i < SDI_W; i++) begin
      b    = w[i] ^ scr[3] ^ scr[8];
      scr  = {scr[7:0], b};
      nrzi = nrzi ^ b;
      o[i] = nrzi;
    end
    return {scr, nrzi, o};
  endfunction

  assign {scr_d, nrzi_d, word_d} = code_step(vid_word, scr_q, nrzi_q);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      scr_q   <= '0;
      nrzi_q  <= 1'b0;
      tx_word <= '0;
    end else begin
      scr_q   <= scr_d;
      nrzi_q  <= nrzi_d;
      tx_word <= word_d;
    end
  end
endmodule
