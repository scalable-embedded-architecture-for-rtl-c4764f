// tb_sdi_source: test-bench HD-SDI source.  Produces the coded 20-bit words
// of a progressive raster (tb_pkg::raster_word, pixels independent of the
// frame number) for channel CH, one word per clock, through the bit-serial
// reference coder.  'frames' counts completed frames.
module tb_sdi_source
  import tb_pkg::*;
#(
  parameter int CH = 0,
  parameter int TW = 64, parameter int AW = 30, parameter int TL = 12, parameter int AL = 6
) (
  input  logic        clk,
  output logic [19:0] word,
  output int          frames
);
  sdi_enc enc = new();
  fmt_t f = '{tw: TW, aw: AW, tl: TL, al: AL};
  int ln = 0, w = 0;
  initial begin word = 0; frames = 0; end
  always @(posedge clk) begin
    word <= enc.step(raster_word(f, CH, 0, ln, w));
    if (w == TW - 1) begin
      w = 0;
      if (ln == TL - 1) begin ln = 0; frames++; end else ln++;
    end else w++;
  end
endmodule
