// tb_sdi_checker: test-bench HD-SDI sink.  Decodes the coded words with the
// bit-serial reference decoder, follows EAV/SAV, numbers the active lines
// from the top of each frame and compares every active line with the
// pixels source channel CH sends (tb_pkg::pix_y/pix_c, frame 0).  A line is
// counted good, black (no row arrived in time) or bad.
module tb_sdi_checker
  import tb_pkg::*;
#(
  parameter int CH = 0, parameter int AW = 30
) (
  input  logic        clk,
  input  logic        en,
  input  logic [19:0] word,
  output int          good,
  output int          black,
  output int          bad
);
  sdi_dec dec = new();
  logic [19:0] h0, h1, h2;
  int aidx = 0, cap = -1, ok_cnt, blk_cnt;
  bit last_v = 1;
  initial begin good = 0; black = 0; bad = 0; h0 = 0; h1 = 0; h2 = 0; end
  always @(posedge clk) begin
    logic [19:0] d;
    d = dec.step(word);
    if (cap >= 0) begin
      if (d == {pix_y(CH, 0, aidx, cap), pix_c(CH, 0, aidx, cap)}) ok_cnt++;
      if (d == {10'h040, 10'h200}) blk_cnt++;
      cap++;
      if (cap == AW) begin
        if (en) begin
          if (ok_cnt == AW) good++;
          else if (blk_cnt == AW) black++;
          else begin
            bad++;
            if (bad < 4) $display("ch %0d line %0d: %0d of %0d words right", CH, aidx, ok_cnt, AW);
          end
        end
        cap = -1;
      end
    end
    if (h2 == 20'hFFFFF && h1 == 0 && h0 == 0 && d[19:10] == d[9:0] && d[19]) begin
      bit v, h;
      v = d[7]; h = d[6];
      if (h) begin
        if (!v) aidx = last_v ? 0 : aidx + 1;
        last_v = v;
      end else if (!v) begin
        cap = 0; ok_cnt = 0; blk_cnt = 0;
      end
    end
    h2 = h1; h1 = h0; h0 = d;
  end
endmodule
