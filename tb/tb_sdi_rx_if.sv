// tb_sdi_rx_if: a small raster is coded by the bit-serial reference encoder,
// shifted by a random number of bits (as an unaligned deserialiser would
// deliver it) and fed to the receiver.  Checks that alignment is found, that
// every aligned word equals the transmitted word five clocks later, and that
// trs_start with F/V/H is flagged on exactly the first word of each TRS.
module tb_sdi_rx_if;
  import tb_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [19:0] rx_word, vid_word;
  logic vid_valid, trs_start, trs_f, trs_v, trs_h, aligned;
  int checks = 0, failures = 0;

  sdi_rx_if dut (.clk, .rst_n, .rx_word, .vid_word, .vid_valid, .trs_start,
                 .trs_f, .trs_v, .trs_h, .aligned);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  fmt_t f = '{tw: 40, aw: 20, tl: 8, al: 4};
  logic [19:0] sent[$];
  int slip;

  initial begin
    sdi_enc enc = new();
    logic [39:0] sr;
    int n, ok_words, trs_seen;
    slip = 1 + $urandom_range(0, 18);
    rx_word = 0;
    sr = 0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    n = 0; ok_words = 0; trs_seen = 0;
    for (int fr = 0; fr < 3; fr++)
      for (int ln = 0; ln < f.tl; ln++)
        for (int w = 0; w < f.tw; w++) begin
          logic [19:0] tw;
          @(negedge clk);
          tw = raster_word(f, 0, fr, ln, w);
          sent.push_back(tw);
          sr = {enc.step(tw), sr[39:20]};
          rx_word = sr[slip +: 20];
          @(posedge clk);
          #1;
          n++;
          // check output against the word sent 'lat' clocks ago
          if (aligned && vid_valid && n > 60) begin
            int idx;
            idx = n - 1 - 5;
            checks++;
            if (idx < 0 || vid_word !== sent[idx]) begin
              failures++;
              if (failures < 6) $display("word %0d: got %h exp %h", n, vid_word,
                                         idx >= 0 ? sent[idx] : 20'h0);
            end else ok_words++;
            if (idx >= 0) begin
              bit is_trs;
              int wp, lp;
              wp = idx % f.tw;
              lp = (idx / f.tw) % f.tl;
              is_trs = (wp == 0) || (wp == f.tw - f.aw - 4);
              checks++;
              if (trs_start !== is_trs) begin
                failures++;
                if (failures < 6) $display("trs flag at %0d wrong", idx);
              end
              if (is_trs) begin
                trs_seen++;
                checks++;
                if (trs_h !== (wp == 0) || trs_v !== (lp < f.tl - f.al) || trs_f !== 1'b0)
                  failures++;
              end
            end
          end
        end
    checks++;
    if (!aligned || ok_words < 500 || trs_seen < 20) begin
      failures++;
      $display("aligned=%0d ok_words=%0d trs_seen=%0d", aligned, ok_words, trs_seen);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
