// tb_frame_decoder: feeds a small progressive raster (48 words per line, 20
// active, 10 lines, 5 active) as aligned words with TRS flags.  Checks that
// the decoder locks after one measured frame, that from then on every
// active row becomes exactly one packet equal, word by word, to a reference
// packet built from the header description (addresses, IPv4 checksum,
// lengths, video header, three pixels per word with a partial last word),
// that the last word of a row leaves within four clocks of the next EAV,
// and that a change of line length drops lock.
module tb_frame_decoder;
  import mvtp_pkg::*;
  import tb_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [19:0] vid_word; logic vid_valid, trs_start, trs_v, trs_h;
  net_hdr_cfg_t hdr_cfg;
  logic pkt_valid, locked; pkt_word_t pkt; logic [15:0] row_count;
  int checks = 0, failures = 0;

  frame_decoder #(.CH_ID(8'd3)) dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  fmt_t f = '{tw: 48, aw: 20, tl: 10, al: 5};
  logic [63:0] expq[$];
  int pkts_seen = 0, cyc = 0, last_eav = 0, words_in_pkt = 0;

  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (pkt_valid) begin
      checks++;
      if (pkt.sop) words_in_pkt = 0;
      words_in_pkt++;
      if (expq.size() == 0 || pkt.data !== expq[0] || pkt.sop !== (words_in_pkt == 1)) begin
        failures++;
        if (failures < 8) $display("word %0d got %h exp %h", words_in_pkt, pkt.data, expq.size() ? expq[0] : 64'h0);
      end
      if (expq.size()) void'(expq.pop_front());
      if (pkt.eop) begin
        pkts_seen++;
        checks++;
        if (cyc - last_eav > 4) begin failures++; $display("eop late: %0d", cyc - last_eav); end
      end
    end
  end

  task automatic drive(fmt_t g, int fr, int ln, int w);
    logic [19:0] x;
    x = raster_word(g, 3, fr, ln, w);
    @(negedge clk);
    vid_valid = 1;
    vid_word  = x;
    trs_start = (w == 0) || (w == g.tw - g.aw - 4);
    trs_h     = (w == 0);
    trs_v     = ln < g.tl - g.al;
    if (w == 0) last_eav = cyc + 1;
  endtask

  initial begin
    hdr_cfg = '{dst_mac: 48'h0A0B0C0D0E0F, src_mac: 48'h010203040506, src_ip: 32'hC0A80001,
                dst_ip: 32'hC0A80002, udp_src: 16'd4000, udp_dst: 16'd5004};
    vid_valid = 0; vid_word = 0; trs_start = 0; trs_v = 0; trs_h = 0;
    repeat (3) @(posedge clk);
    @(negedge clk); rst_n = 1;
    for (int fr = 0; fr < 5; fr++)
      for (int ln = 0; ln < f.tl; ln++) begin
        if (fr >= 2 && ln >= f.tl - f.al) begin
          logic [63:0] ws[$];
          build_row_packet(hdr_cfg, f, 3, fr, ln - (f.tl - f.al), 3, fr, ln - (f.tl - f.al), ws);
          foreach (ws[i]) expq.push_back(ws[i]);
        end
        checks++;
        if (ln == 0 && locked !== (fr >= 3)) begin failures++; $display("lock %0d in frame %0d", locked, fr); end
        for (int w = 0; w < f.tw; w++) drive(f, fr, ln, w);
      end
    // one more line closes the last packet
    for (int w = 0; w < 8; w++) drive(f, 5, 0, w);
    repeat (5) @(posedge clk);
    checks++;
    if (pkts_seen != 15 || expq.size() != 0) begin failures++; $display("packets %0d left %0d", pkts_seen, expq.size()); end
    checks++;
    if (row_count != 16'd15) begin failures++; $display("row_count %0d", row_count); end
    // line length change: lock must drop
    f.tw = 50;
    for (int ln = 0; ln < 3; ln++) for (int w = 0; w < f.tw; w++) drive(f, 5, ln, w);
    checks++;
    if (locked) begin failures++; $display("still locked after format change"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
