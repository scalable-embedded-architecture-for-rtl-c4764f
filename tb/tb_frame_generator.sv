// tb_frame_generator: a FIFO model holds row packets (built by the reference
// packet builder) for two frames of a small raster, with one row missing, one
// stale duplicate row and some junk before the first line-0 row.  Checks
// that the raster starts start_delay lines before the first active line,
// that every output word of the two frames (TRS, blanking, pixels) equals
// the reference raster, that the missing row is sent black, and that the
// late and missing rows are counted.
module tb_frame_generator;
  import mvtp_pkg::*;
  import tb_pkg::*;
  logic clk = 0, rst_n = 0;
  logic rd_valid, rd_ready; pkt_word_t rd_data;
  logic [7:0] start_delay;
  logic [19:0] vid_word; logic running; logic [15:0] late_count, miss_count, row_count;
  int checks = 0, failures = 0;

  frame_generator dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  fmt_t f = '{tw: 48, aw: 20, tl: 10, al: 5};
  net_hdr_cfg_t cfg = '{dst_mac: 1, src_mac: 2, src_ip: 3, dst_ip: 4, udp_src: 5, udp_dst: 6};
  pkt_word_t q[$];

  // FIFO model: first-word-fall-through
  always_comb begin
    rd_valid = q.size() != 0;
    rd_data  = rd_valid ? q[0] : '0;
  end
  always @(posedge clk) if (rst_n && rd_valid && rd_ready) void'(q.pop_front());

  task automatic push_row(int fr, int ln);
    logic [63:0] ws[$];
    build_row_packet(cfg, f, 0, fr, ln, 0, fr, ln, ws);
    foreach (ws[i]) q.push_back('{sop: i == 0, eop: i == ws.size() - 1, empty: 0, data: ws[i]});
  endtask

  initial begin
    start_delay = 2;
    repeat (3) @(posedge clk);
    // junk before lock: a row that is not line 0 and a stray word
    push_row(6, 3);
    q.push_back('{sop: 0, eop: 1, empty: 0, data: 64'h1234});
    for (int l = 0; l < 5; l++) push_row(7, l);
    push_row(7, 1);                            // stale duplicate: late
    for (int l = 0; l < 5; l++) if (l != 2) push_row(8, l);   // line 2 missing
    @(negedge clk); rst_n = 1;
    wait (running);
    @(posedge clk);
    for (int fr = 7; fr <= 8; fr++)
      for (int ln = (fr == 7) ? 3 : 0; ln < f.tl; ln++)
        for (int w = 0; w < f.tw; w++) begin
          logic [19:0] e;
          #1;
          e = raster_word(f, 0, fr, ln, w);
          if (fr == 8 && ln == 7 && w >= f.tw - f.aw) e = {10'h040, 10'h200};
          checks++;
          if (vid_word !== e) begin
            failures++;
            if (failures < 8) $display("frame %0d line %0d word %0d: got %h exp %h", fr, ln, w, vid_word, e);
          end
          @(posedge clk);
        end
    checks++;
    if (late_count != 16'd1 || miss_count != 16'd1 || row_count != 16'd9) begin
      failures++; $display("late %0d miss %0d rows %0d", late_count, miss_count, row_count);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
