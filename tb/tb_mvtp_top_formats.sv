// tb_mvtp_top_formats: the Table I video formats through the top level at
// its default parameters, all at once: eight channels in video-to-video
// mode carrying four different rasters, two channels each,
//   ch 0,1  720p60  1650 x 750 words/lines, 1280 x 720 active
//   ch 2,3  720p50  1980 x 750,             1280 x 720 active
//   ch 4,5  2K/24   2750 x 1125,            2048 x 1080 active
//   ch 6,7  1080/25 2640 x 1125,            1920 x 1080 active
// Frame rate is only the word clock, so the 24/25/30 fps variants of one
// size differ only in line length.  All outputs share one clock; each frame
// generator takes its raster from the row headers of its own channel.  After
// all generators run, every output is checked word by word for the time of
// one 2K frame: at least one full frame of good lines per channel, no bad or
// black line.  The network clock is 8/3 of the video clock; the channels
// need about 2 words per video clock in total.
module tb_mvtp_top_formats;
  import mvtp_pkg::*;
  import tb_pkg::*;
  localparam int N = 8;
  function automatic int tw_of(int i);
    return i < 2 ? 1650 : i < 4 ? 1980 : i < 6 ? 2750 : 2640;
  endfunction
  function automatic int aw_of(int i);
    return i < 4 ? 1280 : i < 6 ? 2048 : 1920;
  endfunction
  function automatic int tl_of(int i);
    return i < 4 ? 750 : 1125;
  endfunction
  function automatic int al_of(int i);
    return i < 4 ? 720 : 1080;
  endfunction

  logic clk_net = 0, rst_net_n = 0, vid_tx_clk = 0, vid_tx_rst_n = 0;
  logic [N-1:0] vid_rx_clk = '0, vid_rx_rst_n = '0;
  logic [N-1:0][19:0] sdi_rx_word, sdi_tx_word;
  logic mac_rx_valid, mac_rx_ready, mac_tx_valid, mac_tx_ready;
  pkt_word_t mac_rx_data, mac_tx_data;
  logic pm1_in_valid, pm1_in_ready, pm1_out_valid, pm1_out_ready;
  logic pm2_in_valid, pm2_in_ready, pm2_out_valid, pm2_out_ready;
  pkt_word_t pm1_in_data, pm1_out_data, pm2_in_data, pm2_out_data;
  logic [11:0] bus_addr; logic bus_wr, bus_rd; logic [31:0] bus_wdata, bus_rdata; logic bus_ack;
  logic [N-1:0] dec_locked, gen_running;
  int checks = 0, failures = 0;

  mvtp_top dut (.*);

  assign pm1_out_valid = pm1_in_valid; assign pm1_out_data = pm1_in_data; assign pm1_in_ready = pm1_out_ready;
  assign pm2_out_valid = pm2_in_valid; assign pm2_out_data = pm2_in_data; assign pm2_in_ready = pm2_out_ready;
  assign mac_rx_valid = 1'b0;
  assign mac_rx_data  = '0;
  assign mac_tx_ready = 1'b1;

  always #3 clk_net = ~clk_net;
  always #8 vid_tx_clk = ~vid_tx_clk;
  for (genvar i = 0; i < N; i++) begin : g_src
    int frames;
    initial begin #(2 * i + 1); forever #8 vid_rx_clk[i] = ~vid_rx_clk[i]; end
    tb_sdi_source #(.CH(i), .TW(tw_of(i)), .AW(aw_of(i)), .TL(tl_of(i)), .AL(al_of(i))) u_src (
      .clk(vid_rx_clk[i]), .word(sdi_rx_word[i]), .frames(frames));
  end

  bit chk_en = 0;
  int good[N], black[N], bad[N];
  for (genvar i = 0; i < N; i++) begin : g_chk
    int g, b, x;
    tb_sdi_checker #(.CH(i), .AW(aw_of(i))) u_chk (.clk(vid_tx_clk), .en(chk_en), .word(sdi_tx_word[i]),
                                                  .good(g), .black(b), .bad(x));
    always_comb begin good[i] = g; black[i] = b; bad[i] = x; end
  end

  initial begin
    #600_000_000;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wr(logic [11:0] a, logic [31:0] d);
    @(negedge clk_net); bus_addr = a; bus_wdata = d; bus_wr = 1;
    @(negedge clk_net); bus_wr = 0;
  endtask

  initial begin
    bus_addr = 0; bus_wr = 0; bus_rd = 0; bus_wdata = 0;
    repeat (4) @(posedge clk_net);
    @(negedge clk_net);
    rst_net_n = 1; vid_tx_rst_n = 1; vid_rx_rst_n = '1;
    wr(12'h000, 32'd2);
    wait (&gen_running);
    $display("all generators running at %0t", $time);
    // let every output reach its next frame start
    repeat (2750 * 1125) @(posedge vid_tx_clk);
    chk_en = 1;
    repeat (2750 * 1125) @(posedge vid_tx_clk);
    chk_en = 0;
    for (int i = 0; i < N; i++) begin
      checks++;
      $display("ch %0d (%0d x %0d active): good %0d black %0d bad %0d", i, aw_of(i), al_of(i),
               good[i], black[i], bad[i]);
      if (good[i] < al_of(i) - 2 || bad[i] != 0 || black[i] != 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
