// tb_mvtp_top_full: the top level at its real size (no parameter overrides:
// eight channels, 2048-word row FIFOs, 1024-word CPU FIFOs) carrying eight
// 1080-line progressive HD-SDI rasters (2200 words per line, 1920 active,
// 1125 lines, 1080 active) in video-to-video mode.  Each input has its own
// clock; the network clock is 8/3 of the video clock so that the eight
// channels' row packets fit (they need 8 x 647 words per 2200-word line).  After the decoders lock and the
// frame generators start, one full frame of every output is checked word by
// word against the input picture: 1080 good active lines per channel, no bad
// ones, no black ones.
module tb_mvtp_top_full;
  import mvtp_pkg::*;
  import tb_pkg::*;
  localparam int N = 8, TW = 2200, AW = 1920, TL = 1125, AL = 1080;

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
    tb_sdi_source #(.CH(i), .TW(TW), .AW(AW), .TL(TL), .AL(AL)) u_src (
      .clk(vid_rx_clk[i]), .word(sdi_rx_word[i]), .frames(frames));
  end

  bit chk_en = 0;
  int good[N], black[N], bad[N];
  for (genvar i = 0; i < N; i++) begin : g_chk
    int g, b, x;
    tb_sdi_checker #(.CH(i), .AW(AW)) u_chk (.clk(vid_tx_clk), .en(chk_en), .word(sdi_tx_word[i]),
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
    wait (&dec_locked);
    $display("decoders locked at %0t", $time);
    checks++;
    wait (&gen_running);
    $display("generators running at %0t", $time);
    // start checking at the next frame start of channel 0's output
    repeat (TW * TL) @(posedge vid_tx_clk);
    chk_en = 1;
    repeat (TW * TL) @(posedge vid_tx_clk);
    chk_en = 0;
    for (int i = 0; i < N; i++) begin
      checks++;
      $display("ch %0d: good %0d black %0d bad %0d", i, good[i], black[i], bad[i]);
      if (good[i] < AL - 2 || bad[i] != 0 || black[i] != 0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
