// tb_mvtp_top: end-to-end run of the whole design on a small raster
// (64 words per line, 30 active, 12 lines, 6 active) on all four channels,
// with each HD-SDI input in its own clock, and FIFOs reduced to 64 words so
// that an overflow can be provoked quickly.
//   A. network-to-network mode: UDP video frames injected at the MAC input
//      leave at the MAC output unchanged; an ARP frame goes to the RX FIFO
//      and is read over the bus; a packet written into the TX FIFO over the
//      bus leaves at the MAC output.
//   B. video-to-video mode: every output channel must show its own input
//      channel's picture.
//   C. full-duplex mode with the MAC output looped back to the MAC input:
//      the rows travel video in -> PM1 -> network -> classifier -> PM2 ->
//      video out.  One looped row is dropped (its line must come out black)
//      and the MAC is stalled for a while (input FIFOs must drop rows), after
//      which the picture must recover.
// The processing-module slots are plain pass-through models.  Each mechanism
// (mode switch, RX FIFO, TX FIFO, round-robin merge of 4 channels, missing
// row, FIFO overflow, late/black line) is counted and must have happened.
module tb_mvtp_top;
  import mvtp_pkg::*;
  import tb_pkg::*;
  localparam int N = 4, TW = 64, AW = 30, TL = 12, AL = 6;

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

  mvtp_top #(.N_CH(N), .FIFO_DEPTH(64), .CPU_FIFO_DEPTH(64)) dut (.*);

  // processing-module slots: pass-through
  assign pm1_out_valid = pm1_in_valid; assign pm1_out_data = pm1_in_data; assign pm1_in_ready = pm1_out_ready;
  assign pm2_out_valid = pm2_in_valid; assign pm2_out_data = pm2_in_data; assign pm2_in_ready = pm2_out_ready;

  always #3 clk_net = ~clk_net;
  always #7 vid_tx_clk = ~vid_tx_clk;
  for (genvar i = 0; i < N; i++) begin : g_src
    int frames;
    initial begin #(2 * i + 1); forever #7 vid_rx_clk[i] = ~vid_rx_clk[i]; end
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
    #20_000_000;
    failures++;
    $display("watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------- MAC model ----------------
  pkt_word_t rxq[$];
  bit loop_en = 0, drop_one = 0, dropping = 0, stall = 0;
  int looped_pkts = 0, dropped_rows = 0;
  pkt_word_t txp[$];          // packet being received from mac_tx
  logic [63:0] exp_tx[$][$];  // packets expected at mac_tx while not looping
  int tx_matched = 0;

  always_comb begin
    mac_rx_valid = rxq.size() != 0;
    mac_rx_data  = mac_rx_valid ? rxq[0] : '0;
  end
  always @(negedge clk_net) mac_tx_ready = !stall;

  always @(posedge clk_net) if (rst_net_n) begin
    if (mac_rx_valid && mac_rx_ready) void'(rxq.pop_front());
    if (mac_tx_valid && mac_tx_ready) begin
      if (loop_en) begin
        if (mac_tx_data.sop && drop_one) begin dropping = 1; drop_one = 0; dropped_rows++; end
        if (!dropping) rxq.push_back(mac_tx_data);
        if (mac_tx_data.eop) begin
          if (!dropping) looped_pkts++;
          dropping = 0;
        end
      end else begin
        txp.push_back(mac_tx_data);
        if (mac_tx_data.eop) begin
          int hit;
          hit = -1;
          for (int k = 0; k < exp_tx.size(); k++)
            if (hit < 0 && exp_tx[k].size() == txp.size()) begin
              bit same;
              same = 1;
              for (int j = 0; j < txp.size(); j++) if (txp[j].data !== exp_tx[k][j]) same = 0;
              if (same) hit = k;
            end
          if (hit >= 0) begin exp_tx.delete(hit); tx_matched++; end
          checks++;
          if (hit < 0) begin failures++; $display("unexpected packet at MAC output (%0d words)", txp.size()); foreach (txp[j]) $display("  %h", txp[j].data); end
          txp.delete();
        end
      end
    end
  end

  // ---------------- bus ----------------
  task automatic wr(logic [11:0] a, logic [31:0] d);
    @(negedge clk_net); bus_addr = a; bus_wdata = d; bus_wr = 1;
    @(negedge clk_net); bus_wr = 0;
  endtask
  task automatic rd(logic [11:0] a, output logic [31:0] d);
    @(negedge clk_net); bus_addr = a; bus_rd = 1;
    @(negedge clk_net); bus_rd = 0;
    d = bus_rdata;
  endtask
  task automatic set_term(int r, int t, int idx, logic [63:0] m, logic [63:0] v);
    logic [11:0] b;
    b = 12'(32'h100 + r * 32'h80 + 32'h10 + t * 32'h20);
    wr(b, 32'(idx)); wr(b + 4, m[63:32]); wr(b + 8, m[31:0]); wr(b + 12, v[63:32]); wr(b + 16, v[31:0]);
  endtask

  function automatic logic [63:0] frame_word(int kind, int i, int tag);
    logic [63:0] d;
    d = {8'(tag), 8'(kind), 16'(i), 32'hC0FFEE00 + 32'(i)};
    if (i == 1) d[31:16] = (kind == 1) ? 16'h0806 : 16'h0800;
    if (i == 2) d[7:0] = 8'h11;
    if (i == 4) d[31:16] = 16'd5004;
    return d;
  endfunction

  int mode_switches = 0;

  initial begin
    logic [31:0] d;
    int n_cpu_words;
    int g0[N];
    bus_addr = 0; bus_wr = 0; bus_rd = 0; bus_wdata = 0;
    repeat (4) @(posedge clk_net);
    @(negedge clk_net);
    rst_net_n = 1; vid_tx_rst_n = 1; vid_rx_rst_n = '1;
    // classifier: rule 0 UDP port 5004 -> VPM, rule 1 ARP -> RX FIFO
    set_term(0, 0, 1, 64'hFFFF_0000, 64'h0800_0000);
    set_term(0, 1, 2, 64'hFF, 64'h11);
    set_term(0, 2, 4, 64'hFFFF_0000, 64'h138C_0000);
    wr(12'h100, 32'h6);
    set_term(1, 0, 1, 64'hFFFF_0000, 64'h0806_0000);
    wr(12'h180, 32'h5);
    wr(12'h008, 32'd2);                          // start delay: 2 lines

    // ---------- A: network to network ----------
    wr(12'h000, 32'd0);
    repeat (5) @(posedge clk_net);
    rd(12'h004, d);
    checks++; if (d[1:0] != 2'd0) begin failures++; $display("mode A not active"); end
    for (int p = 0; p < 3; p++) begin
      logic [63:0] pk[$];
      pk.delete();
      for (int i = 0; i < 8; i++) begin
        pk.push_back(frame_word(0, i, p));
        rxq.push_back('{sop: i == 0, eop: i == 7, empty: 0, data: frame_word(0, i, p)});
      end
      exp_tx.push_back(pk);
    end
    for (int i = 0; i < 6; i++) rxq.push_back('{sop: i == 0, eop: i == 5, empty: 0, data: frame_word(1, i, 9)});
    // CPU transmits a packet through the TX FIFO
    begin
      logic [63:0] pk[$];
      for (int i = 0; i < 3; i++) begin
        logic [63:0] w; w = {32'hCAFE0000 + 32'(i), 32'h12345678};
        pk.push_back(w);
        wr(12'h410, {27'd0, i == 0, i == 2, 3'd0});
        wr(12'h414, w[63:32]);
        wr(12'h418, w[31:0]);
      end
      exp_tx.push_back(pk);
    end
    repeat (200) @(posedge clk_net);
    checks++;
    if (tx_matched != 4 || exp_tx.size() != 0) begin failures++; $display("MAC output: %0d packets matched", tx_matched); end
    // CPU reads the ARP frame from the RX FIFO
    n_cpu_words = 0;
    for (int i = 0; i < 6; i++) begin
      logic [31:0] hi, lo, st;
      rd(12'h400, st);
      if (!st[31]) break;
      rd(12'h404, hi); rd(12'h408, lo);
      checks++;
      if ({hi, lo} !== frame_word(1, i, 9) || st[30] != (i == 0) || st[29] != (i == 5)) begin
        failures++; $display("RX FIFO word %0d wrong", i);
      end
      n_cpu_words++;
    end
    checks++;
    if (n_cpu_words != 6) begin failures++; $display("ARP frame: %0d words read", n_cpu_words); end

    // ---------- B: video to video ----------
    wr(12'h000, 32'd2);
    wait (&gen_running);
    repeat (2 * TW * TL) @(posedge vid_tx_clk);
    chk_en = 1;
    repeat (4 * TW * TL) @(posedge vid_tx_clk);
    chk_en = 0;
    for (int i = 0; i < N; i++) begin
      checks++;
      if (good[i] < 3 * AL || bad[i] != 0) begin
        failures++; $display("video-video ch %0d: good %0d black %0d bad %0d", i, good[i], black[i], bad[i]);
      end
      g0[i] = good[i];
    end

    // ---------- C: full duplex through the network loop ----------
    loop_en = 1;
    wr(12'h000, 32'd1);
    repeat (2 * TW * TL) @(posedge vid_tx_clk);
    chk_en = 1;
    repeat (3 * TW * TL) @(posedge vid_tx_clk);
    drop_one = 1;
    repeat (3 * TW * TL) @(posedge vid_tx_clk);
    // stall the MAC: rows pile up and the input FIFOs overflow
    stall = 1;
    repeat (2 * TW * TL) @(posedge vid_tx_clk);
    stall = 0;
    repeat (3 * TW * TL) @(posedge vid_tx_clk);
    chk_en = 0;
    rd(12'h314, d);
    checks++;
    if (d == 0) begin failures++; $display("no input FIFO overflow seen"); end
    $display("input FIFO 0 dropped %0d rows", d);
    rd(12'h310, d);
    mode_switches = int'(d);
    checks++;
    if (mode_switches < 3) begin failures++; $display("mode switches %0d", mode_switches); end
    for (int i = 0; i < N; i++) begin
      checks++;
      if (good[i] - g0[i] < 6 * AL || bad[i] != 0) begin
        failures++; $display("duplex ch %0d: good %0d black %0d bad %0d", i, good[i] - g0[i], black[i], bad[i]);
      end
    end
    checks++;
    if (black[0] + black[1] + black[2] + black[3] < 1 || dropped_rows != 1) begin
      failures++; $display("missing row not seen as a black line");
    end
    $display("mechanisms: mode switches %0d, MAC packets matched %0d, ARP words to CPU %0d, looped rows %0d, dropped rows %0d, black lines %0d/%0d/%0d/%0d",
             mode_switches, tx_matched, n_cpu_words, looped_pkts, dropped_rows, black[0], black[1], black[2], black[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
