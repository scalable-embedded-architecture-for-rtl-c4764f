// tb_async_pkt_fifo: random packets written in one clock, read with random
// backpressure in an unrelated clock.  Checks every word and its order, that
// a packet becomes visible only after its last word, and that packets that
// overflow a stalled FIFO are dropped whole and counted.
module tb_async_pkt_fifo;
  import mvtp_pkg::*;
  localparam int DEPTH = 64;
  logic wclk = 0, rclk = 0, wrst_n = 0, rrst_n = 0;
  logic wr_valid, rd_valid, rd_ready;
  pkt_word_t wr_data, rd_data;
  logic [15:0] drop_count;
  int checks = 0, failures = 0;
  bit read_en = 1;

  async_pkt_fifo #(.DEPTH(DEPTH)) dut (
    .wr_clk(wclk), .wr_rst_n(wrst_n), .wr_valid, .wr_data, .drop_count,
    .rd_clk(rclk), .rd_rst_n(rrst_n), .rd_valid, .rd_data, .rd_ready);

  always #5 wclk = ~wclk;
  always #3 rclk = ~rclk;   // reader faster than writer: no overflow unless stopped

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  pkt_word_t expq[$];
  int pkts_in = 0, pkts_out = 0, dropped_exp = 0;

  // writer
  task automatic send(int len, bit keep);
    pkt_word_t pk[$];
    for (int i = 0; i < len; i++) begin
      pkt_word_t w;
      w.sop = (i == 0); w.eop = (i == len - 1); w.empty = 3'($urandom);
      w.data = {32'(pkts_in), 32'($urandom)};
      pk.push_back(w);
    end
    foreach (pk[i]) begin
      @(negedge wclk);
      wr_valid = 1; wr_data = pk[i];
    end
    @(negedge wclk);
    wr_valid = 0;
    if (keep) foreach (pk[i]) expq.push_back(pk[i]);
    pkts_in++;
  endtask

  // reader
  always @(posedge rclk) begin
    if (rrst_n && rd_valid && rd_ready) begin
      pkt_word_t e;
      checks++;
      if (expq.size() == 0) begin
        failures++; $display("unexpected word %h", rd_data.data);
      end else begin
        e = expq.pop_front();
        if (rd_data !== e) begin
          failures++;
          if (failures < 5) $display("got %h exp %h", rd_data, e);
        end
      end
      if (rd_data.eop) pkts_out++;
    end
  end
  always @(negedge rclk) rd_ready = read_en && ($urandom_range(0, 3) != 0);

  initial begin
    wr_valid = 0; wr_data = '0; rd_ready = 0;
    repeat (3) @(posedge wclk);
    wrst_n = 1; rrst_n = 1;
    // partial packet must stay invisible
    read_en = 1;
    @(negedge wclk); wr_valid = 1; wr_data = '{sop:1, eop:0, empty:0, data:64'h1111};
    @(negedge wclk); wr_valid = 0;
    repeat (20) @(posedge rclk);
    checks++;
    if (rd_valid) begin failures++; $display("partial packet visible"); end
    @(negedge wclk); wr_valid = 1; wr_data = '{sop:0, eop:1, empty:0, data:64'h2222};
    expq.push_back('{sop:1, eop:0, empty:0, data:64'h1111});
    expq.push_back('{sop:0, eop:1, empty:0, data:64'h2222});
    @(negedge wclk); wr_valid = 0;
    // random traffic
    for (int p = 0; p < 200; p++) send($urandom_range(1, 20), 1);
    wait (expq.size() == 0);
    // overflow: stop reading, write more than fits
    read_en = 0;
    repeat (10) @(posedge rclk);
    send(40, 1);        // fits
    send(40, 0);        // does not fit: dropped
    send(20, 1);        // fits in the remaining space
    send(10, 0);        // does not fit
    repeat (10) @(posedge wclk);
    checks++;
    if (drop_count != 16'd2) begin failures++; $display("drop_count %0d", drop_count); end
    read_en = 1;
    wait (expq.size() == 0);
    repeat (20) @(posedge rclk);
    checks++;
    if (rd_valid) begin failures++; $display("dropped data visible"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
