// tb_plb_bridge: writes and reads back the configuration registers and a
// classifier rule over the bus, checks the decoded outputs, reads status
// counters, pops an RX FIFO word and pushes a TX FIFO word.
module tb_plb_bridge;
  import mvtp_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [11:0] bus_addr; logic bus_wr, bus_rd; logic [31:0] bus_wdata, bus_rdata; logic bus_ack;
  core_mode_e mode; logic [7:0] start_delay; net_hdr_cfg_t hdr_cfg; rule_t [3:0] rules;
  logic [31:0] status; logic [15:0][15:0] stat_cnt;
  logic cpu_rx_valid, cpu_rx_ready, cpu_tx_valid; pkt_word_t cpu_rx_data, cpu_tx_data;
  int checks = 0, failures = 0;

  plb_bridge #(.N_RULES(4), .N_STAT(16)) dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wr(logic [11:0] a, logic [31:0] d);
    @(negedge clk); bus_addr = a; bus_wdata = d; bus_wr = 1;
    @(negedge clk); bus_wr = 0;
    checks++; if (!bus_ack) failures++;
  endtask
  task automatic rd(logic [11:0] a, output logic [31:0] d);
    @(negedge clk); bus_addr = a; bus_rd = 1;
    @(negedge clk); bus_rd = 0;
    checks++; if (!bus_ack) failures++;
    d = bus_rdata;
  endtask
  task automatic expect_eq(string what, logic [63:0] got, logic [63:0] exp);
    checks++;
    if (got !== exp) begin failures++; $display("%s: got %h exp %h", what, got, exp); end
  endtask

  initial begin
    logic [31:0] d;
    bus_addr = 0; bus_wr = 0; bus_rd = 0; bus_wdata = 0;
    status = 32'hA5A5_0001;
    for (int i = 0; i < 16; i++) stat_cnt[i] = 16'(100 + i);
    cpu_rx_valid = 1; cpu_rx_data = '{sop: 1, eop: 0, empty: 3'd5, data: 64'h0123_4567_89AB_CDEF};
    repeat (3) @(posedge clk);
    @(negedge clk); rst_n = 1;
    expect_eq("reset mode", mode, MODE_DUPLEX);
    expect_eq("reset rules", rules, '0);
    wr(12'h000, 32'd2);      expect_eq("mode", mode, MODE_VID_VID);
    wr(12'h000, 32'd3);      expect_eq("mode 3 ignored", mode, MODE_VID_VID);
    wr(12'h008, 32'd7);      expect_eq("start_delay", start_delay, 8'd7);
    wr(12'h010, 32'h1122);   wr(12'h014, 32'h3344_5566);
    expect_eq("dst_mac", hdr_cfg.dst_mac, 48'h1122_3344_5566);
    wr(12'h028, 32'h1234_5678);
    expect_eq("ports", {hdr_cfg.udp_src, hdr_cfg.udp_dst}, 64'h1234_5678);
    // rule 2, term 1
    wr(12'h200, 32'h5);
    wr(12'h230, 32'h4);
    wr(12'h234, 32'hFFFF_0000); wr(12'h238, 32'h0000_FFFF);
    wr(12'h23C, 32'h0000_0000); wr(12'h240, 32'h0000_138C);
    expect_eq("rule flags", {rules[2].en, rules[2].to_vpm, rules[2].to_rx}, 3'b101);
    expect_eq("term idx", rules[2].term[1].idx, 3'd4);
    expect_eq("term mask", rules[2].term[1].mask, 64'hFFFF_0000_0000_FFFF);
    expect_eq("term value", rules[2].term[1].value, 64'h138C);
    expect_eq("other rule untouched", rules[1], '0);
    rd(12'h238, d); expect_eq("read mask lo", d, 32'h0000_FFFF);
    rd(12'h004, d); expect_eq("status", d, 32'hA5A5_0001);
    rd(12'h30C, d); expect_eq("counter 3", d, 32'd103);
    rd(12'h000, d); expect_eq("read mode", d, 32'd2);
    rd(12'h400, d); expect_eq("rx stat", d, {1'b1, 1'b1, 1'b0, 2'b0, 3'd5, 24'd0});
    rd(12'h404, d); expect_eq("rx hi", d, 32'h0123_4567);
    checks++; if (cpu_rx_ready) failures++;
    @(negedge clk); bus_addr = 12'h408; bus_rd = 1;
    #1; checks++; if (!cpu_rx_ready) begin failures++; $display("no pop"); end
    @(negedge clk); bus_rd = 0;
    expect_eq("rx lo", bus_rdata, 32'h89AB_CDEF);
    wr(12'h410, 32'h18);     // sop, eop
    wr(12'h414, 32'hDEAD_BEEF);
    @(negedge clk); bus_addr = 12'h418; bus_wdata = 32'h0BAD_F00D; bus_wr = 1;
    @(negedge clk); bus_wr = 0;
    checks++;
    if (!cpu_tx_valid || cpu_tx_data !== '{sop: 1, eop: 1, empty: 0, data: 64'hDEAD_BEEF_0BAD_F00D}) begin
      failures++; $display("tx push wrong");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
