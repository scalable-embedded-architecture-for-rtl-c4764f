// tb_pkt_classifier: loads the three rules the design is meant to use (UDP
// video to the VPM, ARP and ICMP to the RX FIFO) plus a fourth rule that
// sends one UDP port to both, then sends a random mix of Ethernet frames.
// Checks every frame's destination(s) against an independent decision,
// word by word, under random backpressure, and the drop count.
module tb_pkt_classifier;
  import mvtp_pkg::*;
  logic clk = 0, rst_n = 0;
  rule_t [3:0] rules;
  logic in_valid, in_ready, vpm_valid, vpm_ready, rx_valid, rx_ready;
  pkt_word_t in_data, vpm_data, rx_data;
  logic [15:0] drop_count;
  int checks = 0, failures = 0;

  pkt_classifier #(.N_RULES(4)) dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [63:0] q_vpm[$], q_rx[$];
  int drops = 0;

  always @(negedge clk) begin
    vpm_ready = $urandom_range(0, 3) != 0;
    rx_ready  = $urandom_range(0, 3) != 0;
  end
  always @(posedge clk) if (rst_n) begin
    if (vpm_valid && vpm_ready) begin
      checks++;
      if (q_vpm.size() == 0 || vpm_data.data !== q_vpm[0]) begin failures++; if (failures < 6) $display("vpm got %h", vpm_data.data); end
      if (q_vpm.size()) void'(q_vpm.pop_front());
    end
    if (rx_valid && rx_ready) begin
      checks++;
      if (q_rx.size() == 0 || rx_data.data !== q_rx[0]) begin failures++; if (failures < 6) $display("rx got %h", rx_data.data); end
      if (q_rx.size()) void'(q_rx.pop_front());
    end
  end

  function automatic rule_term_t term(int idx, logic [63:0] m, logic [63:0] v);
    return '{idx: 3'(idx), mask: m, value: v};
  endfunction
  localparam logic [63:0] M_ETYPE = 64'h0000_0000_FFFF_0000;
  localparam logic [63:0] M_PROTO = 64'h0000_0000_0000_00FF;
  localparam logic [63:0] M_DPORT = 64'h0000_0000_FFFF_0000;

  initial begin
    in_valid = 0; in_data = '0;
    rules = '0;
    rules[0] = '{en: 1, to_vpm: 1, to_rx: 0, term: '{term(4, M_DPORT, 64'h0000_0000_138C_0000),
                                                   term(2, M_PROTO, 64'h11), term(1, M_ETYPE, 64'h0800_0000)}};
    rules[1] = '{en: 1, to_vpm: 0, to_rx: 1, term: '{term(0, 0, 0), term(0, 0, 0), term(1, M_ETYPE, 64'h0806_0000)}};
    rules[2] = '{en: 1, to_vpm: 0, to_rx: 1, term: '{term(0, 0, 0), term(2, M_PROTO, 64'h01), term(1, M_ETYPE, 64'h0800_0000)}};
    rules[3] = '{en: 1, to_vpm: 1, to_rx: 1, term: '{term(4, M_DPORT, 64'h0000_0000_0007_0000),
                                                   term(2, M_PROTO, 64'h11), term(1, M_ETYPE, 64'h0800_0000)}};
    repeat (3) @(posedge clk);
    @(negedge clk); rst_n = 1;
    for (int p = 0; p < 300; p++) begin
      int kind, len;
      logic [15:0] etype, port;
      logic [7:0]  proto;
      bit to_v, to_r;
      kind = $urandom_range(0, 5);
      etype = (kind == 1) ? 16'h0806 : (kind == 5) ? 16'h86DD : 16'h0800;
      proto = (kind == 2) ? 8'd1 : (kind == 4) ? 8'd6 : 8'd17;
      port  = (kind == 0) ? 16'd5004 : (kind == 3) ? 16'd7 : 16'd53;
      len   = (kind == 1) ? $urandom_range(3, 8) : $urandom_range(6, 12);
      to_v = (etype == 16'h0800 && proto == 17 && (port == 5004 || port == 7));
      to_r = (etype == 16'h0806) || (etype == 16'h0800 && proto == 1) ||
             (etype == 16'h0800 && proto == 17 && port == 7);
      if (!to_v && !to_r) drops++;
      for (int i = 0; i < len; i++) begin
        logic [63:0] d;
        d = {$urandom, $urandom};
        if (i == 1) d[31:16] = etype;
        if (i == 2) d[7:0] = proto;
        if (i == 4) d[31:16] = port;
        if (to_v) q_vpm.push_back(d);
        if (to_r) q_rx.push_back(d);
        @(negedge clk);
        in_valid = 1; in_data = '{sop: i == 0, eop: i == len - 1, empty: 0, data: d};
        do @(posedge clk); while (!in_ready);
        @(negedge clk); in_valid = 0;
      end
    end
    repeat (50) @(posedge clk);
    checks++;
    if (q_vpm.size() || q_rx.size()) begin failures++; $display("left vpm %0d rx %0d", q_vpm.size(), q_rx.size()); end
    checks++;
    if (drop_count != 16'(drops)) begin failures++; $display("drops %0d exp %0d", drop_count, drops); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
