// tb_net_if: receive side - video UDP frames must reach the VPM port and ARP
// frames the CPU's RX FIFO; transmit side - packets from the VPM port and
// packets written into the TX FIFO must all leave towards the MAC, complete
// and unmixed, alternating when both wait.
module tb_net_if;
  import mvtp_pkg::*;
  logic clk = 0, rst_n = 0;
  rule_t [3:0] rules;
  logic mac_rx_valid, mac_rx_ready, mac_tx_valid, mac_tx_ready;
  pkt_word_t mac_rx_data, mac_tx_data;
  logic vpm_rx_valid, vpm_rx_ready, vpm_tx_valid, vpm_tx_ready;
  pkt_word_t vpm_rx_data, vpm_tx_data;
  logic cpu_rx_valid, cpu_rx_ready, cpu_tx_valid;
  pkt_word_t cpu_rx_data, cpu_tx_data;
  logic [15:0] cls_drop_count, rx_drop_count, tx_drop_count;
  int checks = 0, failures = 0;

  net_if #(.N_RULES(4), .CPU_FIFO_DEPTH(64)) dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [63:0] q_vpm[$], q_cpu[$];
  int tx_from_vpm = 0, tx_from_cpu = 0, tx_pkts = 0, alt = 0;
  bit prev_src_cpu;
  bit in_tx_pkt = 0, cur_cpu;

  always @(negedge clk) begin
    vpm_rx_ready = $urandom_range(0, 3) != 0;
    cpu_rx_ready = cpu_rx_valid && ($urandom_range(0, 2) == 0);
    mac_tx_ready = $urandom_range(0, 3) != 0;
  end
  always @(posedge clk) if (rst_n) begin
    if (vpm_rx_valid && vpm_rx_ready) begin
      checks++;
      if (q_vpm.size() == 0 || vpm_rx_data.data !== q_vpm[0]) failures++;
      if (q_vpm.size()) void'(q_vpm.pop_front());
    end
    if (cpu_rx_valid && cpu_rx_ready) begin
      checks++;
      if (q_cpu.size() == 0 || cpu_rx_data.data !== q_cpu[0]) failures++;
      if (q_cpu.size()) void'(q_cpu.pop_front());
    end
    if (mac_tx_valid && mac_tx_ready) begin
      bit from_cpu;
      from_cpu = mac_tx_data.data[63:56] == 8'hC0;
      checks++;
      if (mac_tx_data.sop) begin
        if (in_tx_pkt) failures++;
        in_tx_pkt = 1; cur_cpu = from_cpu;
        if (tx_pkts > 0 && from_cpu != prev_src_cpu) alt++;
        prev_src_cpu = from_cpu;
      end else if (!in_tx_pkt || from_cpu != cur_cpu) failures++;
      if (mac_tx_data.eop) begin
        in_tx_pkt = 0; tx_pkts++;
        if (from_cpu) tx_from_cpu++; else tx_from_vpm++;
      end
    end
  end

  initial begin
    rules = '0;
    rules[0] = '{en: 1, to_vpm: 1, to_rx: 0, term: '{'{idx: 4, mask: 64'hFFFF_0000, value: 64'h138C_0000},
                  '{idx: 2, mask: 64'hFF, value: 64'h11}, '{idx: 1, mask: 64'hFFFF_0000, value: 64'h0800_0000}}};
    rules[1] = '{en: 1, to_vpm: 0, to_rx: 1, term: '{'{idx: 0, mask: 0, value: 0}, '{idx: 0, mask: 0, value: 0},
                  '{idx: 1, mask: 64'hFFFF_0000, value: 64'h0806_0000}}};
    mac_rx_valid = 0; vpm_tx_valid = 0; cpu_tx_valid = 0;
    mac_rx_data = '0; vpm_tx_data = '0; cpu_tx_data = '0;
    repeat (3) @(posedge clk);
    @(negedge clk); rst_n = 1;
    fork
      // receive traffic
      for (int p = 0; p < 60; p++) begin
        bit arp; arp = ($urandom_range(0, 2) == 0);
        for (int i = 0; i < 8; i++) begin
          logic [63:0] d;
          d = {$urandom, $urandom};
          if (i == 1) d[31:16] = arp ? 16'h0806 : 16'h0800;
          if (i == 2) d[7:0] = 8'h11;
          if (i == 4) d[31:16] = 16'd5004;
          if (arp) q_cpu.push_back(d); else q_vpm.push_back(d);
          @(negedge clk);
          mac_rx_valid = 1; mac_rx_data = '{sop: i == 0, eop: i == 7, empty: 0, data: d};
          do @(posedge clk); while (!mac_rx_ready);
          @(negedge clk); mac_rx_valid = 0;
        end
      end
      // video packets to transmit
      for (int p = 0; p < 20; p++)
        for (int i = 0; i < 6; i++) begin
          @(negedge clk);
          vpm_tx_valid = 1; vpm_tx_data = '{sop: i == 0, eop: i == 5, empty: 0, data: {8'hB0, 56'(p)}};
          do @(posedge clk); while (!vpm_tx_ready);
          @(negedge clk); vpm_tx_valid = 0;
        end
      // CPU packets written into the TX FIFO
      for (int p = 0; p < 10; p++)
        for (int i = 0; i < 4; i++) begin
          @(negedge clk);
          cpu_tx_valid = 1; cpu_tx_data = '{sop: i == 0, eop: i == 3, empty: 0, data: {8'hC0, 56'(p)}};
          @(negedge clk); cpu_tx_valid = 0;
          repeat (3) @(negedge clk);
        end
    join
    repeat (200) @(posedge clk);
    checks++;
    if (q_vpm.size() || q_cpu.size()) begin failures++; $display("left vpm %0d cpu %0d", q_vpm.size(), q_cpu.size()); end
    checks++;
    if (tx_from_vpm != 20 || tx_from_cpu != 10) begin failures++; $display("tx vpm %0d cpu %0d", tx_from_vpm, tx_from_cpu); end
    checks++;
    if (alt < 5) begin failures++; $display("no alternation (%0d)", alt); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
