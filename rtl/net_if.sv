// net_if: hardware part of the Ethernet interface (Fig. 6).
//
// Receive: packets from the MAC pass the packet classifier, which sends
// video packets to the video processing modules (vpm_rx_*) and management
// packets (ARP, ICMP, ...) to the RX FIFO, read by the CPU over the
// processor bus (cpu_rx_*).  Transmit: video packets from the processing
// core (vpm_tx_*) and packets written by the CPU into the TX FIFO
// (cpu_tx_*) are merged by a round-robin packet multiplexer towards the MAC.
// Both FIFOs are packet FIFOs in the network clock domain (the CPU bus is
// taken to run on the network clock); a packet that does not fit is
// dropped whole, so a slow CPU never stalls the video path.  The structure
// follows the document; FIFO sizes and drop policy are this design's.
module net_if
  import mvtp_pkg::*;
#(
  parameter int N_RULES        = 4,
  parameter int CPU_FIFO_DEPTH = 1024
) (
  input  logic      clk,
  input  logic      rst_n,
  input  rule_t [N_RULES-1:0] rules,

  input  logic      mac_rx_valid,
  input  pkt_word_t mac_rx_data,
  output logic      mac_rx_ready,
  output logic      mac_tx_valid,
  output pkt_word_t mac_tx_data,
  input  logic      mac_tx_ready,

  output logic      vpm_rx_valid,
  output pkt_word_t vpm_rx_data,
  input  logic      vpm_rx_ready,
  input  logic      vpm_tx_valid,
  input  pkt_word_t vpm_tx_data,
  output logic      vpm_tx_ready,

  output logic      cpu_rx_valid,
  output pkt_word_t cpu_rx_data,
  input  logic      cpu_rx_ready,
  input  logic      cpu_tx_valid,
  input  pkt_word_t cpu_tx_data,

  output logic [15:0] cls_drop_count,
  output logic [15:0] rx_drop_count,
  output logic [15:0] tx_drop_count
);
  logic      cls_rx_valid;
  pkt_word_t cls_rx_data;

  pkt_classifier #(.N_RULES(N_RULES)) u_cls (
    .clk, .rst_n, .rules,
    .in_valid(mac_rx_valid), .in_data(mac_rx_data), .in_ready(mac_rx_ready),
    .vpm_valid(vpm_rx_valid), .vpm_data(vpm_rx_data), .vpm_ready(vpm_rx_ready),
    .rx_valid(cls_rx_valid), .rx_data(cls_rx_data), .rx_ready(1'b1),
    .drop_count(cls_drop_count));

  async_pkt_fifo #(.DEPTH(CPU_FIFO_DEPTH)) u_rx_fifo (
    .wr_clk(clk), .wr_rst_n(rst_n), .wr_valid(cls_rx_valid), .wr_data(cls_rx_data),
    .drop_count(rx_drop_count),
    .rd_clk(clk), .rd_rst_n(rst_n), .rd_valid(cpu_rx_valid), .rd_data(cpu_rx_data),
    .rd_ready(cpu_rx_ready));

  logic      txf_valid, txf_ready;
  pkt_word_t txf_data;

  async_pkt_fifo #(.DEPTH(CPU_FIFO_DEPTH)) u_tx_fifo (
    .wr_clk(clk), .wr_rst_n(rst_n), .wr_valid(cpu_tx_valid), .wr_data(cpu_tx_data),
    .drop_count(tx_drop_count),
    .rd_clk(clk), .rd_rst_n(rst_n), .rd_valid(txf_valid), .rd_data(txf_data),
    .rd_ready(txf_ready));

  logic [1:0] mx_ready;
  pkt_rr_mux #(.N(2)) u_mux (
    .clk, .rst_n,
    .in_valid({txf_valid, vpm_tx_valid}), .in_data({txf_data, vpm_tx_data}),
    .in_ready(mx_ready),
    .out_valid(mac_tx_valid), .out_data(mac_tx_data), .out_ready(mac_tx_ready));
  assign vpm_tx_ready = mx_ready[0];
  assign txf_ready    = mx_ready[1];
endmodule
