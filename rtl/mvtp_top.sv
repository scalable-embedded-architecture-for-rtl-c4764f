// mvtp_top: modular video transfer platform, one FPGA.
//
// Input side (one chain per HD-SDI input, each in its own recovered clock):
//   sdi_rx_if -> frame_decoder -> input packet FIFO (clock crossing)
// and the input multiplexer (pkt_rr_mux) merges the channels in the network
// clock.  Output side: the output multiplexor (output_demux) sorts row
// packets by channel into output packet FIFOs (clock crossing into the
// HD-SDI output clock), each followed by frame_generator -> sdi_tx_if.
// Between them sits the processing core (pkt_core) with its three switches
// and two processing-module slots, and the network interface (net_if):
// classifier, RX/TX FIFOs for the CPU and the transmit packet multiplexer.
// plb_bridge maps mode, header addresses, buffering level, classifier rules,
// counters and the CPU FIFO windows onto the processor bus.  Counters
// (bus address 300h + 4k): k=0 classifier drops, 1 RX FIFO drops, 2 TX FIFO
// drops, 3 output demux bad packets, 4 mode switch-overs, then per channel i
// 5+i input FIFO drops, 5+N_CH+i output FIFO drops, 5+2N_CH+i late rows,
// 5+3N_CH+i missing rows; N_CH up to 14 fits the 64-counter window, and the
// status word shows lock/running for the first eight channels.
//
// Ports: the 20-bit transceiver words of every channel, packet streams to
// and from the 10G MAC, the two processing-module slots (their contents are
// not part of this design), and the processor bus.  Clocks: clk_net for the
// network side, vid_rx_clk[i] per input channel, vid_tx_clk for all outputs.
// Configuration registers are quasi-static and are used in the video clock
// domains without synchronisers; counters read over the bus from the video
// domains are sampled without synchronisation (diagnostic only).  The block
// structure follows the document; widths, formats and clocks are this
// design's choice.
module mvtp_top
  import mvtp_pkg::*;
#(
  parameter int N_CH           = 8,
  parameter int FIFO_DEPTH     = 4096,
  parameter int CPU_FIFO_DEPTH = 1024
) (
  input  logic                         clk_net,
  input  logic                         rst_net_n,
  input  logic [N_CH-1:0]              vid_rx_clk,
  input  logic [N_CH-1:0]              vid_rx_rst_n,
  input  logic [N_CH-1:0][SDI_W-1:0]   sdi_rx_word,
  input  logic                         vid_tx_clk,
  input  logic                         vid_tx_rst_n,
  output logic [N_CH-1:0][SDI_W-1:0]   sdi_tx_word,

  input  logic      mac_rx_valid,
  input  pkt_word_t mac_rx_data,
  output logic      mac_rx_ready,
  output logic      mac_tx_valid,
  output pkt_word_t mac_tx_data,
  input  logic      mac_tx_ready,

  output logic      pm1_in_valid,
  output pkt_word_t pm1_in_data,
  input  logic      pm1_in_ready,
  input  logic      pm1_out_valid,
  input  pkt_word_t pm1_out_data,
  output logic      pm1_out_ready,
  output logic      pm2_in_valid,
  output pkt_word_t pm2_in_data,
  input  logic      pm2_in_ready,
  input  logic      pm2_out_valid,
  input  pkt_word_t pm2_out_data,
  output logic      pm2_out_ready,

  input  logic [11:0] bus_addr,
  input  logic        bus_wr,
  input  logic        bus_rd,
  input  logic [31:0] bus_wdata,
  output logic [31:0] bus_rdata,
  output logic        bus_ack,

  output logic [N_CH-1:0] dec_locked,
  output logic [N_CH-1:0] gen_running
);
  localparam int N_RULES = 4;
  localparam int N_STAT  = 5 + 4 * N_CH;

  // ---------------- configuration ----------------
  core_mode_e          mode, active_mode;
  logic [7:0]          start_delay;
  net_hdr_cfg_t        hdr_cfg;
  rule_t [N_RULES-1:0] rules;
  logic [31:0]         status;
  logic [N_STAT-1:0][15:0] stat_cnt;

  logic      cpu_rx_valid, cpu_rx_ready, cpu_tx_valid;
  pkt_word_t cpu_rx_data, cpu_tx_data;

  // ---------------- input chains ----------------
  logic [N_CH-1:0]            in_valid, in_ready;
  pkt_word_t [N_CH-1:0]       in_data;
  logic [N_CH-1:0][15:0]      in_drop, gen_late, gen_miss;

  for (genvar i = 0; i < N_CH; i++) begin : g_in
    logic [SDI_W-1:0] w;
    logic             wv, ts, tf, tv, th, al;
    logic             pv;
    pkt_word_t        p;
    logic [15:0]      rows;

    sdi_rx_if u_rx (
      .clk(vid_rx_clk[i]), .rst_n(vid_rx_rst_n[i]), .rx_word(sdi_rx_word[i]),
      .vid_word(w), .vid_valid(wv), .trs_start(ts), .trs_f(tf), .trs_v(tv), .trs_h(th),
      .aligned(al));

    frame_decoder #(.CH_ID(8'(i))) u_dec (
      .clk(vid_rx_clk[i]), .rst_n(vid_rx_rst_n[i]),
      .vid_word(w), .vid_valid(wv), .trs_start(ts), .trs_v(tv), .trs_h(th),
      .hdr_cfg(hdr_cfg), .pkt_valid(pv), .pkt(p), .locked(dec_locked[i]), .row_count(rows));

    async_pkt_fifo #(.DEPTH(FIFO_DEPTH)) u_fifo (
      .wr_clk(vid_rx_clk[i]), .wr_rst_n(vid_rx_rst_n[i]), .wr_valid(pv), .wr_data(p),
      .drop_count(in_drop[i]),
      .rd_clk(clk_net), .rd_rst_n(rst_net_n), .rd_valid(in_valid[i]), .rd_data(in_data[i]),
      .rd_ready(in_ready[i]));
  end

  logic      vin_valid, vin_ready;
  pkt_word_t vin_data;

  pkt_rr_mux #(.N(N_CH)) u_in_mux (
    .clk(clk_net), .rst_n(rst_net_n),
    .in_valid(in_valid), .in_data(in_data), .in_ready(in_ready),
    .out_valid(vin_valid), .out_data(vin_data), .out_ready(vin_ready));

  // ---------------- network interface ----------------
  logic      nrx_valid, nrx_ready, ntx_valid, ntx_ready;
  pkt_word_t nrx_data, ntx_data;
  logic [15:0] cls_drop, rx_drop, tx_drop;

  net_if #(.N_RULES(N_RULES), .CPU_FIFO_DEPTH(CPU_FIFO_DEPTH)) u_net (
    .clk(clk_net), .rst_n(rst_net_n), .rules,
    .mac_rx_valid, .mac_rx_data, .mac_rx_ready,
    .mac_tx_valid, .mac_tx_data, .mac_tx_ready,
    .vpm_rx_valid(nrx_valid), .vpm_rx_data(nrx_data), .vpm_rx_ready(nrx_ready),
    .vpm_tx_valid(ntx_valid), .vpm_tx_data(ntx_data), .vpm_tx_ready(ntx_ready),
    .cpu_rx_valid, .cpu_rx_data, .cpu_rx_ready,
    .cpu_tx_valid, .cpu_tx_data,
    .cls_drop_count(cls_drop), .rx_drop_count(rx_drop), .tx_drop_count(tx_drop));

  // ---------------- processing core ----------------
  logic      vout_valid, vout_ready;
  pkt_word_t vout_data;
  logic [15:0] switch_count;

  pkt_core u_core (
    .clk(clk_net), .rst_n(rst_net_n), .mode, .active_mode, .switch_count,
    .net_in_valid(nrx_valid), .net_in_data(nrx_data), .net_in_ready(nrx_ready),
    .vid_in_valid(vin_valid), .vid_in_data(vin_data), .vid_in_ready(vin_ready),
    .net_out_valid(ntx_valid), .net_out_data(ntx_data), .net_out_ready(ntx_ready),
    .vid_out_valid(vout_valid), .vid_out_data(vout_data), .vid_out_ready(vout_ready),
    .pm1_in_valid, .pm1_in_data, .pm1_in_ready, .pm1_out_valid, .pm1_out_data, .pm1_out_ready,
    .pm2_in_valid, .pm2_in_data, .pm2_in_ready, .pm2_out_valid, .pm2_out_data, .pm2_out_ready);

  // ---------------- output chains ----------------
  logic [N_CH-1:0] dmx_valid;
  pkt_word_t       dmx_data;
  logic [15:0]     dmx_bad;

  output_demux #(.N(N_CH)) u_out_mux (
    .clk(clk_net), .rst_n(rst_net_n),
    .in_valid(vout_valid), .in_data(vout_data), .in_ready(vout_ready),
    .out_valid(dmx_valid), .out_data(dmx_data), .bad_count(dmx_bad));

  logic [N_CH-1:0][15:0] out_drop;

  for (genvar i = 0; i < N_CH; i++) begin : g_out
    logic        fv, fr;
    pkt_word_t   fd;
    logic [19:0] vw;
    logic [15:0] rows;

    async_pkt_fifo #(.DEPTH(FIFO_DEPTH)) u_fifo (
      .wr_clk(clk_net), .wr_rst_n(rst_net_n), .wr_valid(dmx_valid[i]), .wr_data(dmx_data),
      .drop_count(out_drop[i]),
      .rd_clk(vid_tx_clk), .rd_rst_n(vid_tx_rst_n), .rd_valid(fv), .rd_data(fd), .rd_ready(fr));

    frame_generator u_gen (
      .clk(vid_tx_clk), .rst_n(vid_tx_rst_n), .rd_valid(fv), .rd_data(fd), .rd_ready(fr),
      .start_delay(start_delay), .vid_word(vw), .running(gen_running[i]),
      .late_count(gen_late[i]), .miss_count(gen_miss[i]), .row_count(rows));

    sdi_tx_if u_tx (.clk(vid_tx_clk), .rst_n(vid_tx_rst_n), .vid_word(vw), .tx_word(sdi_tx_word[i]));
  end

  // ---------------- register bridge ----------------
  always_comb begin
    status = '0;
    status[1:0] = active_mode;
    for (int i = 0; i < N_CH && i < 8; i++) begin
      status[8 + i]  = dec_locked[i];
      status[16 + i] = gen_running[i];
    end
    stat_cnt    = '0;
    stat_cnt[0] = cls_drop;
    stat_cnt[1] = rx_drop;
    stat_cnt[2] = tx_drop;
    stat_cnt[3] = dmx_bad;
    stat_cnt[4] = switch_count;
    for (int i = 0; i < N_CH; i++) begin
      stat_cnt[5 + i]            = in_drop[i];
      stat_cnt[5 + N_CH + i]     = out_drop[i];
      stat_cnt[5 + 2 * N_CH + i] = gen_late[i];
      stat_cnt[5 + 3 * N_CH + i] = gen_miss[i];
    end
  end

  plb_bridge #(.N_RULES(N_RULES), .N_STAT(N_STAT)) u_bridge (
    .clk(clk_net), .rst_n(rst_net_n),
    .bus_addr, .bus_wr, .bus_rd, .bus_wdata, .bus_rdata, .bus_ack,
    .mode, .start_delay, .hdr_cfg, .rules, .status, .stat_cnt,
    .cpu_rx_valid, .cpu_rx_data, .cpu_rx_ready, .cpu_tx_valid, .cpu_tx_data);
endmodule
