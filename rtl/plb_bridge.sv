// plb_bridge: register window of the design on the embedded processor's bus.
//
// A simple slave: bus_wr or bus_rd with a byte address, acknowledged one
// clock later (bus_ack), read data valid with the acknowledge.  Runs in the
// network clock domain.  Register map (byte addresses):
//   000 CTRL        [1:0] requested core mode (0 net-net, 1 duplex, 2 video-video)
//   004 STATUS      read: status word from the design
//   008 START_DELAY [7:0] output buffering, in lines
//   010/014 destination MAC [47:32]/[31:0]   018/01C source MAC
//   020 source IP   024 destination IP       028 UDP {source, destination} port
//   300+4*i         read: status counter i (N_STAT counters, up to 64)
//   100+80h*r       rule r: [2] enable [1] to VPM [0] to RX FIFO
//   110+80h*r+20h*t term t of rule r: +0 word index, +4/+8 mask hi/lo,
//                   +C/+10 value hi/lo
//   400 RX_STAT     read: [31] word available [30] sop [29] eop [26:24] empty
//   404/408 RX data hi/lo, reading 408 pops the word
//   410 TX_CTRL     [4] sop [3] eop [2:0] empty of the next word
//   414/418 TX data hi/lo, writing 418 pushes the word into the TX FIFO
// The rule memory resets to all rules disabled; software writes it.  That
// registers, rule memory and FIFOs are reached through a bridge on the
// processor bus follows the document; the bus protocol and the map are this
// design's.
module plb_bridge
  import mvtp_pkg::*;
#(
  parameter int N_RULES = 4,
  parameter int N_STAT  = 16
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [11:0] bus_addr,
  input  logic        bus_wr,
  input  logic        bus_rd,
  input  logic [31:0] bus_wdata,
  output logic [31:0] bus_rdata,
  output logic        bus_ack,

  output core_mode_e  mode,
  output logic [7:0]  start_delay,
  output net_hdr_cfg_t hdr_cfg,
  output rule_t [N_RULES-1:0] rules,
  input  logic [31:0] status,
  input  logic [N_STAT-1:0][15:0] stat_cnt,

  input  logic        cpu_rx_valid,
  input  pkt_word_t   cpu_rx_data,
  output logic        cpu_rx_ready,
  output logic        cpu_tx_valid,
  output pkt_word_t   cpu_tx_data
);
  logic [31:0] tx_hi;
  logic [4:0]  tx_ctrl;

  // address decode helpers
  logic        in_rules;
  logic [1:0]  r_sel;
  logic [6:0]  r_off;
  assign in_rules = bus_addr[11:8] inside {4'h1, 4'h2} &&
                    (32'(bus_addr[9:7]) - 32'd2 < 32'(N_RULES));
  assign r_sel    = 2'(bus_addr[9:7] - 3'd2);
  assign r_off    = bus_addr[6:0];

  logic [1:0] t_sel;
  logic [4:0] t_off;
  logic       t_ok;
  assign t_sel = 2'((r_off - 7'h10) >> 5);
  assign t_off = 5'((r_off - 7'h10) & 7'h1F);
  assign t_ok  = r_off >= 7'h10 && 32'(t_sel) < N_TERMS;

  assign cpu_rx_ready = bus_rd && bus_addr == 12'h408;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mode        <= MODE_DUPLEX;
      start_delay <= 8'd2;
      hdr_cfg     <= '{dst_mac: 48'h02_00_00_00_00_02, src_mac: 48'h02_00_00_00_00_01,
                       src_ip: 32'h0A_00_00_01, dst_ip: 32'h0A_00_00_02,
                       udp_src: 16'd5004, udp_dst: 16'd5004};
      rules       <= '0;
      tx_hi       <= '0;
      tx_ctrl     <= '0;
      cpu_tx_valid <= 1'b0;
      cpu_tx_data  <= '0;
      bus_ack     <= 1'b0;
      bus_rdata   <= '0;
    end else begin
      bus_ack      <= bus_wr || bus_rd;
      cpu_tx_valid <= 1'b0;
      if (bus_wr) begin
        case (bus_addr)
          12'h000: if (bus_wdata[1:0] != 2'd3) mode <= core_mode_e'(bus_wdata[1:0]);
          12'h008: start_delay <= bus_wdata[7:0];
          12'h010: hdr_cfg.dst_mac[47:32] <= bus_wdata[15:0];
          12'h014: hdr_cfg.dst_mac[31:0]  <= bus_wdata;
          12'h018: hdr_cfg.src_mac[47:32] <= bus_wdata[15:0];
          12'h01C: hdr_cfg.src_mac[31:0]  <= bus_wdata;
          12'h020: hdr_cfg.src_ip  <= bus_wdata;
          12'h024: hdr_cfg.dst_ip  <= bus_wdata;
          12'h028: {hdr_cfg.udp_src, hdr_cfg.udp_dst} <= bus_wdata;
          12'h410: tx_ctrl <= bus_wdata[4:0];
          12'h414: tx_hi   <= bus_wdata;
          12'h418: begin
            cpu_tx_valid <= 1'b1;
            cpu_tx_data  <= '{sop: tx_ctrl[4], eop: tx_ctrl[3], empty: tx_ctrl[2:0],
                              data: {tx_hi, bus_wdata}};
          end
          default: if (in_rules) begin
            if (r_off == 7'h00)
              {rules[r_sel].en, rules[r_sel].to_vpm, rules[r_sel].to_rx} <= bus_wdata[2:0];
            else if (t_ok)
              case (t_off)
                5'h00: rules[r_sel].term[t_sel].idx          <= bus_wdata[2:0];
                5'h04: rules[r_sel].term[t_sel].mask[63:32]  <= bus_wdata;
                5'h08: rules[r_sel].term[t_sel].mask[31:0]   <= bus_wdata;
                5'h0C: rules[r_sel].term[t_sel].value[63:32] <= bus_wdata;
                5'h10: rules[r_sel].term[t_sel].value[31:0]  <= bus_wdata;
                default: ;
              endcase
          end
        endcase
      end
      if (bus_rd) begin
        bus_rdata <= '0;
        case (bus_addr)
          12'h000: bus_rdata <= {30'd0, mode};
          12'h004: bus_rdata <= status;
          12'h008: bus_rdata <= {24'd0, start_delay};
          12'h010: bus_rdata <= {16'd0, hdr_cfg.dst_mac[47:32]};
          12'h014: bus_rdata <= hdr_cfg.dst_mac[31:0];
          12'h018: bus_rdata <= {16'd0, hdr_cfg.src_mac[47:32]};
          12'h01C: bus_rdata <= hdr_cfg.src_mac[31:0];
          12'h020: bus_rdata <= hdr_cfg.src_ip;
          12'h024: bus_rdata <= hdr_cfg.dst_ip;
          12'h028: bus_rdata <= {hdr_cfg.udp_src, hdr_cfg.udp_dst};
          12'h400: bus_rdata <= {cpu_rx_valid, cpu_rx_data.sop, cpu_rx_data.eop, 2'd0,
                                 cpu_rx_data.empty, 24'd0};
          12'h404: bus_rdata <= cpu_rx_data.data[63:32];
          12'h408: bus_rdata <= cpu_rx_data.data[31:0];
          default: begin
            if (bus_addr[11:8] == 4'h3 && 32'(bus_addr[7:2]) < N_STAT)
              bus_rdata <= {16'd0, stat_cnt[bus_addr[7:2]]};
            else if (in_rules) begin
              if (r_off == 7'h00)
                bus_rdata <= {29'd0, rules[r_sel].en, rules[r_sel].to_vpm, rules[r_sel].to_rx};
              else if (t_ok)
                case (t_off)
                  5'h00: bus_rdata <= {29'd0, rules[r_sel].term[t_sel].idx};
                  5'h04: bus_rdata <= rules[r_sel].term[t_sel].mask[63:32];
                  5'h08: bus_rdata <= rules[r_sel].term[t_sel].mask[31:0];
                  5'h0C: bus_rdata <= rules[r_sel].term[t_sel].value[63:32];
                  5'h10: bus_rdata <= rules[r_sel].term[t_sel].value[31:0];
                  default: ;
                endcase
            end
          end
        endcase
      end
    end
  end
endmodule
