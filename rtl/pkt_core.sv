// pkt_core: interconnect of the network packet processing core (Fig. 4).
//
// Two sets of processing modules (PM1, PM2) sit between three switches:
//   switch 1 feeds PM2 from the network input or the video input,
//   switch 3 feeds PM1 from the PM2 output or the video input,
//   switch 2 feeds the video output from the PM2 or the PM1 output;
//   the PM1 output is also the network output.
// The mode picks one of the three configurations of the document:
//   MODE_NET_NET  net in -> sw1 -> PM2 -> sw3 -> PM1 -> net out
//   MODE_DUPLEX   net in -> sw1 -> PM2 -> sw2 -> video out, and
//                 video in -> sw3 -> PM1 -> net out
//   MODE_VID_VID  video in -> sw1 -> PM2 -> sw3 -> PM1 -> sw2 -> video out
// A source that the mode does not use is drained and its packets discarded,
// and an output that the mode does not use is held invalid.  A newly
// requested mode is taken over (active_mode) only at a moment when no packet
// is in flight on any of the four core sources, so no packet is split.
// The processing modules themselves are outside: their inputs and outputs
// are ports.  All paths are combinational (the network output is the PM1
// output wire itself); the only state is the mode and the in-packet flags.  The three configurations and the switch positions
// follow the document; the drain and switch-over rules are this design's.
module pkt_core
  import mvtp_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  core_mode_e mode,
  output core_mode_e active_mode,
  output logic [15:0] switch_count,

  input  logic      net_in_valid,
  input  pkt_word_t net_in_data,
  output logic      net_in_ready,
  input  logic      vid_in_valid,
  input  pkt_word_t vid_in_data,
  output logic      vid_in_ready,

  output logic      net_out_valid,
  output pkt_word_t net_out_data,
  input  logic      net_out_ready,
  output logic      vid_out_valid,
  output pkt_word_t vid_out_data,
  input  logic      vid_out_ready,

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
  output logic      pm2_out_ready
);
  logic sel1, sel2, sel3, net_en, vid_en;
  assign sel1   = active_mode == MODE_VID_VID;
  assign sel3   = active_mode == MODE_DUPLEX;
  assign sel2   = active_mode == MODE_VID_VID;
  assign net_en = active_mode != MODE_VID_VID;
  assign vid_en = active_mode != MODE_NET_NET;

  logic      sw1_vid_ready, sw3_vid_ready, sw3_pm2_ready, sw2_pm2_ready, sw2_pm1_ready;
  logic      sw2_valid, sw2_ready;
  pkt_word_t sw2_data;

  pkt_switch u_sw1 (
    .sel(sel1), .drop_other(1'b1),
    .in0_valid(net_in_valid), .in0_data(net_in_data), .in0_ready(net_in_ready),
    .in1_valid(vid_in_valid), .in1_data(vid_in_data), .in1_ready(sw1_vid_ready),
    .out_valid(pm2_in_valid), .out_data(pm2_in_data), .out_ready(pm2_in_ready));

  pkt_switch u_sw3 (
    .sel(sel3), .drop_other(1'b1),
    .in0_valid(pm2_out_valid), .in0_data(pm2_out_data), .in0_ready(sw3_pm2_ready),
    .in1_valid(vid_in_valid), .in1_data(vid_in_data), .in1_ready(sw3_vid_ready),
    .out_valid(pm1_in_valid), .out_data(pm1_in_data), .out_ready(pm1_in_ready));

  pkt_switch u_sw2 (
    .sel(sel2), .drop_other(1'b1),
    .in0_valid(pm2_out_valid), .in0_data(pm2_out_data), .in0_ready(sw2_pm2_ready),
    .in1_valid(pm1_out_valid), .in1_data(pm1_out_data), .in1_ready(sw2_pm1_ready),
    .out_valid(sw2_valid), .out_data(sw2_data), .out_ready(sw2_ready));

  // outputs not used by the mode are switched off and drain
  assign vid_out_valid = vid_en && sw2_valid;
  assign vid_out_data  = sw2_data;
  assign sw2_ready     = vid_en ? vid_out_ready : 1'b1;

  assign net_out_valid = net_en && pm1_out_valid;
  assign net_out_data  = pm1_out_data;

  // fan-out sources: the branch that does not use the source returns ready
  assign vid_in_ready  = sw1_vid_ready && sw3_vid_ready;
  assign pm2_out_ready = sw3_pm2_ready && sw2_pm2_ready;
  assign pm1_out_ready = (net_en ? net_out_ready : 1'b1) && sw2_pm1_ready;

  // ---------------- mode switch-over between packets ----------------
  logic [3:0] busy, acc, acc_eop;
  assign acc     = {net_in_valid && net_in_ready, vid_in_valid && vid_in_ready,
                    pm1_out_valid && pm1_out_ready, pm2_out_valid && pm2_out_ready};
  assign acc_eop = {net_in_data.eop, vid_in_data.eop, pm1_out_data.eop, pm2_out_data.eop};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy         <= '0;
      active_mode  <= MODE_DUPLEX;
      switch_count <= '0;
    end else begin
      for (int i = 0; i < 4; i++)
        if (acc[i]) busy[i] <= !acc_eop[i];
      if (mode != active_mode && busy == '0 && (acc & ~acc_eop) == '0) begin
        active_mode  <= mode;
        switch_count <= switch_count + 16'd1;
      end
    end
  end
endmodule
