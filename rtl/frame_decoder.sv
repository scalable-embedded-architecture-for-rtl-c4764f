// frame_decoder: turns the active rows of an HD-SDI raster into network
// packets.
//
// The decoder follows the TRS flags from sdi_rx_if.  It measures the raster:
// words per line (EAV to EAV), active words per line (SAV to EAV), lines per
// frame and active lines per frame.  A frame starts at the first line whose
// EAV has V=1 after a line with V=0 (start of vertical blanking).  After one
// whole frame has been measured the decoder is locked, and every active row
// (V=0) becomes one packet: the seven header words of mvtp_pkg (Ethernet,
// IPv4 and UDP headers, then the video header with channel, frame, line and
// the raster format) followed by the row's {Y,C} words packed three per
// 64-bit word.  Blanking is not carried.  A change of the measured line or
// frame size drops lock for one frame.
//
// Timing: header words go out on words 4..10 of the line opened by the EAV that opens an
// active line; payload words go out as they fill, one word held back so that
// the last one can carry eop when the next EAV arrives.  Output is a packet
// stream in the video clock domain without backpressure (the packet FIFO
// behind it drops whole packets when full).  Row-per-packet and the video
// header with format parameters follow the document; the header layout,
// the lock rule and the timing are this design's.
module frame_decoder
  import mvtp_pkg::*;
#(
  parameter logic [7:0] CH_ID = 8'd0
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [SDI_W-1:0] vid_word,
  input  logic             vid_valid,
  input  logic             trs_start,
  input  logic             trs_v,
  input  logic             trs_h,
  input  net_hdr_cfg_t     hdr_cfg,
  output logic             pkt_valid,
  output pkt_word_t        pkt,
  output logic             locked,
  output logic [15:0]      row_count      // packets started
);
  logic        eav, sav;
  assign eav = vid_valid && trs_start && trs_h;
  assign sav = vid_valid && trs_start && !trs_h;

  // raster measurement
  logic [15:0] wpos;           // word index since EAV start
  logic [15:0] lc;             // line index in frame
  logic [15:0] al;             // active lines so far in frame
  logic [15:0] act_cnt;        // active words in current line
  logic        line_v;         // V of current line
  logic        seen_line;      // a full line has been seen
  logic [1:0]  frames_seen;
  logic [7:0]  fc;             // frame counter
  logic [1:0]  sav_skip;
  logic        in_act;

  vid_hdr_t    fmt;            // measured format (channel/frame/line unused)

  // packet building
  logic        hdr_go;         // this line is sent
  logic [15:0] cur_line;       // active line index of this line
  logic [59:0] acc;
  logic [1:0]  k;
  pkt_word_t   held;
  logic        held_v;
  logic        pend_v;
  pkt_word_t   pend;
  logic        pkt_open;

  vid_hdr_t    hdr_now;
  always_comb begin
    hdr_now              = fmt;
    hdr_now.channel      = CH_ID;
    hdr_now.frame        = fc;
    hdr_now.line         = cur_line;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wpos <= '0; lc <= '0; al <= '0; act_cnt <= '0; line_v <= 1'b1;
      seen_line <= 1'b0; frames_seen <= '0; fc <= '0; sav_skip <= '0; in_act <= 1'b0;
      fmt <= '0; locked <= 1'b0;
      hdr_go <= 1'b0; cur_line <= '0; acc <= '0; k <= '0;
      held <= '0; held_v <= 1'b0; pend <= '0; pend_v <= 1'b0; pkt_open <= 1'b0;
      pkt_valid <= 1'b0; pkt <= '0; row_count <= '0;
    end else begin
      pkt_valid <= 1'b0;
      if (vid_valid) begin
        wpos <= wpos + 16'd1;

        // ------------- end of line / start of next line -------------
        if (eav) begin
          wpos   <= 16'd1;
          in_act <= 1'b0;
          if (seen_line) begin
            if (!line_v) begin
              if (fmt.active_words != act_cnt) locked <= 1'b0;
              fmt.active_words <= act_cnt;
            end
            if (fmt.total_words != wpos) locked <= 1'b0;
            fmt.total_words <= wpos;
          end
          seen_line <= 1'b1;
          act_cnt   <= '0;
          line_v    <= trs_v;
          if (trs_v && !line_v) begin
            // first blanking line after the active picture: new frame
            lc <= '0;
            al <= '0;
            fc <= fc + 8'd1;
            fmt.total_lines  <= lc + 16'd1;
            fmt.active_lines <= al;
            if (frames_seen != 2'd3) frames_seen <= frames_seen + 2'd1;
            if (frames_seen >= 2'd1) begin
              if (frames_seen == 2'd1 ||
                  (fmt.total_lines == lc + 16'd1 && fmt.active_lines == al))
                locked <= 1'b1;
              else
                locked <= 1'b0;
            end
          end else begin
            lc <= lc + 16'd1;
          end
          if (!trs_v) al <= al + 16'd1;
          cur_line <= al;
          hdr_go   <= !trs_v && locked && (fmt.active_words != 16'd0);
          // close the open packet
          if (pkt_open) begin
            pkt_open <= 1'b0;
            held_v   <= 1'b0;
            if (k != 2'd0) begin
              pkt_valid <= held_v;
              pkt       <= held;
              pend_v    <= 1'b1;
              pend      <= '{sop: 1'b0, eop: 1'b1, empty: 3'd0, data: {4'h0, acc}};
            end else begin
              pkt_valid <= held_v;
              pkt       <= held;
              pkt.eop   <= 1'b1;
            end
          end
          k   <= '0;
          acc <= '0;
        end else if (pend_v) begin
          pkt_valid <= 1'b1;
          pkt       <= pend;
          pend_v    <= 1'b0;
        end else if (hdr_go && wpos >= 16'd4 && wpos <= 16'd10) begin
          // header words 0..6 on words 4..10 of the line
          pkt_valid <= 1'b1;
          pkt       <= '{sop: (wpos == 16'd4), eop: 1'b0, empty: 3'd0,
                         data: hdr_word(32'(wpos - 16'd4), hdr_cfg, hdr_now)};
          if (wpos == 16'd4) row_count <= row_count + 16'd1;
          if (wpos == 16'd10) pkt_open <= 1'b1;
        end

        // ------------- active video -------------
        if (sav && !line_v) begin
          sav_skip <= 2'd3;
          in_act   <= 1'b0;
        end else if (sav_skip != 2'd0) begin
          sav_skip <= sav_skip - 2'd1;
          if (sav_skip == 2'd1) in_act <= 1'b1;
        end else if (in_act && !trs_start) begin
          act_cnt <= act_cnt + 16'd1;
          if (pkt_open) begin
            case (k)
              2'd0: begin acc[59:40] <= vid_word; k <= 2'd1; end
              2'd1: begin acc[39:20] <= vid_word; k <= 2'd2; end
              default: begin
                k      <= 2'd0;
                acc    <= '0;
                held   <= '{sop: 1'b0, eop: 1'b0, empty: 3'd0,
                            data: {4'h0, acc[59:20], vid_word}};
                held_v <= 1'b1;
                if (held_v) begin
                  pkt_valid <= 1'b1;
                  pkt       <= held;
                end
              end
            endcase
          end
        end
      end
    end
  end
endmodule
