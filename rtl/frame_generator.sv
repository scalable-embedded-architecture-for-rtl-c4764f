// frame_generator: rebuilds a continuous HD-SDI raster from row packets.
//
// Row packets (format of mvtp_pkg) are read from the output packet FIFO.  The
// seven header words are consumed first; the video header gives the frame
// number, the active line index and the raster size.  The generator runs its
// own raster counters in the HD-SDI output clock: a frame is lines
// 0..TL-1, of which lines TL-AL..TL-1 are active; a line is words 0..TW-1,
// with EAV on words 0..3, SAV on the four words before the active part, and
// the active part on the last AW words.
//
// Synchronisation: while not running, packets are discarded until one with
// line index 0 is at the head.  Its header sets the format and the frame
// number, and the raster starts start_delay lines before the first active
// line, so start_delay sets how many rows may queue in the FIFO (the buffer
// level that absorbs network jitter).  While running, each row packet is
// compared with the next active line still to be sent: an older packet is
// discarded (late_count), a matching one is sent on its line, a newer one
// waits.  An active line whose packet is not there is sent black
// (miss_count).  A packet more than two frames ahead restarts the lock.
//
// Output: one {Y,C} word per clock, registered (one clock latency from the
// raster counters).  Rebuilding the image from header information follows
// the document; the lock rule, blanking levels (Y 040h, C 200h) and TRS
// coding (SMPTE 274) are this design's choice.  Line number and CRC words
// are not inserted, and only progressive rasters (F=0) are produced.
module frame_generator
  import mvtp_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             rd_valid,
  input  pkt_word_t        rd_data,
  output logic             rd_ready,
  input  logic [7:0]       start_delay,
  output logic [SDI_W-1:0] vid_word,
  output logic             running,
  output logic [15:0]      late_count,
  output logic [15:0]      miss_count,
  output logic [15:0]      row_count
);
  typedef enum logic [1:0] {S_HDR, S_HAVE, S_PAY, S_DROP} st_e;
  st_e st;

  logic [2:0]  hw;              // header word index
  logic [63:0] w5;
  vid_hdr_t    ph;              // header of the head packet
  // raster
  logic [15:0] tw, aw, tl, al;  // format in force
  logic [15:0] wpos, line;
  logic [7:0]  cf;              // frame of the current raster frame
  logic [1:0]  pk;              // pair index in payload word
  logic        pay_done;        // payload ended early (eop seen)

  logic [15:0] vb, act_start;
  assign vb        = tl - al;
  assign act_start = tw - aw;

  logic act_line, act_word, last_word;
  assign act_line  = line >= vb;
  assign act_word  = wpos >= act_start;
  assign last_word = wpos == tw - 16'd1;

  // next active line whose start has not passed
  logic [7:0]  tf;
  logic [15:0] tln;
  always_comb begin
    if (act_line && wpos < act_start) begin
      tf = cf; tln = line - vb;
    end else if (act_line && line + 16'd1 < tl) begin
      tf = cf; tln = line - vb + 16'd1;
    end else if (act_line) begin
      tf = cf + 8'd1; tln = '0;
    end else begin
      tf = cf; tln = '0;
    end
  end

  logic signed [7:0] fd;
  logic late, match, far_ahead, start_pay;
  assign fd        = signed'(ph.frame - tf);
  assign late      = (fd < 0) || (fd == 0 && ph.line < tln);
  assign far_ahead = fd > 8'sd2;
  assign match     = (fd == 0) && (ph.line == tln);
  assign start_pay = running && st == S_HAVE && match && act_line && wpos == act_start - 16'd1;

  // payload pair for this word
  logic [19:0] pair;
  always_comb begin
    case (pk)
      2'd0:    pair = rd_data.data[59:40];
      2'd1:    pair = rd_data.data[39:20];
      default: pair = rd_data.data[19:0];
    endcase
  end

  logic pay_now;   // this word takes a pair from the FIFO head
  assign pay_now = running && st == S_PAY && act_line && act_word && !pay_done && rd_valid;

  always_comb begin
    rd_ready = 1'b0;
    case (st)
      S_HDR:   rd_ready = 1'b1;
      S_DROP:  rd_ready = 1'b1;
      S_PAY:   rd_ready = pay_now && (pk == 2'd2 || last_word);
      default: rd_ready = 1'b0;
    endcase
  end

  // raster word for this position
  logic [SDI_W-1:0] word_d;
  always_comb begin
    logic [9:0] xyz;
    xyz = trs_xyz(1'b0, !act_line, wpos < 16'd4);
    word_d = {Y_BLANK, C_BLANK};
    if (running) begin
      if (wpos == 16'd0 || wpos == act_start - 16'd4) word_d = 20'hFFFFF;
      else if (wpos == 16'd1 || wpos == 16'd2 ||
               wpos == act_start - 16'd3 || wpos == act_start - 16'd2) word_d = 20'h00000;
      else if (wpos == 16'd3 || wpos == act_start - 16'd1) word_d = {xyz, xyz};
      else if (act_line && act_word && pay_now) word_d = pair;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= S_HDR; hw <= '0; w5 <= '0; ph <= '0;
      tw <= '0; aw <= '0; tl <= '0; al <= '0; wpos <= '0; line <= '0; cf <= '0;
      pk <= '0; pay_done <= 1'b0; running <= 1'b0;
      late_count <= '0; miss_count <= '0; row_count <= '0;
      vid_word <= {Y_BLANK, C_BLANK};
    end else begin
      vid_word <= word_d;

      // ---------------- raster counters ----------------
      if (running) begin
        if (last_word) begin
          wpos <= '0;
          if (line == tl - 16'd1) begin
            line <= '0;
            cf   <= cf + 8'd1;
          end else begin
            line <= line + 16'd1;
          end
        end else begin
          wpos <= wpos + 16'd1;
        end
        if (act_line && wpos == act_start - 16'd1 && !start_pay)
          miss_count <= miss_count + 16'd1;
      end

      // ---------------- packet side ----------------
      case (st)
        S_HDR: if (rd_valid) begin
          if (hw == 3'd0 && !rd_data.sop) begin
            hw <= '0;                       // stray word
          end else if (rd_data.eop) begin
            hw <= '0;                       // runt packet
          end else begin
            hw <= hw + 3'd1;
            if (hw == 3'd5) w5 <= rd_data.data;
            if (hw == 3'd6) begin
              ph <= parse_hdr(w5, rd_data.data);
              st <= S_HAVE;
              hw <= '0;
            end
          end
        end
        S_HAVE: begin
          if (!running) begin
            if (ph.line == 16'd0 && ph.total_words > ph.active_words + 16'd8 &&
                ph.total_lines > ph.active_lines && ph.active_words != 16'd0) begin
              running <= 1'b1;
              tw <= ph.total_words; aw <= ph.active_words;
              tl <= ph.total_lines; al <= ph.active_lines;
              cf <= ph.frame;
              wpos <= '0;
              line <= (ph.total_lines - ph.active_lines > 16'(start_delay)) ?
                      ph.total_lines - ph.active_lines - 16'(start_delay) : 16'd0;
            end else begin
              st <= S_DROP;
            end
          end else if (far_ahead) begin
            running <= 1'b0;                // lost: lock again on this packet
          end else if (late) begin
            late_count <= late_count + 16'd1;
            st <= S_DROP;
          end else if (start_pay) begin
            st       <= S_PAY;
            pk       <= '0;
            pay_done <= 1'b0;
          end
        end
        S_PAY: begin
          if (pay_now) begin
            pk <= (pk == 2'd2) ? 2'd0 : pk + 2'd1;
            if (rd_ready && rd_data.eop) pay_done <= 1'b1;
          end
          if (last_word) begin
            row_count <= row_count + 16'd1;
            if (pay_done || (rd_ready && rd_data.eop)) st <= S_HDR;
            else st <= S_DROP;
          end
        end
        default: if (rd_valid && rd_data.eop) st <= S_HDR;   // S_DROP
      endcase
    end
  end
endmodule
