// async_pkt_fifo: store-and-forward packet FIFO between two clock domains.
//
// A dual-port memory holds packet words.  The write side keeps two pointers:
// the running write pointer and a committed pointer that moves up to it only
// when the end-of-packet word is written.  Only the committed pointer is
// passed (Gray coded, two-flop synchroniser) to the read side, so the reader
// sees whole packets and never waits in the middle of one.  The write side
// never stalls: if a packet does not fit, or a new start of packet arrives
// before the previous end, the partial packet is rewound and dropped and
// drop_count increments.  This suits video, which cannot be paused.
//
// Read side is first-word-fall-through: rd_data is valid while rd_valid is
// high and is popped by rd_ready.  Read latency after a commit is about
// three read clocks (synchroniser plus output register).
// The dual-port memory as clock-crossing packet FIFO follows the document;
// the pointer scheme, the drop policy and the depth are this design's choice.
module async_pkt_fifo
  import mvtp_pkg::*;
#(
  parameter int DEPTH = 2048          // words, power of two
) (
  input  logic      wr_clk,
  input  logic      wr_rst_n,
  input  logic      wr_valid,
  input  pkt_word_t wr_data,
  output logic [15:0] drop_count,

  input  logic      rd_clk,
  input  logic      rd_rst_n,
  output logic      rd_valid,
  output pkt_word_t rd_data,
  input  logic      rd_ready
);
  localparam int AW = $clog2(DEPTH);

  pkt_word_t mem [DEPTH];

  function automatic logic [AW:0] bin2gray(input logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction
  function automatic logic [AW:0] gray2bin(input logic [AW:0] g);
    logic [AW:0] b;
    for (int i = AW; i >= 0; i--) b[i] = (i == AW) ? g[i] : (b[i+1] ^ g[i]);
    return b;
  endfunction

  // ---------------- write domain ----------------
  logic [AW:0] wptr, cptr, cptr_gray;
  logic [AW:0] rptr_gray_s1, rptr_gray_s2, rptr_w;
  logic        in_pkt;     // inside a packet that is being stored
  logic        dropping;   // discarding the rest of an overflowed packet
  logic [AW:0] rptr_gray;

  assign rptr_w = gray2bin(rptr_gray_s2);

  logic full, cfull;
  assign full  = (wptr - rptr_w) == (AW+1)'(DEPTH);
  assign cfull = (cptr - rptr_w) == (AW+1)'(DEPTH);

  always_ff @(posedge wr_clk or negedge wr_rst_n) begin
    if (!wr_rst_n) begin
      rptr_gray_s1 <= '0;
      rptr_gray_s2 <= '0;
    end else begin
      rptr_gray_s1 <= rptr_gray;
      rptr_gray_s2 <= rptr_gray_s1;
    end
  end

  always_ff @(posedge wr_clk or negedge wr_rst_n) begin
    if (!wr_rst_n) begin
      wptr       <= '0;
      cptr       <= '0;
      cptr_gray  <= '0;
      in_pkt     <= 1'b0;
      dropping   <= 1'b0;
      drop_count <= '0;
    end else if (wr_valid) begin
      if (wr_data.sop) begin
        if (cfull) begin
          // cannot take even the first word
          dropping   <= !wr_data.eop;
          in_pkt     <= 1'b0;
          wptr       <= cptr;
          drop_count <= drop_count + 16'd1;
        end else begin
          // a start of packet while in_pkt abandons the unfinished packet
          if (in_pkt) drop_count <= drop_count + 16'd1;
          dropping <= 1'b0;
          if (wr_data.eop) begin
            wptr      <= cptr + 1'b1;
            cptr      <= cptr + 1'b1;
            cptr_gray <= bin2gray(cptr + 1'b1);
            in_pkt    <= 1'b0;
          end else begin
            wptr   <= cptr + 1'b1;
            in_pkt <= 1'b1;
          end
        end
      end else if (in_pkt) begin
        if (full) begin
          // overflow: rewind, drop the rest of this packet
          wptr       <= cptr;
          in_pkt     <= 1'b0;
          dropping   <= !wr_data.eop;
          drop_count <= drop_count + 16'd1;
        end else begin
          wptr <= wptr + 1'b1;
          if (wr_data.eop) begin
            cptr      <= wptr + 1'b1;
            cptr_gray <= bin2gray(wptr + 1'b1);
            in_pkt    <= 1'b0;
          end
        end
      end else if (dropping && wr_data.eop) begin
        dropping <= 1'b0;
      end
    end
  end

  // memory write port (kept out of the reset block)
  logic          mem_we;
  logic [AW-1:0] mem_waddr;
  assign mem_we    = wr_valid && (wr_data.sop ? !cfull : (in_pkt && !full));
  assign mem_waddr = wr_data.sop ? cptr[AW-1:0] : wptr[AW-1:0];

  always_ff @(posedge wr_clk) begin
    if (mem_we) mem[mem_waddr] <= wr_data;
  end

  // ---------------- read domain ----------------
  logic [AW:0] rptr, cptr_gray_s1, cptr_gray_s2, cptr_r;

  assign cptr_r = gray2bin(cptr_gray_s2);

  always_ff @(posedge rd_clk or negedge rd_rst_n) begin
    if (!rd_rst_n) begin
      cptr_gray_s1 <= '0;
      cptr_gray_s2 <= '0;
    end else begin
      cptr_gray_s1 <= cptr_gray;
      cptr_gray_s2 <= cptr_gray_s1;
    end
  end

  logic rd_load;
  assign rd_load = (!rd_valid || rd_ready) && (rptr != cptr_r);

  always_ff @(posedge rd_clk or negedge rd_rst_n) begin
    if (!rd_rst_n) begin
      rptr      <= '0;
      rptr_gray <= '0;
      rd_valid  <= 1'b0;
    end else begin
      if (rd_load) begin
        rptr      <= rptr + 1'b1;
        rptr_gray <= bin2gray(rptr + 1'b1);
        rd_valid  <= 1'b1;
      end else if (rd_ready) begin
        rd_valid <= 1'b0;
      end
    end
  end

  always_ff @(posedge rd_clk) begin
    if (rd_load) rd_data <= mem[rptr[AW-1:0]];
  end

endmodule
