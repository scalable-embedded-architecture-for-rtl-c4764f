// output_demux: the output multiplexor, sends each video row packet to the
// output FIFO of its channel.
//
// The channel number sits in header word 5, so the first six words of a
// packet are collected in a small buffer (in_ready high).  When word 5
// arrives the channel is read; the six words are then replayed to that
// channel's output (in_ready low for six clocks) and the rest of the packet
// passes straight through.  A packet whose channel is N or above, or which
// ends before word 5, is discarded and counted in bad_count.  The outputs
// have no ready: they feed packet FIFOs that drop whole packets when full.
// Routing by a header field follows the document's figure of the output
// side; the buffering and drop rule are this design's.
module output_demux
  import mvtp_pkg::*;
#(
  parameter int N = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  input  pkt_word_t         in_data,
  output logic              in_ready,
  output logic [N-1:0]      out_valid,
  output pkt_word_t         out_data,
  output logic [15:0]       bad_count
);
  typedef enum logic [1:0] {D_COLLECT, D_REPLAY, D_PASS, D_DROP} st_e;
  st_e st;

  pkt_word_t  buf_q [6];
  logic [2:0] idx;
  logic [7:0] ch;

  always_comb begin
    out_valid = '0;
    out_data  = in_data;
    in_ready  = 1'b1;
    case (st)
      D_REPLAY: begin
        in_ready = 1'b0;
        out_data = buf_q[idx];
        if (32'(ch) < N) out_valid[ch[$clog2(N > 1 ? N : 2)-1:0]] = 1'b1;
      end
      D_PASS: begin
        if (32'(ch) < N) out_valid[ch[$clog2(N > 1 ? N : 2)-1:0]] = in_valid;
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st <= D_COLLECT; idx <= '0; ch <= '0; bad_count <= '0;
    end else begin
      case (st)
        D_COLLECT: if (in_valid) begin
          if (in_data.sop || idx != 3'd0) begin
            buf_q[in_data.sop ? 3'd0 : idx] <= in_data;
            idx <= in_data.sop ? 3'd1 : idx + 3'd1;
            if (in_data.eop) begin
              idx <= '0;
              bad_count <= bad_count + 16'd1;
            end else if (idx == 3'd5 && !in_data.sop) begin
              ch  <= in_data.data[47:40];
              idx <= '0;
              if (32'(in_data.data[47:40]) < N) st <= D_REPLAY;
              else begin
                st <= D_DROP;
                bad_count <= bad_count + 16'd1;
              end
            end
          end
        end
        D_REPLAY: begin
          idx <= idx + 3'd1;
          if (idx == 3'd5) begin
            idx <= '0;
            st  <= D_PASS;
          end
        end
        D_PASS: if (in_valid && in_data.eop) st <= D_COLLECT;
        default: if (in_valid && in_data.eop) st <= D_COLLECT;
      endcase
    end
  end
endmodule
