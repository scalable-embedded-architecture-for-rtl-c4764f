// pkt_rr_mux: N packet streams into one, whole packets in round-robin order.
//
// While idle the multiplexer grants the first requesting input after the one
// granted last.  The grant is held until the end-of-packet word has been
// accepted, so packets are never interleaved.  The data path is
// combinational (no added latency); out_valid/in_ready follow the standard
// valid/ready handshake.  Used as the input multiplexer of the video input
// channels and as the packet multiplexer of the network interface.  Round
// robin at packet granularity is the document's; the rest is this design's.
// The handshake assertion is disabled during reset; that use of rst_n in a
// clocked property is why lint sees the reset used both ways.
module pkt_rr_mux
  import mvtp_pkg::*;
#(
  parameter int N = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [N-1:0]      in_valid,
  input  pkt_word_t [N-1:0] in_data,
  output logic [N-1:0]      in_ready,
  output logic              out_valid,
  output pkt_word_t         out_data,
  input  logic              out_ready
);
  localparam int SW = (N > 1) ? $clog2(N) : 1;

  logic          busy;        // a packet is being forwarded
  logic [SW-1:0] cur;         // granted input
  logic [SW-1:0] last;        // last granted input
  logic [SW-1:0] pick;
  logic          pick_ok;
  logic [SW-1:0] sel;

  // next requester after 'last'
  always_comb begin
    pick    = '0;
    pick_ok = 1'b0;
    for (int k = 1; k <= N; k++) begin
      if (!pick_ok && in_valid[(int'(last) + k) % N]) begin
        pick    = SW'((int'(last) + k) % N);
        pick_ok = 1'b1;
      end
    end
  end

  assign sel = busy ? cur : pick;

  always_comb begin
    out_valid = busy ? in_valid[cur] : pick_ok;
    out_data  = in_data[sel];
    in_ready  = '0;
    if (busy || pick_ok) in_ready[sel] = out_ready;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;
      cur  <= '0;
      last <= SW'(N - 1);
    end else if (out_valid && out_ready) begin
      if (out_data.eop) begin
        busy <= 1'b0;
        last <= sel;
      end else begin
        busy <= 1'b1;
        cur  <= sel;
      end
    end
  end

  // a held word must not change before it is taken
  property p_hold;
    @(posedge clk) disable iff (!rst_n) (out_valid && !out_ready) |=> out_valid;
  endproperty
  a_hold: assert property (p_hold);

endmodule
