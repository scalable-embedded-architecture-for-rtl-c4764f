// pkt_switch: one switch of the processing core (Fig. 4 symbol), a 2:1
// packet-stream selector.
//
// sel chooses which input drives the output; the chosen input sees the
// output's ready.  The other input is discarded when drop_other is set
// (ready held high, words thrown away) and stalled otherwise.  Purely
// combinational.  sel must only change between packets; pkt_core ensures it.
module pkt_switch
  import mvtp_pkg::*;
(
  input  logic      sel,
  input  logic      drop_other,
  input  logic      in0_valid,
  input  pkt_word_t in0_data,
  output logic      in0_ready,
  input  logic      in1_valid,
  input  pkt_word_t in1_data,
  output logic      in1_ready,
  output logic      out_valid,
  output pkt_word_t out_data,
  input  logic      out_ready
);
  always_comb begin
    out_valid = sel ? in1_valid : in0_valid;
    out_data  = sel ? in1_data  : in0_data;
    in0_ready = sel ? drop_other : out_ready;
    in1_ready = sel ? out_ready  : drop_other;
  end
endmodule
