// tb_pkt_rr_mux: four sources offer packets with random gaps and the sink
// applies random backpressure.  Checks that packets are never interleaved,
// that each source's packets arrive complete and in order, and that with all
// four sources requesting the grants rotate 0,1,2,3.
module tb_pkt_rr_mux;
  import mvtp_pkg::*;
  localparam int N = 4;
  logic clk = 0, rst_n = 0;
  logic [N-1:0] in_valid, in_ready;
  pkt_word_t [N-1:0] in_data;
  logic out_valid, out_ready;
  pkt_word_t out_data;
  int checks = 0, failures = 0;

  pkt_rr_mux #(.N(N)) dut (.clk, .rst_n, .in_valid, .in_data, .in_ready,
                           .out_valid, .out_data, .out_ready);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // source s sends packet numbers 0.. with data {s, pkt, word}
  int sent_pkts[N], sent_words[N], word_i[N], plen[N];
  int exp_pkt[N], exp_word[N];
  int total_pkts = 40;
  bit gaps = 1;

  always @(negedge clk) begin
    for (int s = 0; s < N; s++) begin
      if (rst_n && in_valid[s] && in_ready[s]) ;  // handled at posedge
    end
    out_ready = ($urandom_range(0, 4) != 0);
  end

  always @(posedge clk) if (rst_n) begin
    for (int s = 0; s < N; s++)
      if (in_valid[s] && in_ready[s]) begin
        word_i[s]++;
        if (word_i[s] == plen[s]) begin
          word_i[s] = 0; sent_pkts[s]++;
          plen[s] = $urandom_range(1, 6);
        end
      end
  end

  always @(negedge clk) if (rst_n) begin
    for (int s = 0; s < N; s++) begin
      if (sent_pkts[s] < total_pkts && (word_i[s] != 0 || !gaps || $urandom_range(0, 2) == 0 || in_valid[s])) begin
        in_valid[s] = 1;
        in_data[s].sop = (word_i[s] == 0);
        in_data[s].eop = (word_i[s] == plen[s] - 1);
        in_data[s].empty = 0;
        in_data[s].data = {8'(s), 24'(sent_pkts[s]), 32'(word_i[s])};
      end else in_valid[s] = 0;
    end
  end

  // checker
  int cur_src = -1;
  int grant_seq[$];
  always @(posedge clk) if (rst_n && out_valid && out_ready) begin
    int s, p, w;
    s = int'(out_data.data[63:56]); p = int'(out_data.data[55:32]); w = int'(out_data.data[31:0]);
    checks++;
    if (out_data.sop) begin
      if (cur_src != -1) begin failures++; $display("interleave"); end
      cur_src = s;
      grant_seq.push_back(s);
    end
    if (s != cur_src || p != exp_pkt[s] || w != exp_word[s]) begin
      failures++;
      if (failures < 5) $display("bad word src %0d pkt %0d w %0d (exp src %0d pkt %0d w %0d)", s, p, w, cur_src, exp_pkt[s], exp_word[s]);
    end
    exp_word[s]++;
    if (out_data.eop) begin
      exp_pkt[s]++; exp_word[s] = 0; cur_src = -1;
    end
  end

  initial begin
    in_valid = '0; in_data = '0; out_ready = 0;
    for (int s = 0; s < N; s++) plen[s] = $urandom_range(1, 6);
    repeat (3) @(posedge clk);
    @(negedge clk); rst_n = 1;
    // phase 1: all sources always requesting -> strict rotation
    gaps = 0;
    wait (grant_seq.size() >= 20);
    for (int i = 1; i < 20; i++) begin
      checks++;
      if (grant_seq[i] != (grant_seq[i-1] + 1) % N) begin
        failures++; $display("rotation broken at %0d: %0d after %0d", i, grant_seq[i], grant_seq[i-1]);
      end
    end
    gaps = 1;
    wait (exp_pkt[0] == total_pkts && exp_pkt[1] == total_pkts &&
          exp_pkt[2] == total_pkts && exp_pkt[3] == total_pkts);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
