// tb_output_demux: sends row-like packets whose header word 5 names a
// channel (some out of range, some too short) and checks that each valid
// packet arrives complete and in order on its channel's output only, and
// that the others are counted as bad.
module tb_output_demux;
  import mvtp_pkg::*;
  localparam int N = 4;
  logic clk = 0, rst_n = 0;
  logic in_valid, in_ready;
  pkt_word_t in_data, out_data;
  logic [N-1:0] out_valid;
  logic [15:0] bad_count;
  int checks = 0, failures = 0;

  output_demux #(.N(N)) dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  pkt_word_t expq[N][$];
  int bad_exp = 0;

  always @(posedge clk) if (rst_n) begin
    checks++;
    if ($countones(out_valid) > 1) begin failures++; $display("two outputs valid"); end
    for (int c = 0; c < N; c++) if (out_valid[c]) begin
      checks++;
      if (expq[c].size() == 0 || out_data !== expq[c][0]) begin
        failures++;
        if (failures < 6) $display("ch %0d got %h", c, out_data.data);
      end
      if (expq[c].size() != 0) void'(expq[c].pop_front());
    end
  end

  initial begin
    in_valid = 0; in_data = '0;
    repeat (3) @(posedge clk);
    @(negedge clk); rst_n = 1;
    for (int p = 0; p < 100; p++) begin
      int ch, len;
      ch  = $urandom_range(0, 5);
      len = ($urandom_range(0, 9) == 0) ? $urandom_range(1, 5) : $urandom_range(7, 20);
      if (ch >= N || len < 6) bad_exp++;
      for (int i = 0; i < len; i++) begin
        pkt_word_t w;
        w.sop = (i == 0); w.eop = (i == len - 1); w.empty = 0;
        w.data = {32'(p), 32'(i)};
        if (i == 5) w.data[47:40] = 8'(ch);
        if (ch < N && len >= 6) expq[ch].push_back(w);
        @(negedge clk);
        in_valid = ($urandom_range(0, 4) != 0);
        while (!in_valid) begin
          @(negedge clk); in_valid = ($urandom_range(0, 4) != 0);
        end
        in_data = w;
        do @(posedge clk); while (!in_ready);
        @(negedge clk); in_valid = 0;
      end
    end
    repeat (20) @(posedge clk);
    for (int c = 0; c < N; c++) begin
      checks++;
      if (expq[c].size() != 0) begin failures++; $display("ch %0d missing %0d", c, expq[c].size()); end
    end
    checks++;
    if (bad_count != 16'(bad_exp)) begin failures++; $display("bad %0d exp %0d", bad_count, bad_exp); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
