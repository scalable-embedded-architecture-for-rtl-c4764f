// tb_pkt_core: runs packets from the network input and the video input
// through the core in each of the three modes.  The two processing-module
// slots are stand-in models that mark the data they pass (PM1 flips bit 56,
// PM2 flips bit 57), so the path a packet took can be read from its data.
// Checks the destination and marking of every word, that unused sources
// are drained, and that a mode change waits for the end of a packet.
module tb_pkt_core;
  import mvtp_pkg::*;
  logic clk = 0, rst_n = 0;
  core_mode_e mode, active_mode;
  logic [15:0] switch_count;
  logic net_in_valid, net_in_ready, vid_in_valid, vid_in_ready;
  pkt_word_t net_in_data, vid_in_data;
  logic net_out_valid, net_out_ready, vid_out_valid, vid_out_ready;
  pkt_word_t net_out_data, vid_out_data;
  logic pm1_in_valid, pm1_in_ready, pm1_out_valid, pm1_out_ready;
  logic pm2_in_valid, pm2_in_ready, pm2_out_valid, pm2_out_ready;
  pkt_word_t pm1_in_data, pm1_out_data, pm2_in_data, pm2_out_data;
  int checks = 0, failures = 0;

  pkt_core dut (.*);

  // processing-module stand-ins
  always_comb begin
    pm1_out_valid = pm1_in_valid; pm1_out_data = pm1_in_data; pm1_out_data.data[56] = !pm1_in_data.data[56];
    pm1_in_ready  = pm1_out_ready;
    pm2_out_valid = pm2_in_valid; pm2_out_data = pm2_in_data; pm2_out_data.data[57] = !pm2_in_data.data[57];
    pm2_in_ready  = pm2_out_ready;
  end

  always #5 clk = ~clk;
  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic [63:0] exp_net[$], exp_vid[$];
  int net_words_acc = 0, vid_words_acc = 0;

  always @(negedge clk) begin
    net_out_ready = $urandom_range(0, 3) != 0;
    vid_out_ready = $urandom_range(0, 3) != 0;
  end

  always @(posedge clk) if (rst_n) begin
    if (net_out_valid && net_out_ready) begin
      checks++;
      if (exp_net.size() == 0 || net_out_data.data !== exp_net[0]) begin
        failures++;
        if (failures < 6) $display("net_out %h exp %h", net_out_data.data, exp_net.size() ? exp_net[0] : 64'h0);
      end
      if (exp_net.size()) void'(exp_net.pop_front());
    end
    if (vid_out_valid && vid_out_ready) begin
      checks++;
      if (exp_vid.size() == 0 || vid_out_data.data !== exp_vid[0]) begin
        failures++;
        if (failures < 6) $display("vid_out %h exp %h", vid_out_data.data, exp_vid.size() ? exp_vid[0] : 64'h0);
      end
      if (exp_vid.size()) void'(exp_vid.pop_front());
    end
  end

  function automatic logic [63:0] mark(logic [63:0] d, bit p1, bit p2);
    d[56] ^= p1; d[57] ^= p2;
    return d;
  endfunction

  // send packets on both sources in parallel
  task automatic run_mode(core_mode_e m, int npk);
    fork
      begin : net_src
        for (int p = 0; p < npk; p++) begin
          int len; len = $urandom_range(1, 8);
          for (int i = 0; i < len; i++) begin
            logic [63:0] d;
            d = {8'h00, 8'hAA, 16'(p), 32'(i)};
            @(negedge clk);
            net_in_valid = 1; net_in_data = '{sop: i == 0, eop: i == len - 1, empty: 0, data: d};
            case (m)
              MODE_NET_NET: exp_net.push_back(mark(d, 1, 1));
              MODE_DUPLEX:  exp_vid.push_back(mark(d, 0, 1));
              default: ;
            endcase
            do @(posedge clk); while (!net_in_ready);
          end
          @(negedge clk); net_in_valid = 0;
        end
      end
      begin : vid_src
        for (int p = 0; p < npk; p++) begin
          int len; len = $urandom_range(1, 8);
          for (int i = 0; i < len; i++) begin
            logic [63:0] d;
            d = {8'h00, 8'h55, 16'(p), 32'(i)};
            @(negedge clk);
            vid_in_valid = 1; vid_in_data = '{sop: i == 0, eop: i == len - 1, empty: 0, data: d};
            case (m)
              MODE_DUPLEX:  exp_net.push_back(mark(d, 1, 0));
              MODE_VID_VID: exp_vid.push_back(mark(d, 1, 1));
              default: ;
            endcase
            do @(posedge clk); while (!vid_in_ready);
          end
          @(negedge clk); vid_in_valid = 0;
        end
      end
    join
    repeat (50) @(posedge clk);
    checks++;
    if (exp_net.size() != 0 || exp_vid.size() != 0) begin
      failures++;
      $display("mode %0d: %0d net and %0d video words missing", m, exp_net.size(), exp_vid.size());
      exp_net.delete(); exp_vid.delete();
    end
  endtask

  initial begin
    mode = MODE_DUPLEX; net_in_valid = 0; vid_in_valid = 0; net_in_data = '0; vid_in_data = '0;
    repeat (3) @(posedge clk);
    @(negedge clk); rst_n = 1;
    foreach (mode_list[k]) begin
      @(negedge clk); mode = mode_list[k];
      repeat (3) @(posedge clk);
      checks++;
      if (active_mode != mode_list[k]) begin failures++; $display("mode not taken"); end
      run_mode(mode_list[k], 30);
    end
    // a mode change requested inside a packet waits for its end
    @(negedge clk); mode = MODE_NET_NET;
    repeat (3) @(posedge clk);
    @(negedge clk);
    net_in_valid = 1; net_in_data = '{sop: 1, eop: 0, empty: 0, data: 64'h1};
    exp_net.push_back(mark(64'h1, 1, 1));
    do @(posedge clk); while (!net_in_ready);
    @(negedge clk); net_in_valid = 0;
    mode = MODE_VID_VID;
    repeat (10) @(posedge clk);
    checks++;
    if (active_mode != MODE_NET_NET) begin failures++; $display("mode switched inside a packet"); end
    @(negedge clk);
    net_in_valid = 1; net_in_data = '{sop: 0, eop: 1, empty: 0, data: 64'h2};
    exp_net.push_back(mark(64'h2, 1, 1));
    do @(posedge clk); while (!net_in_ready);
    @(negedge clk); net_in_valid = 0;
    repeat (5) @(posedge clk);
    checks++;
    if (active_mode != MODE_VID_VID || exp_net.size() != 0) begin
      failures++; $display("mode after packet %0d, left %0d", active_mode, exp_net.size());
    end
    checks++;
    if (switch_count != 16'd5) begin failures++; $display("switch_count %0d", switch_count); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  core_mode_e mode_list[3] = '{MODE_NET_NET, MODE_DUPLEX, MODE_VID_VID};
endmodule
