// tb_sdi_tx_if: checks the HD-SDI transmit coder against a bit-serial
// reference scrambler/NRZI model on random words and on TRS sequences, and
// checks the one-clock latency.
module tb_sdi_tx_if;
  import tb_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [19:0] vid_word, tx_word;
  int checks = 0, failures = 0;

  sdi_tx_if dut (.clk, .rst_n, .vid_word, .tx_word);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    sdi_enc enc = new();
    logic [19:0] exp;
    vid_word = 0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      case (i % 50)
        0: vid_word = 20'hFFFFF;
        1, 2: vid_word = 20'h00000;
        default: vid_word = 20'($urandom);
      endcase
      exp = enc.step(vid_word);
      @(posedge clk);
      #1;
      checks++;
      if (tx_word !== exp) begin
        failures++;
        if (failures < 5) $display("mismatch %0d: in %h got %h exp %h", i, vid_word, tx_word, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
