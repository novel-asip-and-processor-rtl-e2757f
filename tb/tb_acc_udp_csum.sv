// tb_acc_udp_csum: Ethernet II / IPv4 / UDP frames with payloads of 0 to 300
// bytes (odd and even), with the reference UDP checksum over the pseudo
// header, a corrupted checksum, or a zero (unused) checksum. Start comes with
// stream word 3. done must rise the cycle after the word holding the last UDP
// byte, and ok must match.
module tb_acc_udp_csum;
  import pp_pkg::*;
  import tb_pkt_pkg::*;
  logic clk = 0, rst_n = 0, start = 0;
  word_t cur = WORD_IDLE;
  logic done, ok;
  int checks = 0, failures = 0;

  acc_udp_csum dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic send(int plen, bit bad, bit zero);
    bytes_t f;
    int nw, done_word, seen = -1;
    f = eth(48'h0c5a80ac4ab7, 16'h0800,
            ip_udp($urandom, $urandom, 8'h11, 16'd2025, rand_bytes(plen), 0, bad, zero), 0);
    nw = n_words(f);
    done_word = (14 + 20 + 8 + plen - 1) / 4;
    for (int w = 0; w < nw; w++) begin
      @(negedge clk); cur = frame_word(f, w); start = (w == 3);
      if (done && seen < 0) seen = w - 1;
    end
    @(negedge clk); cur = WORD_IDLE; start = 0;
    checks++;
    if (!done || ok != (!bad || zero) || seen != done_word) begin
      failures++;
      $display("FAIL plen %0d bad %b zero %b: done %b ok %b at word %0d expected %0d",
               plen, bad, zero, done, ok, seen, done_word);
    end
    repeat (3) @(negedge clk);
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 150; i++) send((i * 7) % 301, (i % 3) == 1, (i % 10) == 9);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
