// tb_acc_ip_csum: Ethernet II frames with IPv4 headers of 20 to 60 bytes
// (options filled with random bytes), correct checksums computed by the
// reference, and corrupted ones. The start pulse comes with stream word 3,
// whose low half word is the first IP header half word. done must rise the
// cycle after the stream word holding the last header byte (a cycle count
// check), and ok must match.
module tb_acc_ip_csum;
  import pp_pkg::*;
  import tb_pkt_pkg::*;
  logic clk = 0, rst_n = 0, start = 0;
  word_t cur = WORD_IDLE;
  logic done, ok;
  int checks = 0, failures = 0;

  acc_ip_csum dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic send(int ihl, bit bad);
    bytes_t ip, f;
    logic [15:0] c;
    int nw, done_word, seen = -1;
    put16(ip, {4'h4, 4'(ihl), 8'h00}); put16(ip, 16'(ihl * 4 + 8));
    put16(ip, 16'($urandom)); put16(ip, 16'h0); put16(ip, 16'h4011); put16(ip, 16'h0);
    put32(ip, $urandom); put32(ip, $urandom);
    for (int i = 20; i < ihl * 4; i++) ip.push_back(8'($urandom));
    c = ~ref_csum(ip);
    if (bad) c ^= 16'(1 << ($urandom % 16));
    ip[10] = c[15:8]; ip[11] = c[7:0];
    for (int i = 0; i < 8; i++) ip.push_back(8'($urandom));
    f = eth(48'h0c5a80ac4ab7, 16'h0800, ip, 0);
    nw = n_words(f);
    // Header byte 4*ihl-1 is frame byte 14 + 4*ihl - 1.
    done_word = (14 + 4 * ihl - 1) / 4;
    for (int w = 0; w < nw; w++) begin
      @(negedge clk); cur = frame_word(f, w); start = (w == 3);
      if (done && seen < 0) seen = w - 1;
    end
    @(negedge clk); cur = WORD_IDLE; start = 0;
    checks++;
    if (!done || ok != !bad || seen != done_word) begin
      failures++;
      $display("FAIL ihl %0d bad %b: done %b ok %b at word %0d expected %0d", ihl, bad, done, ok, seen, done_word);
    end
    repeat (3) @(negedge clk);
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 100; i++) send(5 + i % 11, (i % 4) == 3);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
