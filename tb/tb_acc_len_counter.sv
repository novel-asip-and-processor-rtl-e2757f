// tb_acc_len_counter: IPv4 datagrams of 20 to 400 bytes in Ethernet II
// frames, short ones padded to the minimum frame size. Start comes with
// stream word 4, which holds the total length in bits 31:16. ip_end must be
// high in exactly one cycle, on the stream word holding the last datagram
// byte, with end_bytes telling how many datagram bytes that word holds.
// Truncated frames and a too small total length must raise len_err.
module tb_acc_len_counter;
  import pp_pkg::*;
  import tb_pkt_pkg::*;
  logic clk = 0, rst_n = 0, start = 0;
  word_t cur = WORD_IDLE;
  logic active, ip_end, len_err;
  logic [2:0] end_bytes;
  int checks = 0, failures = 0;

  acc_len_counter dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic send(int dlen, int cut, bit exp_err);
    bytes_t ip, f;
    int nw, ends = 0, end_w = -1, eb = 0, last;
    put16(ip, 16'h4500); put16(ip, 16'(dlen));
    for (int i = 4; i < dlen; i++) ip.push_back(8'($urandom));
    f = eth(48'h0c5a80ac4ab7, 16'h0800, ip, 0);
    while (cut > 0) begin void'(f.pop_back()); cut--; end
    nw = n_words(f);
    for (int w = 0; w < nw; w++) begin
      @(negedge clk); cur = frame_word(f, w); start = (w == 4);
      #1;
      if (ip_end) begin ends++; end_w = w; eb = end_bytes; end
    end
    @(negedge clk); cur = WORD_IDLE; start = 0;
    last = 14 + dlen - 1;
    checks++;
    if (len_err != exp_err) begin
      failures++; $display("FAIL len %0d: len_err %b", dlen, len_err);
    end
    if (!exp_err) begin
      checks++;
      if (ends != 1 || end_w != last / 4 || eb != last % 4 + 1) begin
        failures++;
        $display("FAIL len %0d: ends %0d word %0d bytes %0d, expected word %0d bytes %0d",
                 dlen, ends, end_w, eb, last / 4, last % 4 + 1);
      end
    end
    repeat (2) @(negedge clk);
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int l = 20; l <= 400; l += 7) send(l, 0, 0);
    send(100, 20, 1);   // frame ends inside the datagram
    send(12, 0, 1);     // impossible total length
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
