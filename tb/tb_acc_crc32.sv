// tb_acc_crc32: the CRC accelerator on frames of every length modulo 4.
// First the standard check string "123456789", whose CRC-32 is the known
// constant 0xCBF43926, sent with that FCS: must be accepted, and rejected
// with one bit flipped. Then random frames with the FCS from the byte-serial
// reference, intact and with a corrupted data or FCS byte. done must rise one
// cycle after the eof word.
module tb_acc_crc32;
  import pp_pkg::*;
  import tb_pkt_pkg::*;
  logic clk = 0, rst_n = 0;
  word_t cur = WORD_IDLE;
  logic done, ok;
  int checks = 0, failures = 0;

  acc_crc32 dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic send(bytes_t f, bit exp_ok, string what);
    int nw = n_words(f);
    for (int w = 0; w < nw; w++) begin
      @(negedge clk); cur = frame_word(f, w);
      if (w == 1) begin
        checks++;
        if (done) begin failures++; $display("FAIL %s: done not cleared", what); end
      end
    end
    @(negedge clk); cur = WORD_IDLE;
    checks++;
    if (!done || ok != exp_ok) begin
      failures++;
      $display("FAIL %s: done %b ok %b expected ok %b", what, done, ok, exp_ok);
    end
    repeat (2) @(negedge clk);
  endtask

  initial begin
    bytes_t f;
    logic [31:0] c;
    repeat (2) @(negedge clk);
    rst_n = 1;
    f = {8'h31, 8'h32, 8'h33, 8'h34, 8'h35, 8'h36, 8'h37, 8'h38, 8'h39,
         8'h26, 8'h39, 8'hf4, 8'hcb};
    send(f, 1, "check string");
    f[3] ^= 8'h04;
    send(f, 0, "check string corrupted");
    for (int i = 0; i < 200; i++) begin
      f = rand_bytes(20 + i);
      c = ref_crc32(f);
      f.push_back(c[7:0]); f.push_back(c[15:8]); f.push_back(c[23:16]); f.push_back(c[31:24]);
      if (i % 3 == 0) begin
        f[$urandom % f.size()] ^= 8'(1 << ($urandom % 8));
        send(f, 0, "random corrupted");
      end else begin
        send(f, 1, "random");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
