// tb_pp_input_buffer: streams random words into the input buffer with a
// random buffer-ctrl bit per cycle and checks each cycle that the low word is
// the word received one cycle earlier and that the high word holds the word
// before it exactly when the previous cycle asked for two words (zero
// otherwise). The frame flags must travel with the low word.
module tb_pp_input_buffer;
  import pp_pkg::*;
  logic clk = 0, rst_n = 0, two_words = 0;
  word_t din = WORD_IDLE, cur;
  logic [63:0] buf64;
  int checks = 0, failures = 0;
  word_t prev1, prev2;


  pp_input_buffer dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    prev1 = WORD_IDLE; prev2 = WORD_IDLE;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 500; i++) begin
      @(negedge clk);
      if (i > 0) begin
        checks++;
        if (cur !== prev1 || buf64[31:0] !== prev1.data ||
            buf64[63:32] !== (two_words ? prev2.data : 32'h0)) begin
          failures++;
          $display("FAIL cycle %0d: buf %h cur %p exp %p prev2 %h tw %b", i, buf64, cur, prev1, prev2.data, two_words);
        end
      end
      din = '{data: $urandom, valid: 1'b1, sof: 1'($urandom), eof: 1'($urandom), nbytes: 3'd4};
      two_words = 1'($urandom);
      prev2 = prev1;
      prev1 = din;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
