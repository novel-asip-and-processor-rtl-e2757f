// pp_input_buffer: the dynamic input buffer of the protocol processor.
//
// The buffer is the only data register the instructions read. It is loaded
// implicitly every clock with the word on the input port, so the word seen by
// an instruction is the one that was on the port in the previous cycle. The
// buffer ctrl bit of the executing instruction decides whether the buffer
// holds one or two words in the next cycle: with 1 the current word is kept
// as the older word, giving the last 64 received bits; with 0 the older word
// reads as zero. The newest word sits in bits 31:0, the older in 63:32, so a
// field "at offset 16" spans the boundary between them.
//
// Interface: din (port word), two_words (buffer ctrl of the current
// instruction), buf64 (data seen by the compare unit), cur (newest word with
// its frame flags, used by the accelerators). One cycle latency. The port
// rules (sof and eof only on valid words, 1 to 4 bytes in an eof word) are
// checked by an assertion.
module pp_input_buffer
  import pp_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  word_t       din,
  input  logic        two_words,
  output logic [63:0] buf64,
  output word_t       cur
);
  logic [31:0] older;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cur   <= WORD_IDLE;
      older <= '0;
    end else begin
      cur   <= din;
      older <= two_words ? cur.data : 32'h0;
    end
  end

  assign buf64 = {older, cur.data};

  a_port_word: assert property (@(posedge clk) disable iff (!rst_n)
    (din.sof || din.eof) |-> din.valid && (!din.eof || (din.nbytes >= 3'd1 && din.nbytes <= 3'd4)));
endmodule
