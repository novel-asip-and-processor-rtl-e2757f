// acc_crc32: Ethernet CRC accelerator.
//
// Checks the frame check sequence of every received frame at 32 bits per
// clock. It starts by itself on the first word of a frame (the packet start
// input of the processor) and runs the reflected CRC-32 (polynomial
// 0x04C11DB7, register preset to all ones) over every byte up to and
// including the 4-byte FCS. An intact frame leaves the register at the fixed
// residue 0xDEBB20E3. The four byte steps of one word are unrolled into one
// combinational stage; in the eof word only the first `nbytes` bytes count.
// The internals are this design's own; the published processor only names
// the accelerator and its done/ok inputs.
//
// Interface: `cur` is the word stream as seen by the processor's current
// instruction. `done` and `ok` rise in the cycle after the eof word and stay
// until the next frame starts (processor inputs 1 and 2).
module acc_crc32
  import pp_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  word_t cur,
  output logic  done,
  output logic  ok
);
  localparam logic [31:0] RESIDUE = 32'hDEBB_20E3;

  logic [31:0] crc_q, crc_in, crc_next;

  function automatic logic [31:0] crc_byte(input logic [31:0] c, input logic [7:0] b);
    logic [31:0] r;
    r = c ^ {24'h0, b};
    for (int i = 0; i < 8; i++)
      r = r[0] ? ((r >> 1) ^ 32'hEDB8_8320) : (r >> 1);
    return r;
  endfunction

  always_comb begin
    crc_in   = cur.sof ? 32'hFFFF_FFFF : crc_q;
    crc_next = crc_in;
    for (int k = 0; k < 4; k++)
      if (!cur.eof || (3'(k) < cur.nbytes))
        crc_next = crc_byte(crc_next, cur.data[31-8*k -: 8]);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      crc_q <= 32'hFFFF_FFFF;
      done  <= 1'b0;
      ok    <= 1'b0;
    end else if (cur.valid) begin
      crc_q <= crc_next;
      if (cur.sof) begin
        done <= 1'b0;
        ok   <= 1'b0;
      end
      if (cur.eof) begin
        done <= 1'b1;
        ok   <= (crc_next == RESIDUE);
      end
    end
  end
endmodule
