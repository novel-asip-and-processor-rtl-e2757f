// acc_len_counter: IP packet length counter accelerator.
//
// Started by a processor output in the cycle whose word holds the IPv4 total
// length field in bits 31:16 (the second word of the IP header with
// Ethernet II framing, so 6 datagram bytes have been received once that word
// is counted). It then counts the remaining bytes and marks the word that
// holds the last byte of the datagram, with the number of datagram bytes in
// it, so that Ethernet padding and the CRC can be left out of payload
// storage. A total length below 20 bytes, or a frame ending before the
// datagram does, raises `len_err`. Only the accelerator's name and trigger
// are published; everything else here is this design's own.
//
// Interface: `start` pulse with `cur`; `ip_end`/`end_bytes` are combinational
// and valid in the cycle of the last datagram word; `active` is 1 from the
// cycle after start until that word; `len_err` holds until the next start.
module acc_len_counter
  import pp_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        start,
  input  word_t       cur,
  output logic        active,
  output logic        ip_end,
  output logic [2:0]  end_bytes,
  output logic        len_err
);
  logic [15:0] remaining;   // datagram bytes after the words already seen

  assign ip_end    = active && (remaining <= 16'd4);
  assign end_bytes = ip_end ? remaining[2:0] : 3'd4;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active    <= 1'b0;
      remaining <= '0;
      len_err   <= 1'b0;
    end else if (start) begin
      len_err   <= 1'b0;
      if (cur.data[31:16] < 16'd20) begin
        active  <= 1'b0;
        len_err <= 1'b1;
      end else begin
        active    <= 1'b1;
        remaining <= cur.data[31:16] - 16'd6;
      end
    end else if (active) begin
      if (ip_end) begin
        active <= 1'b0;
        if (cur.eof && (cur.nbytes < remaining[2:0])) len_err <= 1'b1;
      end else if (cur.eof || !cur.valid) begin
        active  <= 1'b0;
        len_err <= 1'b1;
      end
      remaining <= remaining - 16'd4;
    end
  end
endmodule
