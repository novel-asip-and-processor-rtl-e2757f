// acc_ip_csum: IPv4 header checksum accelerator.
//
// Started by a processor output in the cycle whose word carries the first
// two bytes of the IP header in bits 15:0 (Ethernet II framing puts the IP
// header at a half-word boundary). From the IHL field in that half word it
// knows the header length, adds every 16-bit header word, the checksum field
// included, in ones-complement arithmetic (two half words per clock) and
// reports the header correct when the folded sum is 0xFFFF. A header shorter
// than 20 bytes or a frame that ends inside the header is reported wrong.
// The internals and the start alignment are this design's own; the
// published processor only names the accelerator and its done/ok inputs.
//
// Interface: `start` pulse, word stream `cur`; `done` and `ok` are levels
// that rise in the cycle after the last header word and clear on the next
// start or frame start (processor inputs 5 and 6).
module acc_ip_csum
  import pp_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  start,
  input  word_t cur,
  output logic  done,
  output logic  ok
);
  logic        active;
  logic [5:0]  left;     // header half words still to add
  logic [31:0] sum;
  logic [31:0] sum_next;
  logic [5:0]  ihl2;

  assign ihl2 = {1'b0, cur.data[11:8], 1'b0};

  always_comb begin
    sum_next = sum;
    if (start)
      sum_next = {16'h0, cur.data[15:0]};
    else if (left >= 6'd2)
      sum_next = sum + {16'h0, cur.data[31:16]} + {16'h0, cur.data[15:0]};
    else
      sum_next = sum + {16'h0, cur.data[31:16]};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active <= 1'b0;
      left   <= '0;
      sum    <= '0;
      done   <= 1'b0;
      ok     <= 1'b0;
    end else if (start) begin
      done <= 1'b0;
      ok   <= 1'b0;
      sum  <= sum_next;
      if (ihl2 < 6'd10) begin      // IHL below 5: malformed
        active <= 1'b0;
        done   <= 1'b1;
      end else begin
        active <= 1'b1;
        left   <= ihl2 - 6'd1;
      end
    end else if (active) begin
      sum <= sum_next;
      if (left <= 6'd2) begin
        active <= 1'b0;
        done   <= 1'b1;
        ok     <= (csum_fold(sum_next) == 16'hFFFF);
      end else if (cur.eof || !cur.valid) begin
        active <= 1'b0;
        done   <= 1'b1;
      end
      left <= left - 6'd2;
    end else if (cur.sof) begin
      done <= 1'b0;
      ok   <= 1'b0;
    end
  end
endmodule
