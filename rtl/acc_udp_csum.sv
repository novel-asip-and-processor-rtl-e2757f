// acc_udp_csum: UDP checksum accelerator (IPv4).
//
// Started like the IP header checksum unit, in the cycle whose word carries
// the first IP header half word in bits 15:0. It numbers the half words of
// the IP datagram from there (two per clock), picks up the pseudo header on
// the way (protocol byte, source and destination address, and the UDP length
// once the UDP header arrives), and adds the whole UDP header and data in
// ones-complement arithmetic. An odd final byte is padded with zero. The
// datagram is correct when the folded sum is 0xFFFF, or when its checksum
// field is zero (the sender did not compute one). A frame that ends before
// the UDP length is reached is reported wrong. The internals are this
// design's own; the published processor only names the accelerator and its
// done/ok inputs.
//
// Interface: `start` pulse, word stream `cur`; `done`/`ok` levels rise in
// the cycle after the last UDP byte and clear on the next start or frame
// start (processor inputs 3 and 4).
module acc_udp_csum
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
  logic [10:0] h;          // datagram half-word index of cur.data[31:16]
  logic [5:0]  hdr;        // IP header length in half words
  logic [15:0] udp_len;
  logic        cs_zero;
  logic [31:0] sum;

  logic [31:0] sum_next;
  logic [15:0] len_next;
  logic        cs_zero_next;
  logic        last;

  // Contribution of one half word at index `idx` to the checksum, and
  // whether it is the final UDP half word.
  always_comb begin
    logic [10:0] idx, rel;
    logic [15:0] v;
    logic [16:0] byte_pos;
    sum_next     = sum;
    len_next     = udp_len;
    cs_zero_next = cs_zero;
    last         = 1'b0;
    for (int k = 0; k < 2; k++) begin
      idx = h + 11'(k);
      v   = k == 0 ? cur.data[31:16] : cur.data[15:0];
      rel      = idx - 11'(hdr);
      byte_pos = {5'h0, rel, 1'b0};
      if (idx == 11'd4)
        sum_next = sum_next + {24'h0, v[7:0]};            // protocol
      if (idx >= 11'd6 && idx <= 11'd9)
        sum_next = sum_next + {16'h0, v};                 // addresses
      if (idx >= 11'(hdr)) begin
        if (rel == 11'd2) begin
          len_next = v;
          sum_next = sum_next + {16'h0, v} + {16'h0, v};  // length, twice
        end else if (rel < 11'd3) begin
          sum_next = sum_next + {16'h0, v};
        end else if (byte_pos < {1'b0, len_next}) begin
          if (rel == 11'd3) cs_zero_next = (v == 16'h0);
          if (byte_pos + 17'd1 == {1'b0, len_next})
            sum_next = sum_next + {16'h0, v[15:8], 8'h0};  // odd last byte
          else
            sum_next = sum_next + {16'h0, v};
          if (byte_pos + 17'd2 >= {1'b0, len_next}) last = 1'b1;
        end else if (rel == 11'd3) begin
          last = 1'b1;                                     // length below 8
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active  <= 1'b0;
      h       <= '0;
      hdr     <= '0;
      udp_len <= '0;
      cs_zero <= 1'b0;
      sum     <= '0;
      done    <= 1'b0;
      ok      <= 1'b0;
    end else if (start) begin
      active  <= 1'b1;
      h       <= 11'd1;              // next word starts at half word 1
      hdr     <= {1'b0, cur.data[11:8], 1'b0};
      udp_len <= 16'hFFFF;
      cs_zero <= 1'b0;
      sum     <= '0;
      done    <= 1'b0;
      ok      <= 1'b0;
    end else if (active) begin
      h       <= h + 11'd2;
      sum     <= sum_next;
      udp_len <= len_next;
      cs_zero <= cs_zero_next;
      if (last) begin
        active <= 1'b0;
        done   <= 1'b1;
        ok     <= cs_zero_next || (csum_fold(sum_next) == 16'hFFFF);
      end else if (cur.eof || !cur.valid || h > 11'd1500) begin
        active <= 1'b0;
        done   <= 1'b1;
      end
    end else if (cur.sof) begin
      done <= 1'b0;
      ok   <= 1'b0;
    end
  end
endmodule
